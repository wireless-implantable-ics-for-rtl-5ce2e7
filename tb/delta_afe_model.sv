// Behavioural model of the analog differential-difference delta modulator
// (preamplifier, strong-arm comparator, charge pump and integrating
// capacitor) for the closed-loop testbenches; not synthesizable logic.
//
// Voltages are integers in units of one charge-pump step (the change of the
// integrator voltage during one reference-clock cycle of pump current). vin
// is the differential input. pred is the loop's prediction, i.e. the
// inverted V_REF- node: pump_dn lowers V_REF- and so raises pred by one step
// per cycle, pump_up lowers it. The comparator decision is dmod = 1 when the
// amplified difference vin - pred is positive; an ideal comparator is
// assumed (no offset, no noise).
module delta_afe_model (
  input  logic ref_clk,
  input  logic rst_n,
  input  int   vin,
  input  logic pump_up,
  input  logic pump_dn,
  output logic dmod,
  output int   pred
);
  always_ff @(posedge ref_clk) begin
    if (!rst_n)       pred <= 0;
    else if (pump_dn) pred <= pred + 1;
    else if (pump_up) pred <= pred - 1;
  end
  assign dmod = vin > pred;
endmodule

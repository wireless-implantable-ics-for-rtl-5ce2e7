// Behavioural model of one SAR ADC analog path (track-and-hold, 10-bit
// binary-weighted capacitive DAC and comparator) for the testbenches; not
// synthesizable logic. vin is the amplified input in LSB units. While track
// is high the held value follows vin at each step enable; comp compares the
// held value with the DAC code.
module sar_afe_model (
  input  logic       clk,
  input  logic       en,
  input  logic       track,
  input  real        vin,
  input  logic [9:0] dac_ctrl,
  output logic       comp
);
  real held = 0.0;
  always @(posedge clk) if (en && track) held <= vin;
  assign comp = held > real'(dac_ctrl);
endmodule

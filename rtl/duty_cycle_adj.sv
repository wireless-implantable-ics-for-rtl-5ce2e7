// Duty-cycle adjustment stage in front of the charge-pump DAC.
//
// At every modulator decision (samp_en) the block latches the decision and,
// from the next cycle, turns on one of the two charge-pump switches for
// max(1, P >> DUTY_LOG2) reference-clock cycles, P being the modulator
// period of the mode now in force (1, 2^MOD_LOG2 or 2^IDLE_LOG2). The
// charge moved per decision is thus proportional to the sampling period:
// the loop slews at the same rate in every mode, and a slow mode simply
// takes fewer, coarser steps (lower resolution, fewer bits to transmit).
// With the default DUTY_LOG2 = 0 the pump is on for the whole period.
//
// Polarity: a 1 from the comparator means the differential input rose, so
// the feedback node V_REF- must fall: dmod = 1 drives pump_dn (sink), dmod = 0
// drives pump_up (source). The outputs are active high and never both high;
// the inversion for the PMOS switch belongs to the analog side.
//
// The stage and its purpose (setting the integration time T_DAC from the
// sampling clock) follow the design description, and a step proportional to
// the sampling period follows its algorithm model. The pulse counter, the
// DUTY_LOG2 knob and the polarity reading are this design's choices. A new
// decision restarts the pulse, so a pulse never outlives its period.
//
// Timing: the pulse starts on the cycle after samp_en.
module duty_cycle_adj
  import eeg_pkg::*;
#(
  parameter int unsigned MOD_LOG2  = 3,
  parameter int unsigned IDLE_LOG2 = 7,
  parameter int unsigned DUTY_LOG2 = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       samp_en,
  input  logic       dmod,
  input  samp_mode_e mode,       // mode in force after samp_en
  output logic       pump_up,
  output logic       pump_dn
);

  localparam int unsigned TW = IDLE_LOG2 + 1;

  logic [TW-1:0] left;
  logic [TW-1:0] width;
  logic          dir_dn;
  logic          start;

  always_comb begin
    unique case (mode)
      MODE_HIGH: width = TW'(1);
      MODE_MOD:  width = TW'(1) << ((MOD_LOG2 > DUTY_LOG2) ? (MOD_LOG2 - DUTY_LOG2) : 0);
      default:   width = TW'(1) << ((IDLE_LOG2 > DUTY_LOG2) ? (IDLE_LOG2 - DUTY_LOG2) : 0);
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start  <= 1'b0;
      dir_dn <= 1'b0;
      left   <= '0;
    end else begin
      start <= samp_en;
      if (samp_en) dir_dn <= dmod;
      if (start)              left <= width;
      else if (left != '0)    left <= left - 1'b1;
    end
  end

  // The pulse covers the cycles from start while left counts down.
  assign pump_up = (start || left > TW'(1)) && !dir_dn;
  assign pump_dn = (start || left > TW'(1)) &&  dir_dn;

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(pump_up && pump_dn));

endmodule

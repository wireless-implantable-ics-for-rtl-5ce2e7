// Digital part of one activity-adaptive, loss-less compressive EEG channel.
//
// The analog differential-difference delta modulator (preamplifier,
// strong-arm comparator, charge pump and integrating capacitor) sits outside
// this module: it receives dm_clk / dm_clk_q and the charge-pump commands,
// and returns its comparator decision on dmod. This module closes the loop
// digitally:
//   * activity_monitor reconstructs the amplitude from dmod, tracks its DC
//     level and raises the moderate/high activity flags;
//   * samp_clk_gen turns the flags into the modulator sampling rate
//     (ref/128 idle, ref/8 moderate, ref undivided high activity) and a
//     one-cycle decision strobe samp_en;
//   * duty_cycle_adj converts each decision into a charge-pump pulse
//     (pump_up / pump_dn) as long as the sampling period, so the step per
//     decision grows as the rate falls; the reconstruction counts the same
//     pump cycles and so stays an exact replica of the analog predictor.
// The channel output for the radio is the bit stream itself, one bit per
// decision (tx_bit with tx_valid), together with the current mode, which is
// the resolution information the receiver needs to rebuild the signal; the
// decimated amplitude amp_dec is also provided once per 256 Hz frame.
//
// All logic runs on the reference clock. dmod must be stable in the cycle
// where samp_en is high; it is taken at that clock edge.
module adaptive_channel
  import eeg_pkg::*;
#(
  parameter int unsigned W         = AMP_W,
  parameter int unsigned VW        = VTH_W,
  parameter int unsigned DS        = 40,
  parameter int unsigned MOD_LOG2  = 3,
  parameter int unsigned IDLE_LOG2 = 7,
  parameter int unsigned DUTY_LOG2 = 0
) (
  input  logic                ref_clk,
  input  logic                rst_n,
  input  logic                dmod,
  input  logic [W-1:0]        dc_init,
  input  logic [VW-1:0]       vth_low,
  input  logic [VW-1:0]       vth_high,
  // to the analog modulator
  output logic                dm_clk,
  output logic                dm_clk_q,
  output logic                pump_up,
  output logic                pump_dn,
  // to the transmitter / monitoring
  output samp_mode_e          mode,
  output logic                samp_en,
  output logic                tx_bit,
  output logic                tx_valid,
  output logic signed [W-1:0] amp,
  output logic signed [W-1:0] amp_dec,
  output logic                dec_valid,
  output logic [W-1:0]        dc,
  output logic [3:0]          th_cross
);

  logic flag_mod, flag_high;

  activity_monitor #(.W(W), .VW(VW), .DS(DS), .DECIM(2 ** IDLE_LOG2)) u_mon (
    .clk(ref_clk), .rst_n, .int_en(pump_up | pump_dn), .int_bit(pump_dn), .ds_en(samp_en), .dc_init, .vth_low, .vth_high,
    .amp, .amp_dec, .dec_valid, .dc, .th_cross, .flag_mod, .flag_high
  );

  samp_clk_gen #(.MOD_LOG2(MOD_LOG2), .IDLE_LOG2(IDLE_LOG2)) u_clk (
    .ref_clk, .rst_n, .flag_mod, .flag_high, .mode, .samp_en, .dm_clk, .dm_clk_q
  );

  duty_cycle_adj #(.MOD_LOG2(MOD_LOG2), .IDLE_LOG2(IDLE_LOG2), .DUTY_LOG2(DUTY_LOG2)) u_dca (
    .clk(ref_clk), .rst_n, .samp_en, .dmod, .mode, .pump_up, .pump_dn
  );

  always_ff @(posedge ref_clk) begin
    if (!rst_n) begin
      tx_bit   <= 1'b0;
      tx_valid <= 1'b0;
    end else begin
      tx_valid <= samp_en;
      if (samp_en) tx_bit <= dmod;
    end
  end

endmodule

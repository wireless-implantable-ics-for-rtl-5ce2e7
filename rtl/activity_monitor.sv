// Digital activity-monitoring back-end of one adaptive recording channel.
//
// Chain: amp_recon integrates the modulator bit stream, one count per
// reference cycle in which the charge pump is on (int_en, with int_bit = 1
// for a 1 decision), into a W-bit two's complement amplitude (and a once-per-frame decimated copy); dc_extract
// down-samples that amplitude every DS cycles of ds_en (the decision strobe,
// i.e. every DS modulator clocks) and low-pass filters it into a DC level; threshold_detect compares the amplitude with DC +/- vth_low and
// DC +/- vth_high and raises flag_mod / flag_high. The flags go to the
// sampling-clock generator.
//
// The thresholds and the DC extractor see the running amplitude, updated at
// every pump cycle; the decimated word is what the channel reports.
// The partition follows the back-end block diagram; feeding the running
// rather than the decimated amplitude to the thresholds is this design's
// choice (the thresholds are evaluated every clock cycle).
module activity_monitor #(
  parameter int unsigned W     = 11,
  parameter int unsigned VW    = 10,
  parameter int unsigned DS    = 40,
  parameter int unsigned DECIM = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                int_en,
  input  logic                int_bit,
  input  logic                ds_en,
  input  logic [W-1:0]        dc_init,
  input  logic [VW-1:0]       vth_low,
  input  logic [VW-1:0]       vth_high,
  output logic signed [W-1:0] amp,
  output logic signed [W-1:0] amp_dec,
  output logic                dec_valid,
  output logic [W-1:0]        dc,
  output logic [3:0]          th_cross,
  output logic                flag_mod,
  output logic                flag_high
);

  logic [W-1:0] n_ones, n_zeros;
  logic         dc_upd;

  amp_recon #(.W(W), .DECIM(DECIM)) u_recon (
    .clk, .rst_n, .en(int_en), .dbit(int_bit),
    .n_ones, .n_zeros, .amp, .amp_dec, .dec_valid
  );

  dc_extract #(.W(W), .DS(DS), .SIGNED(1'b1)) u_dc (
    .clk, .rst_n, .en(ds_en), .din(amp), .dc_init, .dc, .dc_upd
  );

  threshold_detect #(.W(W), .VW(VW), .SIGNED(1'b1)) u_th (
    .x(amp), .dc, .vth_low, .vth_high, .th_cross, .flag_mod, .flag_high
  );

endmodule

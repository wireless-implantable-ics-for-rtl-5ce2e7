// Top level: the two EEG recording microsystems side by side.
//
// (A) Activity-adaptive array: NCH_A loss-less compressive channels
//     (adaptive_channel). Each one drives its own analog delta modulator
//     through dm_clk/dm_clk_q and the charge-pump commands, reads back the
//     comparator decision dmod, and chooses its own sampling rate from the
//     activity of its own signal. Per channel it reports the decision bit
//     stream with its mode (the data for the radio), the decimated amplitude
//     and the DC level. The thresholds and the initial DC level are shared
//     configuration inputs of the array.
// (B) Conventional recorder: 8 channels of 10-bit SAR logic and the 8:1
//     serializer (recorder8) on its own clock clk_b.
//
// The analog front-ends, the radio and the board-level FPGA/microcontroller
// are outside this top; their signals are the ports. The two parts share only
// the reset. The channel count of part A is not fixed by the description;
// 8, as in part B, is this design's choice.
module eeg_implant_top
  import eeg_pkg::*;
#(
  parameter int unsigned NCH_A = 8,
  parameter int unsigned NCH_B = 8,
  parameter int unsigned ADC_N = 10
) (
  input  logic                            rst_n,
  // ---- A: activity-adaptive channels, reference-clock domain ----
  input  logic                            ref_clk,
  input  logic [NCH_A-1:0]                dmod,
  input  logic [AMP_W-1:0]                dc_init,
  input  logic [VTH_W-1:0]                vth_low,
  input  logic [VTH_W-1:0]                vth_high,
  output logic [NCH_A-1:0]                dm_clk,
  output logic [NCH_A-1:0]                dm_clk_q,
  output logic [NCH_A-1:0]                pump_up,
  output logic [NCH_A-1:0]                pump_dn,
  output samp_mode_e [NCH_A-1:0]          mode,
  output logic [NCH_A-1:0]                samp_en,
  output logic [NCH_A-1:0]                tx_bit,
  output logic [NCH_A-1:0]                tx_valid,
  output logic [NCH_A-1:0][AMP_W-1:0]     amp_dec,
  output logic [NCH_A-1:0]                dec_valid,
  output logic [NCH_A-1:0][AMP_W-1:0]     dc,
  // ---- B: conventional SAR recorder, clk_b = 8x step rate ----
  input  logic                            clk_b,
  input  logic                            run_b,
  input  logic [NCH_B-1:0]                comp_b,
  output logic [NCH_B-1:0]                track_b,
  output logic [NCH_B-1:0][ADC_N-1:0]     dac_ctrl_b,
  output logic                            ser_out_b,
  output logic [$clog2(NCH_B)-1:0]        slot_b,
  output logic                            frame_end_b,
  output logic                            bit_valid_b,
  output logic                            bit_msb_b,
  output logic [NCH_B-1:0][ADC_N-1:0]     data_b,
  output logic                            done_b
);

  for (genvar c = 0; c < NCH_A; c++) begin : g_a
    logic signed [AMP_W-1:0] amp_c, amp_dec_c;
    logic [3:0]              th_cross_c;

    adaptive_channel #(.W(AMP_W), .VW(VTH_W)) u_ch (
      .ref_clk, .rst_n, .dmod(dmod[c]), .dc_init, .vth_low, .vth_high,
      .dm_clk(dm_clk[c]), .dm_clk_q(dm_clk_q[c]),
      .pump_up(pump_up[c]), .pump_dn(pump_dn[c]),
      .mode(mode[c]), .samp_en(samp_en[c]),
      .tx_bit(tx_bit[c]), .tx_valid(tx_valid[c]),
      .amp(amp_c), .amp_dec(amp_dec_c), .dec_valid(dec_valid[c]),
      .dc(dc[c]), .th_cross(th_cross_c)
    );
    assign amp_dec[c] = amp_dec_c;
  end

  recorder8 #(.NCH(NCH_B), .N(ADC_N)) u_rec (
    .clk(clk_b), .rst_n, .run(run_b), .comp(comp_b),
    .track(track_b), .dac_ctrl(dac_ctrl_b),
    .ser_out(ser_out_b), .slot(slot_b), .frame_end(frame_end_b),
    .bit_valid(bit_valid_b), .bit_msb(bit_msb_b),
    .data(data_b), .done(done_b)
  );

endmodule

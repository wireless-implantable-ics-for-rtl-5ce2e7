// Digital part of the conventional multi-channel EEG recorder chip.
//
// Each of the NCH channels has an amplifier and a 10-bit SAR ADC whose
// analog parts (track-and-hold, binary-weighted capacitive DAC, strong-arm
// comparator) are outside this module; here are their SAR logic blocks and
// the NCH:1 parallel-to-serial multiplexer that puts all channels on one
// wire for the radio.
//
// Everything runs on one clock at NCH times the ADC step rate. The
// serializer's frame_end is the step enable of all SAR blocks, so a SAR
// decision bit is held for exactly one serializer frame and every frame
// carries one decision of each channel (channel 0 first). bit_valid tells
// the receiver which frames hold ADC bits (10 of every 11 frames: the
// eleventh is the track phase); bit_msb marks the frame with the MSB. The
// parallel words are also available on data with done.
//
// Channel count, resolution and the 8:1 multiplexer follow the design
// description; driving all SAR blocks from one shared step enable and the
// framing signals are this design's choices.
module recorder8 #(
  parameter int unsigned NCH = 8,
  parameter int unsigned N   = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   run,
  input  logic [NCH-1:0]         comp,
  output logic [NCH-1:0]         track,
  output logic [NCH-1:0][N-1:0]  dac_ctrl,
  output logic                   ser_out,
  output logic [$clog2(NCH)-1:0] slot,
  output logic                   frame_end,
  output logic                   bit_valid,
  output logic                   bit_msb,
  output logic [NCH-1:0][N-1:0]  data,
  output logic                   done
);

  logic [NCH-1:0] ser_bit, ser_valid, ch_done;
  logic [$clog2(N+1)-1:0] bit_cnt;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    sar_logic #(.N(N)) u_sar (
      .clk, .rst_n, .en(frame_end), .run, .comp(comp[c]),
      .track(track[c]), .dac_ctrl(dac_ctrl[c]),
      .ser_bit(ser_bit[c]), .ser_valid(ser_valid[c]),
      .data(data[c]), .done(ch_done[c])
    );
  end

  ch_serializer #(.NCH(NCH)) u_ser (
    .clk, .rst_n, .din(ser_bit), .ser_out, .slot, .frame_end
  );

  // All SAR blocks step together; channel 0 provides the framing.
  assign bit_valid = ser_valid[0];
  assign done      = ch_done[0];

  // Count decision bits within a conversion to mark the MSB frame.
  always_ff @(posedge clk) begin
    if (!rst_n)                                    bit_cnt <= '0;
    else if (frame_end && ser_valid[0] && ch_done[0]) bit_cnt <= '0;
    else if (frame_end && ser_valid[0])            bit_cnt <= bit_cnt + 1'b1;
    else if (frame_end)                            bit_cnt <= '0;
  end
  assign bit_msb = ser_valid[0] && (bit_cnt == '0);

endmodule

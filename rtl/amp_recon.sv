// Amplitude reconstruction (integration + decimation) of the delta-modulated
// bit stream.
//
// The modulator feedback moves its integrating capacitor by one charge-pump
// current for every reference-clock cycle the pump is on, up for a 0
// decision and down for a 1. This block integrates the same thing
// digitally: on every cycle with en high, dbit = 1 increments the W-bit
// up-counter n_ones and dbit = 0 increments n_zeros. The subtractor output
// amp = n_ones - n_zeros, in two's complement, is then an exact replica of
// the analog prediction of the differential input, in units of one
// pump-cycle step. A decision held for a long (idle) sampling period is
// therefore counted many times, which is what makes the coarse low-rate
// decisions and the fine high-rate decisions add up on one scale.
// Both counters wrap modulo 2^W; the difference stays exact as long as the
// amplitude stays inside the signed W-bit range.
//
// Decimation: amp is latched into amp_dec once every DECIM clock cycles
// (dec_valid pulses for one cycle). With DECIM = 128 this is the 256 S/s
// Nyquist-rate frame, the same in every sampling mode.
//
// Two counters, a subtractor, W = 11 and two's complement follow the design
// description. Synchronous counters with an enable (instead of counters
// clocked by the bit stream), counting per pump cycle, the active-low
// synchronous reset and the decimation register are this design's choices.
//
// Timing: the counters update on the clock edge of each en cycle; amp is
// combinational from them.
module amp_recon #(
  parameter int unsigned W     = 11,
  parameter int unsigned DECIM = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,        // integrate this cycle
  input  logic                dbit,      // 1: count a one, 0: count a zero
  output logic [W-1:0]        n_ones,
  output logic [W-1:0]        n_zeros,
  output logic signed [W-1:0] amp,       // n_ones - n_zeros
  output logic signed [W-1:0] amp_dec,   // amp latched once per frame
  output logic                dec_valid
);

  localparam int unsigned DW = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic [DW-1:0] dec_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_ones  <= '0;
      n_zeros <= '0;
    end else if (en) begin
      if (dbit) n_ones  <= n_ones + 1'b1;
      else      n_zeros <= n_zeros + 1'b1;
    end
  end

  assign amp = signed'(n_ones - n_zeros);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dec_cnt   <= '0;
      amp_dec   <= '0;
      dec_valid <= 1'b0;
    end else begin
      dec_valid <= 1'b0;
      if (dec_cnt == DW'(DECIM - 1)) begin
        dec_cnt   <= '0;
        amp_dec   <= amp;
        dec_valid <= 1'b1;
      end else begin
        dec_cnt <= dec_cnt + 1'b1;
      end
    end
  end

endmodule

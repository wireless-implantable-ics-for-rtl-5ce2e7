// DC-level extraction: down-sampler and 7:1 weighted average.
//
// A modulo-DS counter (6 bits for the default DS = 40), advanced by the
// sample enable en, picks one amplitude sample every DS enabled cycles. In
// the recording channel en is the modulator's decision strobe, so the DC
// level is sampled every 40 modulator clocks: every 5120 reference cycles
// (156 ms) when idle and every 40 (1.2 ms) at the full rate. On that cycle
// the stored DC level is replaced by (D + DC + 2*DC + 4*DC) / 8, i.e. (D + 7*DC) / 8, where the
// products by 2 and 4 are plain shifts and the division by 8 drops the three
// low bits (rounds toward minus infinity). This is a first-order low-pass
// filter that tracks the slow baseline of the signal and ignores short
// bursts.
//
// Interface: din is the W-bit amplitude; SIGNED selects whether din and dc
// are two's complement (as the amplitude reconstruction produces) or
// unsigned. en is a one-cycle clock enable; tie it high to count every clock
// cycle. dc_init is the programmable starting value, loaded while rst_n is
// low. dc_upd pulses on the cycle the new DC value appears.
//
// The averaging formula, the 40-cycle down-sampling, the shift-and-add
// structure and the programmable initial value follow the design
// description; counting the 40 cycles on the modulator clock (the clock of
// the bit stream the back-end integrates) rather than the faster reference
// clock is this design's reading. The sum needs W+3 bits to hold 8
// full-scale words, so the adders are W+3 = 14 bits wide (the drawing labels them 12 bit). The
// synchronous reset that loads dc_init is this design's choice.
//
// Timing: dc changes on the clock edge that ends the DS-th enabled cycle,
// using the din present in that cycle; it then holds for DS enabled cycles.
module dc_extract #(
  parameter int unsigned W      = 11,
  parameter int unsigned DS     = 40,
  parameter bit          SIGNED = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  input  logic [W-1:0] dc_init,
  output logic [W-1:0] dc,
  output logic         dc_upd
);

  localparam int unsigned CW = (DS > 1) ? $clog2(DS) : 1;
  localparam int unsigned SW = W + 3;

  logic [CW-1:0] ds_cnt;
  logic [SW-1:0] d_ext, dc_ext, sum;

  // Sign- or zero-extend to the adder width.
  assign d_ext  = SIGNED ? {{3{din[W-1]}}, din} : {3'b000, din};
  assign dc_ext = SIGNED ? {{3{dc[W-1]}},  dc}  : {3'b000, dc};

  // D + DC + 2*DC + 4*DC
  assign sum = d_ext + dc_ext + (dc_ext << 1) + (dc_ext << 2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ds_cnt <= '0;
      dc     <= dc_init;
      dc_upd <= 1'b0;
    end else begin
      dc_upd <= 1'b0;
      if (en) begin
        if (ds_cnt == CW'(DS - 1)) begin
          ds_cnt <= '0;
          dc     <= sum[W+2:3];   // divide by 8
          dc_upd <= 1'b1;
        end else begin
          ds_cnt <= ds_cnt + 1'b1;
        end
      end
    end
  end

endmodule

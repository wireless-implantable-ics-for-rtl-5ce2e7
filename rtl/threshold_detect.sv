// Two-level activity threshold detector.
//
// For each of the two programmable offsets (vth_low, vth_high) the block
// forms a positive threshold DC + VTH and a negative threshold DC - VTH.
// It then subtracts the amplitude from the positive threshold and the
// negative threshold from the amplitude; a negative result (sign bit set)
// means the amplitude is above the positive threshold or below the negative
// one. The two crossings of a level are ORed, so the flag is raised whatever
// the polarity of the excursion:
//   flag_mod  : |x - dc| beyond vth_low   (moderate activity)
//   flag_high : |x - dc| beyond vth_high  (high activity)
// th_cross = {high_above, high_below, mod_above, mod_below} are the four sign
// bits, the 4-bit deviation code that goes to the sampling-clock controller.
//
// The adders and subtractors are drawn 12 bits wide in the reference design,
// which is enough for signed data; here they are max(W,VW)+2 = 13 bits so that
// an unsigned DC plus the offset can never overflow either. SIGNED selects two's-complement or
// unsigned x and dc; the thresholds are unsigned. Equality with a threshold
// does not count as a crossing. The block is purely combinational.
module threshold_detect #(
  parameter int unsigned W      = 11,
  parameter int unsigned VW     = 10,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [W-1:0]  x,         // amplitude
  input  logic [W-1:0]  dc,        // extracted DC level
  input  logic [VW-1:0] vth_low,   // moderate-activity offset
  input  logic [VW-1:0] vth_high,  // high-activity offset
  output logic [3:0]    th_cross,
  output logic          flag_mod,
  output logic          flag_high
);

  localparam int unsigned TW = ((W > VW) ? W : VW) + 2;

  logic signed [TW-1:0] x_e, dc_e, tl_e, th_e;
  logic signed [TW-1:0] pos_l, neg_l, pos_h, neg_h;
  logic signed [TW-1:0] d_pos_l, d_neg_l, d_pos_h, d_neg_h;

  always_comb begin
    x_e  = SIGNED ? TW'(signed'(x))  : TW'(x);
    dc_e = SIGNED ? TW'(signed'(dc)) : TW'(dc);
    tl_e = TW'(vth_low);
    th_e = TW'(vth_high);

    pos_l = dc_e + tl_e;
    neg_l = dc_e - tl_e;
    pos_h = dc_e + th_e;
    neg_h = dc_e - th_e;

    d_pos_l = pos_l - x_e;   // negative: x above DC + VTH1
    d_neg_l = x_e - neg_l;   // negative: x below DC - VTH1
    d_pos_h = pos_h - x_e;
    d_neg_h = x_e - neg_h;

    th_cross = {d_pos_h[TW-1], d_neg_h[TW-1], d_pos_l[TW-1], d_neg_l[TW-1]};
  end

  assign flag_mod  = th_cross[1] | th_cross[0];
  assign flag_high = th_cross[3] | th_cross[2];

endmodule

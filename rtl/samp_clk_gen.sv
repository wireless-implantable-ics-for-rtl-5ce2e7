// Activity-dependent sampling-clock generator.
//
// A free-running counter of IDLE_LOG2 flip-flops (7 for the default) divides
// the reference clock. A selector driven by the two activity flags picks the
// delta-modulator clock:
//   high activity       -> reference clock, undivided  (~32.7 kHz)
//   moderate activity   -> counter bit MOD_LOG2-1  = /8  (~4 kHz)
//   no flag (idle)      -> counter bit IDLE_LOG2-1 = /128 (256 Hz)
// dm_clk is the 0-degree clock (the comparator slices on it) and dm_clk_q a
// copy lagging by a quarter period (used to sample). samp_en is a one-cycle
// strobe, in the reference-clock domain, on the last reference cycle of each
// modulator period; the digital back-end takes one modulator decision per
// strobe, so it needs no second clock domain.
//
// The mode register follows the flags only at samp_en, i.e. at the end of the
// current modulator period, as the step-by-step model of the algorithm does;
// after reset the channel starts idle. The three rates, the divide-by-8 and
// divide-by-128 taps and the selection by the two flags follow the design
// description. The strobe, the quadrature construction (XNOR of the two top
// counter bits of a tap) and the reset state are this design's choices. In
// high-activity mode no quarter-period copy of the undivided clock can be
// built from it, so dm_clk_q is then the inverted reference clock.
//
// dm_clk and dm_clk_q are multiplexed clocks meant for the analog modulator;
// a mode change at the counter wrap can shorten one of their pulses.
module samp_clk_gen
  import eeg_pkg::*;
#(
  parameter int unsigned MOD_LOG2  = 3,   // moderate rate = ref / 2^MOD_LOG2
  parameter int unsigned IDLE_LOG2 = 7    // idle rate     = ref / 2^IDLE_LOG2
) (
  input  logic       ref_clk,
  input  logic       rst_n,
  input  logic       flag_mod,
  input  logic       flag_high,
  output samp_mode_e mode,
  output logic       samp_en,
  output logic       dm_clk,
  output logic       dm_clk_q
);

  logic [IDLE_LOG2-1:0] cnt;
  samp_mode_e           next_mode;

  always_ff @(posedge ref_clk) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  always_comb begin
    if (flag_high)     next_mode = MODE_HIGH;
    else if (flag_mod) next_mode = MODE_MOD;
    else               next_mode = MODE_IDLE;
  end

  always_comb begin
    unique case (mode)
      MODE_HIGH: samp_en = 1'b1;
      MODE_MOD:  samp_en = &cnt[MOD_LOG2-1:0];
      default:   samp_en = &cnt;
    endcase
  end

  always_ff @(posedge ref_clk) begin
    if (!rst_n)       mode <= MODE_IDLE;
    else if (samp_en) mode <= next_mode;
  end

  always_comb begin
    unique case (mode)
      MODE_HIGH: begin
        dm_clk   = ref_clk;
        dm_clk_q = ~ref_clk;
      end
      MODE_MOD: begin
        dm_clk   = cnt[MOD_LOG2-1];
        dm_clk_q = ~(cnt[MOD_LOG2-1] ^ cnt[MOD_LOG2-2]);
      end
      default: begin
        dm_clk   = cnt[IDLE_LOG2-1];
        dm_clk_q = ~(cnt[IDLE_LOG2-1] ^ cnt[IDLE_LOG2-2]);
      end
    endcase
  end

endmodule

// Self-checking testbench for samp_clk_gen.
// Holds each combination of activity flags and checks: the decision strobe
// period (128 idle, 8 moderate, 1 high reference cycles), that the mode
// follows the flags at the first strobe after they change and not before,
// that dm_clk toggles at the selected divided rate with 50% duty, and that
// dm_clk_q lags dm_clk by a quarter period in the divided modes.
module tb_samp_clk_gen;
  import eeg_pkg::*;

  logic ref_clk = 0, rst_n = 0, flag_mod = 0, flag_high = 0;
  samp_mode_e mode;
  logic samp_en, dm_clk, dm_clk_q;
  int checks = 0, failures = 0;

  samp_clk_gen dut (.*);

  always #5 ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge ref_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Measure strobe spacing, dm_clk high/low time and q lag over n strobes.
  task automatic measure(input int period, input int n, input bit divided);
    int gap, hi, lo, lag;
    logic prev_clk, prev_q;
    // align to a strobe first: the first gap after a change is partial
    do begin @(posedge ref_clk); #1; end while (!samp_en);
    for (int k = 0; k < n; k++) begin
      gap = 0;
      do begin @(posedge ref_clk); #1; gap++; end while (!samp_en);
      check(gap == period, $sformatf("strobe period %0d", period));
    end
    if (divided) begin
      // sample dm_clk and dm_clk_q just after each reference edge
      hi = 0; lo = 0; lag = -1;
      prev_clk = dm_clk; prev_q = dm_clk_q;
      for (int c = 0; c < 2 * period; c++) begin
        @(posedge ref_clk); #1;
        if (dm_clk) hi++; else lo++;
        if (dm_clk && !prev_clk) lag = 0;
        else if (lag >= 0 && dm_clk_q && !prev_q) begin
          check(lag + 1 == period / 4, "quadrature lag");
          lag = -2;
        end else if (lag >= 0) lag++;
        prev_clk = dm_clk; prev_q = dm_clk_q;
      end
      check(hi == period && lo == period, "dm_clk 50% duty at divided rate");
    end else begin
      check(dm_clk == ref_clk, "undivided clock passed through");
    end
  endtask

  initial begin
    repeat (2) @(posedge ref_clk);
    @(negedge ref_clk) rst_n = 1;
    #1 check(mode == MODE_IDLE, "reset mode idle");
    measure(128, 3, 1);
    // moderate: must not change before the next strobe
    @(negedge ref_clk) flag_mod = 1;
    #1 check(mode == MODE_IDLE, "no change before strobe");
    do @(posedge ref_clk); while (!samp_en);
    #1 check(mode == MODE_MOD, "moderate after strobe");
    measure(8, 10, 1);
    @(negedge ref_clk) flag_high = 1;
    do @(posedge ref_clk); while (!samp_en);
    #1 check(mode == MODE_HIGH, "high after strobe");
    measure(1, 50, 0);
    @(negedge ref_clk) begin flag_high = 0; flag_mod = 0; end
    @(posedge ref_clk); #1;
    check(mode == MODE_IDLE, "high -> idle at once (strobe every cycle)");
    // high flag alone also selects the full rate
    do @(posedge ref_clk); while (!samp_en);
    @(negedge ref_clk) flag_high = 1;
    do @(posedge ref_clk); while (!samp_en);
    #1 check(mode == MODE_HIGH, "high flag without moderate flag");
    @(negedge ref_clk) begin flag_high = 0; flag_mod = 1; end
    @(posedge ref_clk); #1;
    check(mode == MODE_MOD, "high -> moderate");
    measure(8, 4, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

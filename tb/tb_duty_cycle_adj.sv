// Self-checking testbench for duty_cycle_adj.
// A small strobe generator in the testbench issues decisions at the period
// of a chosen mode. For each decision the testbench checks the pulse length
// (period >> DUTY_LOG2, at least 1 cycle), that it starts one cycle after
// the strobe and that its polarity follows the decision (1 -> pump_dn).
// Runs the default instance (full-period pulses) and one with DUTY_LOG2 = 2.
module tb_duty_cycle_adj;
  import eeg_pkg::*;

  logic clk = 0, rst_n = 0, samp_en = 0, dmod = 0;
  samp_mode_e mode = MODE_IDLE;
  logic up0, dn0, up2, dn2;
  int checks = 0, failures = 0;

  duty_cycle_adj dut0 (.clk, .rst_n, .samp_en, .dmod, .mode, .pump_up(up0), .pump_dn(dn0));
  duty_cycle_adj #(.DUTY_LOG2(2)) dut2 (.clk, .rst_n, .samp_en, .dmod, .mode, .pump_up(up2), .pump_dn(dn2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Issue n isolated decisions; count the pulse cycles that follow each.
  task automatic run(input samp_mode_e m, input int p, input int n);
    int on0, on2, w2;
    bit d;
    w2 = (p >> 2) > 0 ? (p >> 2) : 1;
    for (int k = 0; k < n; k++) begin
      d = 1'($urandom % 2);
      @(negedge clk) begin samp_en = 1; dmod = d; mode = m; end
      @(negedge clk) samp_en = 0;
      check(d ? dn0 : up0, "pulse starts the cycle after the strobe");
      on0 = 0; on2 = 0;
      for (int c = 0; c < p + 4; c++) begin
        if (up0 || dn0) on0++;
        if (up2 || dn2) on2++;
        check(d ? (!up0 && !up2) : (!dn0 && !dn2), "polarity follows decision");
        @(negedge clk);
      end
      check(on0 == p, $sformatf("full-period pulse of %0d", p));
      check(on2 == w2, $sformatf("shortened pulse of %0d", w2));
    end
  endtask

  // High mode: a decision every cycle, the pump follows one cycle later.
  task automatic run_high(input int n);
    bit d, dprev;
    mode = MODE_HIGH;
    for (int k = 0; k < n; k++) begin
      d = 1'($urandom % 2);
      @(negedge clk) begin samp_en = 1; dmod = d; end
      if (k > 0) check(dprev ? (dn0 && !up0) : (up0 && !dn0), "continuous pulses in high mode");
      dprev = d;
    end
    @(negedge clk) samp_en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // mode is set to the target mode before each strobe so that the
    // width uses the mode now in force
    run(MODE_IDLE, 128, 8);
    run(MODE_MOD, 8, 30);
    run(MODE_HIGH, 1, 10);
    run_high(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

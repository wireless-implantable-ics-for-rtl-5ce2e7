// Self-checking testbench for amp_recon.
// Drives random enable/bit patterns, keeps its own count of ones and zeros
// and checks both counters, the two's-complement difference (including
// wrap-around past 2^11), and that the decimated word appears exactly every
// 128 cycles and equals the running amplitude of that cycle.
module tb_amp_recon;
  localparam int W = 11;
  localparam int DECIM = 128;

  logic clk = 0, rst_n = 0, en = 0, dbit = 0;
  logic [W-1:0] n_ones, n_zeros;
  logic signed [W-1:0] amp, amp_dec;
  logic dec_valid;
  int checks = 0, failures = 0;
  int ones = 0, zeros = 0, cyc = 0, last_dec = -1, ndec = 0;
  logic signed [W-1:0] amp_prev;

  amp_recon #(.W(W), .DECIM(DECIM)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Decimation checks: every dec_valid carries the amplitude of the cycle before.
  always @(posedge clk) begin
    amp_prev <= amp;
    if (rst_n) cyc <= cyc + 1;
    if (rst_n && dec_valid) begin
      check(amp_dec == amp_prev, "amp_dec equals amplitude at frame end");
      if (last_dec >= 0) check(cyc - last_dec == DECIM, "decimation period");
      last_dec <= cyc;
      ndec++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // phase 1: random, phase 2: long run of ones to wrap the counter
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (i < 3000) begin
        en   = ($urandom % 4) != 0;
        dbit = ($urandom % 3) != 0;
      end else begin
        en = 1; dbit = 1;
      end
      @(posedge clk);
      if (en) begin
        if (dbit) ones++; else zeros++;
      end
      #1;
      check(n_ones == W'(ones), "ones counter");
      check(n_zeros == W'(zeros), "zeros counter");
      check(amp == W'(ones - zeros), "amplitude = ones - zeros");
    end
    check(ndec >= 40, "decimated outputs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

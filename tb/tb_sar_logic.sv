// Self-checking testbench for sar_logic.
// An ideal track-and-hold and comparator are modelled here: the input is
// held while track is high and comp = (held > DAC code), with the held
// value half an LSB above an integer. Each conversion must return that
// integer, its serial bits must come MSB first with ser_valid, and a
// conversion must take N+1 = 11 steps (1 track + 10 decisions). The step
// enable is randomly gapped to check that nothing moves without it.
module tb_sar_logic;
  localparam int N = 10;

  logic clk = 0, rst_n = 0, en = 0, run = 0, comp;
  logic track, ser_bit, ser_valid, done;
  logic [N-1:0] dac_ctrl, data;
  int checks = 0, failures = 0;
  real vin = 0.5, vheld = 0.5;
  int steps = 0, last_done = -1, nconv = 0, nbits = 0;
  logic [N-1:0] sbits, expect_q[$];

  sar_logic #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  assign comp = vheld > real'(dac_ctrl);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (en && track) begin
      vheld <= vin;
      expect_q.push_back(N'($rtoi(vin)));
    end
    if (rst_n && en) begin
      steps <= steps + 1;
      if (ser_valid) begin
        sbits = {sbits[N-2:0], ser_bit};
        nbits++;
      end
      if (done) begin
        logic [N-1:0] e;
        e = expect_q.pop_front();
        check(data == e, $sformatf("conversion result %0d vs %0d", data, e));
        check(sbits == data, "serial bits MSB first match the word");
        if (last_done >= 0) check(steps - last_done == N + 1, "11 steps per conversion");
        last_done <= steps;
        nconv++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run = 1;
    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      en = ($urandom % 3) != 0;
      if (track) vin = real'($urandom % 1024) + 0.5;
      if (i % 5000 == 0) vin = (i % 10000 == 0) ? 0.5 : 1023.5;
    end
    check(nconv > 1500, "conversions completed");
    check(nbits >= nconv * N, "ten serial bits per conversion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

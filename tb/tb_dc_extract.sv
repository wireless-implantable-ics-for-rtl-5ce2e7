// Self-checking testbench for dc_extract.
// Part 1 replays the worked example of the design description with
// unsigned data: DC 896, input 1026 -> 912, then input 1028 -> 926.
// Part 2 feeds random two's-complement data to a second instance and checks
// every update against (D + 7*DC) >> 3 computed here, and that updates come
// exactly every 40 cycles and the value holds in between.
// Part 3 runs a third instance with a random sample enable and checks it
// against a reference that counts only enabled cycles.
module tb_dc_extract;
  localparam int W = 11, DS = 40;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] din_u, din_s, dc_u, dc_s;
  logic [W-1:0] init_u = 11'd896, init_s;
  logic upd_u, upd_s;
  int checks = 0, failures = 0, cyc = 0, last_upd = -1, nupd = 0;
  int ref_dc;

  dc_extract #(.W(W), .DS(DS), .SIGNED(1'b0)) dut_u (
    .clk, .rst_n, .en(1'b1), .din(din_u), .dc_init(init_u), .dc(dc_u), .dc_upd(upd_u));
  dc_extract #(.W(W), .DS(DS), .SIGNED(1'b1)) dut_s (
    .clk, .rst_n, .en(1'b1), .din(din_s), .dc_init(init_s), .dc(dc_s), .dc_upd(upd_s));

  logic en_g = 0, upd_g;
  logic [W-1:0] dc_g;
  int ref_g = 0, cnt_g = 0;
  dc_extract #(.W(W), .DS(DS), .SIGNED(1'b1)) dut_g (
    .clk, .rst_n, .en(en_g), .din(din_s), .dc_init('0), .dc(dc_g), .dc_upd(upd_g));

  // Reference for the gated instance, checked every cycle after reset.
  always @(posedge clk) if (rst_n) begin
    #1;
    check(sext(dc_g) == ref_g, "gated instance follows enabled cycles only");
  end
  always @(posedge clk) if (rst_n && en_g) begin
    if (cnt_g == DS - 1) begin
      ref_g <= (sext(din_s) + 7 * ref_g) >>> 3;
      cnt_g <= 0;
    end else cnt_g <= cnt_g + 1;
  end
  always @(negedge clk) en_g <= ($urandom % 4) == 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sext(input logic [W-1:0] v);
    return int'(signed'(v));
  endfunction

  initial begin
    init_s = W'(-300);
    din_u  = 11'd1026;
    din_s  = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(dc_u == 11'd896, "initial value loaded");
    check(sext(dc_s) == -300, "signed initial value loaded");
    ref_dc = -300;
    // Example, first update after DS cycles.
    for (int c = 1; c <= DS; c++) begin
      @(posedge clk); #1;
      if (c < DS) check(dc_u == 11'd896 && !upd_u, "holds before update");
    end
    check(upd_u && dc_u == 11'd912, "example: (1026 + 7*896)/8 = 912");
    @(negedge clk) din_u = 11'd1028;
    for (int c = 1; c <= DS; c++) begin
      @(posedge clk); #1;
    end
    check(upd_u && dc_u == 11'd926, "example: (1028 + 7*912)/8 = 926");

    // Random signed data for the second instance (it has been running too:
    // resynchronise the reference at its next update).
    @(posedge upd_s); #1;
    ref_dc = sext(dc_s);
    for (int k = 0; k < 300; k++) begin
      @(negedge clk) din_s = W'(int'($urandom % 1600) - 800);
      for (int c = 1; c <= DS; c++) begin
        @(posedge clk); #1;
        if (c < DS) check(sext(dc_s) == ref_dc && !upd_s, "signed holds");
      end
      ref_dc = (sext(din_s) + 7 * ref_dc) >>> 3;
      check(upd_s, "update every 40 cycles");
      check(sext(dc_s) == ref_dc, "signed (D + 7 DC) / 8");
      nupd++;
    end
    check(nupd == 300, "update count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

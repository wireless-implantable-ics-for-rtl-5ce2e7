// Self-checking testbench for ch_serializer.
// Changes the eight channel bits once per frame (on frame_end, as the SAR
// logic does), deserialises ser_out using slot and checks that every frame
// returns the eight bits in channel order, that slot counts 0..7 and that
// frame_end comes every 8 cycles, i.e. the line runs at 8x the channel rate.
// Also replays the one-hot pattern of the description's example.
module tb_ch_serializer;
  localparam int NCH = 8;

  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] din = '0, rx, sent;
  logic ser_out, frame_end;
  logic [2:0] slot;
  int checks = 0, failures = 0, frames = 0, cyc = 0, last_fe = -1;

  ch_serializer #(.NCH(NCH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    check(int'(slot) == cyc % NCH, "slot counter");
    rx[slot] = ser_out;
    if (frame_end) begin
      check(rx == din, "frame carries all channel bits in order");
      if (last_fe >= 0) check(cyc - last_fe == NCH, "frame every 8 cycles");
      last_fe <= cyc;
      frames++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 1000; f++) begin
      // one-hot walking pattern first, then random
      din = (f < NCH) ? NCH'(1) << f : NCH'($urandom);
      repeat (NCH) @(negedge clk);
    end
    check(frames >= 999, "frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for recorder8: eight SAR channels and the 8:1 serializer.
// Each channel has a behavioural track-and-hold/DAC/comparator
// (sar_afe_model) whose input changes at random. A receiver written here
// deserialises ser_out with slot, bit_valid and bit_msb, rebuilds every
// channel's 10-bit words and compares them with the held inputs; the
// parallel data words are checked too. One conversion must take 11 frames
// of 8 cycles (88 clock cycles) and each frame must carry all channels.
module tb_recorder8;
  localparam int NCH = 8, N = 10;

  logic clk = 0, rst_n = 0, run = 0;
  logic [NCH-1:0] comp, track;
  logic [NCH-1:0][N-1:0] dac_ctrl, data;
  logic ser_out, frame_end, bit_valid, bit_msb, done;
  logic [2:0] slot;
  real vin[NCH];
  int checks = 0, failures = 0, cyc = 0, last_done = -1, nwords = 0;
  logic [N-1:0] expq[NCH][$];
  logic [N-1:0] word[NCH];
  int nb[NCH];

  recorder8 dut (.*);

  for (genvar c = 0; c < NCH; c++) begin : g_afe
    sar_afe_model afe (.clk, .en(frame_end), .track(track[c]), .vin(vin[c]),
                       .dac_ctrl(dac_ctrl[c]), .comp(comp[c]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int c = 0; c < NCH; c++)
      if (frame_end && track[c]) expq[c].push_back(N'($rtoi(vin[c])));
    // receiver
    if (bit_valid) begin
      if (bit_msb) begin
        check(nb[slot] == 0, "MSB marker at word start");
        nb[slot] = 0;
      end
      word[slot] = {word[slot][N-2:0], ser_out};
      nb[slot]++;
      if (nb[slot] == N) begin
        check(expq[slot].size() > 0, "word expected");
        if (expq[slot].size() > 0)
          check(word[slot] == expq[slot].pop_front(), $sformatf("serial word of channel %0d", slot));
        nb[slot] = 0;
        nwords++;
      end
    end
    if (done && frame_end) begin
      if (last_done >= 0) check(cyc - last_done == 11 * NCH, "88 cycles per conversion");
      for (int c = 0; c < NCH; c++) check(data[c] == word[c], "parallel word equals serial word");
      last_done <= cyc;
    end
  end

  initial begin
    for (int c = 0; c < NCH; c++) begin vin[c] = 0.5; nb[c] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) begin rst_n = 1; run = 1; end
    for (int i = 0; i < 100000; i++) begin
      @(negedge clk);
      if (i % 37 == 0)
        for (int c = 0; c < NCH; c++) vin[c] = real'($urandom % 1024) + 0.5;
      if (i == 50000) for (int c = 0; c < NCH; c++) vin[c] = (c % 2) ? 1023.5 : 0.25;
    end
    check(nwords > 8 * 1000, "words received on all channels");
    $display("words received: %0d", nwords);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

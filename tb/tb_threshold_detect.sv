// Self-checking testbench for threshold_detect.
// Random amplitude, DC level and two offsets, for the two's-complement and
// the unsigned instance; flags and the four crossing bits are checked
// against |x - dc| > vth computed with integers here. Values right at the
// thresholds are forced often.
module tb_threshold_detect;
  localparam int W = 11, VW = 10;

  logic [W-1:0] x, dc;
  logic [VW-1:0] vl, vh;
  logic [3:0] cs, cu;
  logic fms, fhs, fmu, fhu;
  int checks = 0, failures = 0;

  threshold_detect #(.W(W), .VW(VW), .SIGNED(1'b1)) dut_s (
    .x, .dc, .vth_low(vl), .vth_high(vh), .th_cross(cs), .flag_mod(fms), .flag_high(fhs));
  threshold_detect #(.W(W), .VW(VW), .SIGNED(1'b0)) dut_u (
    .x, .dc, .vth_low(vl), .vth_high(vh), .th_cross(cu), .flag_mod(fmu), .flag_high(fhu));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0h dc=%0h vl=%0d vh=%0d", what, x, dc, vl, vh);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs, ds, xu, du, r;
    for (int i = 0; i < 20000; i++) begin
      dc = W'($urandom);
      vl = VW'($urandom % 400);
      vh = VW'($urandom % 1024);
      r  = $urandom % 6;
      if (r == 0)      x = dc + W'(vl);
      else if (r == 1) x = dc - W'(vl);
      else if (r == 2) x = dc + W'(vl) + 1'b1;
      else if (r == 3) x = dc - W'(vh) - 1'b1;
      else             x = W'($urandom);
      #1;
      xs = int'(signed'(x)); ds = int'(signed'(dc));
      xu = int'(x);          du = int'(dc);
      check(cs[1] == (xs > ds + int'(vl)), "signed above low");
      check(cs[0] == (xs < ds - int'(vl)), "signed below low");
      check(cs[3] == (xs > ds + int'(vh)), "signed above high");
      check(cs[2] == (xs < ds - int'(vh)), "signed below high");
      check(fms == (cs[1] | cs[0]) && fhs == (cs[3] | cs[2]), "signed flags");
      check(cu[1] == (xu > du + int'(vl)), "unsigned above low");
      check(cu[0] == (xu < du - int'(vl)), "unsigned below low");
      check(cu[3] == (xu > du + int'(vh)), "unsigned above high");
      check(cu[2] == (xu < du - int'(vh)), "unsigned below high");
      check(fmu == (cu[1] | cu[0]) && fhu == (cu[3] | cu[2]), "unsigned flags");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

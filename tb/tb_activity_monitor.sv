// Self-checking testbench for activity_monitor (open loop).
// Drives the integrator with random pump cycles in biased phases (baseline,
// slow excursion, fast excursion) and checks against a reference model kept
// here: the amplitude, the DC level updated every 40 cycles of the
// down-sampling enable ds_en as (amp + 7*dc) >> 3, and the two activity flags |amp - dc| > vth.
// Counts how often each flag was raised; each must occur.
module tb_activity_monitor;
  localparam int W = 11;

  logic clk = 0, rst_n = 0, int_en = 0, int_bit = 0, ds_en = 0;
  logic [W-1:0] dc_init = '0, dc;
  logic [9:0] vth_low = 10'd150, vth_high = 10'd230;
  logic signed [W-1:0] amp, amp_dec;
  logic dec_valid, flag_mod, flag_high;
  logic [3:0] th_cross;
  int checks = 0, failures = 0;
  int r_amp = 0, r_dc = 0, r_cnt = 0, n_mod = 0, n_high = 0;

  activity_monitor dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t amp=%0d ref=%0d dc=%0d ref=%0d", what, $time, amp, r_amp, signed'(dc), r_dc);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ds_en) begin
      if (r_cnt == 39) begin
        r_dc  <= (r_amp + 7 * r_dc) >>> 3;
        r_cnt <= 0;
      end else r_cnt <= r_cnt + 1;
    end
    if (int_en) r_amp <= r_amp + (int_bit ? 1 : -1);
  end

  initial begin
    int bias;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 60000; i++) begin
      // phases of 1000 cycles: 0 flat, 1 slow rise, 2 flat, 3 fast fall,...
      case ((i / 1000) % 4)
        0, 2: bias = 50;
        1:    bias = 80;    // slope 0.6 per cycle
        default: bias = 5;  // slope -0.9
      endcase
      if ((i / 1000) % 8 >= 4) bias = 100 - bias;
      int_en  = 1;
      ds_en   = (i % 3) != 0;
      int_bit = ($urandom % 100) < bias;
      @(negedge clk);
      check(int'(amp) == r_amp, "amplitude");
      check(int'(signed'(dc)) == r_dc, "DC level");
      check(flag_mod == ((r_amp - r_dc) > 150 || (r_dc - r_amp) > 150), "moderate flag");
      check(flag_high == ((r_amp - r_dc) > 230 || (r_dc - r_amp) > 230), "high flag");
      if (flag_mod) n_mod++;
      if (flag_high) n_high++;
    end
    check(n_mod > 0, "moderate activity occurred");
    check(n_high > 0, "high activity occurred");
    $display("moderate flag cycles %0d, high flag cycles %0d", n_mod, n_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

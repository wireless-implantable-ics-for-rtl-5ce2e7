// Closed-loop testbench for adaptive_channel with a behavioural analog
// delta modulator (delta_afe_model).
//
// Stimulus, in pump-step units: idle baseline, a moderate event (triangle
// bursts of slope 0.6 step/cycle), idle, a high event (a +/-400 square wave, which the loop follows at its
// maximum slew of one step per cycle), idle.
// Checks:
//  * the reconstructed amplitude equals the analog prediction every cycle;
//  * at every decision the next mode is the one a reference model of the
//    thresholds (DC level recomputed here every 40 decisions) asks for;
//  * the decision spacing is the mode's period (128, 8 or 1 cycles);
//  * tx_bit/tx_valid repeat every decision, decimated words come every 128
//    cycles;
//  * the loop settles on each level of the square wave within one step
//    of the mode in force, and stays within one coarse step of the idle
//    baseline.
// Mechanisms counted, each must occur: idle, moderate and high mode,
// transitions up and down, and a data-rate reduction in idle.
module tb_adaptive_channel;
  import eeg_pkg::*;
  localparam int W = 11;
  localparam int VL = 150, VH = 250;
  localparam int T_END = 90000;

  logic ref_clk = 0, rst_n = 0, dmod;
  logic [W-1:0] dc_init = '0, dc;
  logic [9:0] vth_low = 10'(VL), vth_high = 10'(VH);
  logic dm_clk, dm_clk_q, pump_up, pump_dn, samp_en, tx_bit, tx_valid, dec_valid;
  samp_mode_e mode;
  logic signed [W-1:0] amp, amp_dec;
  logic [3:0] th_cross;
  int vin, pred;
  int checks = 0, failures = 0, t = 0;
  int r_dc = 0, r_cnt = 0, last_se = -1, last_dec = -1;
  int n_dec[3] = '{0, 0, 0}, n_cyc[3] = '{0, 0, 0};
  int n_up = 0, n_down = 0, max_err_high = 0;
  logic pend_tx = 0, pend_bit = 0;
  samp_mode_e exp_mode, prev_mode;
  bit exp_valid = 0;
  logic signed [W-1:0] amp_q;

  adaptive_channel dut (.*);
  delta_afe_model afe (.ref_clk, .rst_n, .vin, .pump_up, .pump_dn, .dmod, .pred);

  always #5 ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d (vin=%0d pred=%0d amp=%0d mode=%0d)", what, t, vin, pred, amp, mode);
    end
  endtask

  initial begin : watchdog
    repeat (T_END + 5000) @(posedge ref_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tri_wave(input int tt, input real slope, input int len);
    int p = tt % (2 * len);
    return $rtoi(slope * real'((p < len) ? p : 2 * len - p));
  endfunction

  function automatic int stimulus(input int tt);
    if (tt >= 20000 && tt < 32000) return tri_wave(tt - 20000, 0.6, 500);
    if (tt >= 52000 && tt < 64000) return (((tt - 52000) / 1500) % 2 == 0) ? 400 : -400;
    return int'($urandom % 5) - 2;
  endfunction

  function automatic int idx(input samp_mode_e m);
    return (m == MODE_HIGH) ? 2 : (m == MODE_MOD) ? 1 : 0;
  endfunction

  function automatic int period(input samp_mode_e m);
    return (m == MODE_HIGH) ? 1 : (m == MODE_MOD) ? 8 : 128;
  endfunction

  // Checks at each rising edge, on the values of the cycle that ends.
  always @(posedge ref_clk) if (rst_n) begin
    t <= t + 1;
    n_cyc[idx(mode)]++;
    check(int'(amp) == pred, "amplitude replica equals analog prediction");
    check(int'(signed'(dc)) == r_dc, "DC level");
    if (exp_valid) check(mode == exp_mode, "mode follows thresholds at the decision");
    exp_valid <= 1'b0;
    if (pend_tx) check(tx_valid && tx_bit == pend_bit, "tx bit after decision");
    else         check(!tx_valid, "no tx without decision");
    pend_tx  <= samp_en;
    pend_bit <= dmod;
    if (samp_en) begin
      int dev;
      dev = int'(amp) - r_dc;
      exp_mode  <= (dev > VH || -dev > VH) ? MODE_HIGH :
                   (dev > VL || -dev > VL) ? MODE_MOD : MODE_IDLE;
      exp_valid <= 1'b1;
      n_dec[idx(mode)]++;
      if (last_se >= 0 && prev_mode == mode)
        check(t - last_se == period(mode), "decision spacing equals mode period");
      last_se   <= t;
      prev_mode <= mode;
    end
    if (dec_valid) begin
      check(amp_dec == amp_q, "decimated word");
      if (last_dec >= 0) check(t - last_dec == 128, "decimation period");
      last_dec <= t;
    end
    amp_q <= amp;
    begin
      int e;
      e = (vin > pred) ? vin - pred : pred - vin;
      // end of each half period of the square wave: the loop has settled
      if (t >= 52000 && t < 64000 && (t - 52000) % 1500 == 1499) begin
        check(e <= period(mode) + 2, "loop settled on the square-wave level");
        if (e > max_err_high) max_err_high = e;
      end
      // idle baseline after the events: error bounded by the coarse step plus
      // the input noise and one pump cycle
      if (t >= 70000) check(e <= 128 + 5, "idle tracking within one coarse step");
    end
    if (samp_en) begin
      if (r_cnt == 39) begin r_dc <= (int'(amp) + 7 * r_dc) >>> 3; r_cnt <= 0; end
      else r_cnt <= r_cnt + 1;
    end
  end

  // Mode transitions.
  samp_mode_e m_q = MODE_IDLE;
  always @(posedge ref_clk) if (rst_n) begin
    if (idx(mode) > idx(m_q)) n_up++;
    if (idx(mode) < idx(m_q)) n_down++;
    m_q <= mode;
  end

  initial begin
    vin = 0;
    repeat (3) @(posedge ref_clk);
    @(negedge ref_clk) rst_n = 1;
    for (int i = 0; i < T_END; i++) begin
      @(negedge ref_clk) vin = stimulus(i);
    end
    $display("cycles idle/mod/high: %0d %0d %0d, decisions: %0d %0d %0d",
             n_cyc[0], n_cyc[1], n_cyc[2], n_dec[0], n_dec[1], n_dec[2]);
    $display("transitions up %0d down %0d, max settling error %0d, data-rate ratio %0.1f",
             n_up, n_down, max_err_high, real'(T_END) / real'(n_dec[0] + n_dec[1] + n_dec[2]));
    check(n_cyc[0] > 0, "idle mode occurred");
    check(n_cyc[1] > 0, "moderate mode occurred");
    check(n_cyc[2] > 0, "high mode occurred");
    check(n_up > 0 && n_down > 0, "mode switched up and down");
    
    check(n_dec[0] + n_dec[1] + n_dec[2] < T_END / 4, "decision rate reduced by adaptation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Workload testbench: data-rate reduction of one adaptive channel on a
// sparse EEG-like record.
//
// The record lasts 30 s of a 32.768 kHz reference clock (983 040 cycles). It
// is idle background for 93 % of the time and carries three events that add
// up to the other 7 %, the activity share reported for long clinical
// recordings. Background: a 2 Hz wander of +/-20 steps plus +/-3 steps of
// noise. Event: a burst of 3 Hz and 9 Hz components of 250 and 150 steps
// (peak slope about 0.43 step per cycle, inside the loop's slew at full rate).
// All values are in charge-pump steps, as in delta_afe_model.
//
// Checks:
//  * the reconstructed amplitude equals the analog prediction every cycle;
//  * each event leaves idle mode within 1/8 s of its start and reaches the
//    full rate, and the channel is back in idle mode 1/4 s after it ends;
//  * the share of idle time is at least 90 %;
//  * the decision count equals the cycles spent in each mode divided by that
//    mode's period (to within one decision per mode change);
//  * the measured reduction of decisions against a fixed full-rate recorder
//    is at least 10x; with 7 % at full rate and 93 % at 1/128 the ideal
//    figure is 1 / (0.07 + 0.93/128) = 12.9x.
module tb_activity_share;
  import eeg_pkg::*;
  localparam int W = 11;
  localparam int FREF = 32768;
  localparam int T_END = 30 * FREF;
  localparam int EV_LEN = (7 * T_END) / 300;       // three events, 7 % in all
  localparam int EV_START[3] = '{4 * FREF, 13 * FREF, 23 * FREF};
  localparam real PI = 3.14159265358979;

  logic ref_clk = 0, rst_n = 0, dmod;
  logic [W-1:0] dc_init = '0, dc;
  logic [9:0] vth_low = 10'd150, vth_high = 10'd230;
  logic dm_clk, dm_clk_q, pump_up, pump_dn, samp_en, tx_bit, tx_valid, dec_valid;
  samp_mode_e mode;
  logic signed [W-1:0] amp, amp_dec;
  logic [3:0] th_cross;
  int vin, pred;
  int checks = 0, failures = 0, t = 0;
  int n_cyc[3] = '{0, 0, 0}, n_dec = 0, n_switch = 0;
  int ev_left_idle[3] = '{-1, -1, -1};
  bit ev_high[3] = '{0, 0, 0};
  samp_mode_e m_q = MODE_IDLE;

  adaptive_channel dut (.*);
  delta_afe_model afe (.ref_clk, .rst_n, .vin, .pump_up, .pump_dn, .dmod, .pred);

  always #5 ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d (vin=%0d pred=%0d mode=%0d)", what, t, vin, pred, mode);
    end
  endtask

  initial begin : watchdog
    repeat (T_END + 10000) @(posedge ref_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int event_of(input int tt);
    for (int k = 0; k < 3; k++)
      if (tt >= EV_START[k] && tt < EV_START[k] + EV_LEN) return k;
    return -1;
  endfunction

  function automatic int stimulus(input int tt);
    real s, x;
    s = real'(tt) / real'(FREF);
    x = 20.0 * $sin(2.0 * PI * 2.0 * s) + real'(int'($urandom % 7) - 3);
    if (event_of(tt) >= 0) begin
      real u;
      u = real'(tt - EV_START[event_of(tt)]) / real'(FREF);
      x = x + 250.0 * $sin(2.0 * PI * 3.0 * u) + 150.0 * $sin(2.0 * PI * 9.0 * u);
    end
    return $rtoi(x);
  endfunction

  function automatic int idx(input samp_mode_e m);
    return (m == MODE_HIGH) ? 2 : (m == MODE_MOD) ? 1 : 0;
  endfunction

  always @(posedge ref_clk) if (rst_n) begin
    int k;
    t <= t + 1;
    n_cyc[idx(mode)]++;
    if (samp_en) n_dec++;
    if (mode != m_q) n_switch++;
    m_q <= mode;
    check(int'(amp) == pred, "amplitude replica equals analog prediction");
    k = event_of(t);
    if (k >= 0) begin
      if (mode != MODE_IDLE && ev_left_idle[k] < 0) ev_left_idle[k] = t - EV_START[k];
      if (mode == MODE_HIGH) ev_high[k] = 1'b1;
    end
    for (int j = 0; j < 3; j++)
      if (t == EV_START[j] + EV_LEN + FREF / 4) check(mode == MODE_IDLE, "back to idle after the event");
  end

  initial begin
    real ratio, idle_share;
    int expect_dec;
    vin = 0;
    repeat (3) @(posedge ref_clk);
    @(negedge ref_clk) rst_n = 1;
    for (int i = 0; i < T_END; i++) @(negedge ref_clk) vin = stimulus(i);
    ratio      = real'(T_END) / real'(n_dec);
    idle_share = real'(n_cyc[0]) / real'(T_END);
    expect_dec = n_cyc[2] + n_cyc[1] / 8 + n_cyc[0] / 128;
    $display("cycles idle/mod/high: %0d %0d %0d (idle %0.1f %%), decisions %0d, mode changes %0d",
             n_cyc[0], n_cyc[1], n_cyc[2], 100.0 * idle_share, n_dec, n_switch);
    $display("reaction to events (cycles): %0d %0d %0d, reduction %0.1fx",
             ev_left_idle[0], ev_left_idle[1], ev_left_idle[2], ratio);
    for (int j = 0; j < 3; j++) begin
      check(ev_left_idle[j] >= 0 && ev_left_idle[j] <= FREF / 8, "event leaves idle mode within 1/8 s");
      check(ev_high[j], "event reaches the full rate");
    end
    check(idle_share >= 0.90, "idle share at least 90 %");
    check(n_dec >= expect_dec - n_switch - 3 && n_dec <= expect_dec + n_switch + 3,
          "decisions match time spent per mode");
    check(ratio >= 10.0, "reduction at least 10x");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

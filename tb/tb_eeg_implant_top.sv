// End-to-end testbench of eeg_implant_top at its default size (8 adaptive
// channels, 8 SAR channels), with behavioural analog models.
//
// Part A: each adaptive channel closes its loop through a delta_afe_model.
// Channel c sees an idle baseline, a moderate event (triangle bursts,
// slope 0.6 step/cycle) and a high event (+/-400 square wave), shifted in
// time by c*3000 cycles so the channels adapt independently. Checked per
// channel: the decimated amplitude equals the analog prediction, the DC
// level equals a reference model, every decision sets the mode the
// thresholds ask for, and a decision comes with a tx bit. Counted: cycles
// and decisions in each mode per channel (each mode must occur on every
// channel) and the overall reduction of the decision rate.
// Part B: the SAR recorder converts random inputs on its own clock; its
// serial stream is deserialised and compared with the held inputs.
module tb_eeg_implant_top;
  import eeg_pkg::*;
  localparam int NA = 8, NB = 8, W = AMP_W;
  localparam int VL = 150, VH = 250;
  localparam int T_END = 80000;

  logic rst_n = 0, ref_clk = 0, clk_b = 0, run_b = 0;
  logic [NA-1:0] dmod, dm_clk, dm_clk_q, pump_up, pump_dn, samp_en, tx_bit, tx_valid, dec_valid;
  logic [W-1:0] dc_init = '0;
  logic [VTH_W-1:0] vth_low = VTH_W'(VL), vth_high = VTH_W'(VH);
  samp_mode_e [NA-1:0] mode;
  logic [NA-1:0][W-1:0] amp_dec, dc;
  logic [NB-1:0] comp_b, track_b;
  logic [NB-1:0][9:0] dac_ctrl_b, data_b;
  logic ser_out_b, frame_end_b, bit_valid_b, bit_msb_b, done_b;
  logic [2:0] slot_b;

  int vin[NA], pred[NA], pred_q[NA], r_dc[NA], r_cnt[NA];
  int n_cyc[NA][3], n_dec[NA][3];
  logic pend_tx[NA];
  samp_mode_e exp_mode[NA];
  bit exp_valid[NA];
  int checks = 0, failures = 0, t = 0;
  real vb[NB];
  logic [9:0] expq[NB][$];
  logic [9:0] word[NB];
  int nb[NB], nwords = 0;

  eeg_implant_top dut (.*);

  for (genvar c = 0; c < NA; c++) begin : g_afe
    delta_afe_model afe (.ref_clk, .rst_n, .vin(vin[c]), .pump_up(pump_up[c]),
                         .pump_dn(pump_dn[c]), .dmod(dmod[c]), .pred(pred[c]));
  end
  for (genvar c = 0; c < NB; c++) begin : g_sar
    sar_afe_model afe (.clk(clk_b), .en(frame_end_b), .track(track_b[c]), .vin(vb[c]),
                       .dac_ctrl(dac_ctrl_b[c]), .comp(comp_b[c]));
  end

  always #5 ref_clk = ~ref_clk;
  always #3 clk_b = ~clk_b;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, t);
    end
  endtask

  initial begin : watchdog
    repeat (T_END + 5000) @(posedge ref_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int stimulus(input int tt, input int c);
    int s0 = 10000 + 3000 * c, s1 = 40000 + 3000 * c, p;
    if (tt >= s0 && tt < s0 + 8000) begin
      p = (tt - s0) % 1000;
      return $rtoi(0.6 * real'((p < 500) ? p : 1000 - p));
    end
    if (tt >= s1 && tt < s1 + 9000) return (((tt - s1) / 1500) % 2 == 0) ? 400 : -400;
    return int'($urandom % 5) - 2;
  endfunction

  function automatic int idx(input samp_mode_e m);
    return (m == MODE_HIGH) ? 2 : (m == MODE_MOD) ? 1 : 0;
  endfunction

  // ---- part A checks ----
  always @(posedge ref_clk) if (rst_n) begin
    t <= t + 1;
    for (int c = 0; c < NA; c++) begin
      n_cyc[c][idx(mode[c])]++;
      check(int'(signed'(dc[c])) == r_dc[c], "DC level");
      if (exp_valid[c]) check(mode[c] == exp_mode[c], "mode follows thresholds");
      exp_valid[c] = 1'b0;
      check(tx_valid[c] == pend_tx[c], "tx bit after each decision");
      pend_tx[c] = samp_en[c];
      if (dec_valid[c]) check(int'(signed'(amp_dec[c])) == pred_q[c], "decimated amplitude equals prediction");
      if (samp_en[c]) begin
        int dev;
        dev = pred[c] - r_dc[c];   // amplitude of this cycle equals pred
        exp_mode[c]  = (dev > VH || -dev > VH) ? MODE_HIGH :
                       (dev > VL || -dev > VL) ? MODE_MOD : MODE_IDLE;
        exp_valid[c] = 1'b1;
        n_dec[c][idx(mode[c])]++;
      end
      if (samp_en[c]) begin
        if (r_cnt[c] == 39) begin
          r_dc[c]  = (pred[c] + 7 * r_dc[c]) >>> 3;
          r_cnt[c] = 0;
        end else r_cnt[c]++;
      end
      pred_q[c] = pred[c];
    end
  end

  // ---- part B receiver ----
  always @(posedge clk_b) if (rst_n) begin
    for (int c = 0; c < NB; c++)
      if (frame_end_b && track_b[c]) expq[c].push_back(10'($rtoi(vb[c])));
    if (bit_valid_b) begin
      if (bit_msb_b) nb[slot_b] = 0;
      word[slot_b] = {word[slot_b][8:0], ser_out_b};
      nb[slot_b]++;
      if (nb[slot_b] == 10) begin
        if (expq[slot_b].size() > 0)
          check(word[slot_b] == expq[slot_b].pop_front(), "SAR serial word");
        else check(1'b0, "SAR word expected");
        nb[slot_b] = 0;
        nwords++;
      end
    end
    if (done_b && frame_end_b)
      for (int c = 0; c < NB; c++) check(data_b[c] == word[c], "SAR parallel word");
  end

  initial begin
    int total_dec;
    for (int c = 0; c < NA; c++) begin
      vin[c] = 0; r_dc[c] = 0; pend_tx[c] = 0; exp_valid[c] = 0; pred_q[c] = 0;
      for (int m = 0; m < 3; m++) begin n_cyc[c][m] = 0; n_dec[c][m] = 0; end
    end
    for (int c = 0; c < NB; c++) begin vb[c] = 0.5; nb[c] = 0; end
    repeat (3) @(posedge ref_clk);
    @(negedge ref_clk) begin rst_n = 1; run_b = 1; end
    for (int i = 0; i < T_END; i++) begin
      @(negedge ref_clk);
      for (int c = 0; c < NA; c++) vin[c] = stimulus(i, c);
      if (i % 23 == 0) for (int c = 0; c < NB; c++) vb[c] = real'($urandom % 1024) + 0.5;
    end
    total_dec = 0;
    for (int c = 0; c < NA; c++) begin
      $display("ch%0d cycles idle/mod/high %0d/%0d/%0d decisions %0d/%0d/%0d", c,
               n_cyc[c][0], n_cyc[c][1], n_cyc[c][2], n_dec[c][0], n_dec[c][1], n_dec[c][2]);
      check(n_cyc[c][0] > 0 && n_cyc[c][1] > 0 && n_cyc[c][2] > 0, "every mode occurred on every channel");
      total_dec += n_dec[c][0] + n_dec[c][1] + n_dec[c][2];
    end
    $display("decision-rate reduction %0.1fx, SAR words %0d", real'(NA * T_END) / real'(total_dec), nwords);
    check(total_dec < NA * T_END / 4, "decision rate reduced");
    check(nwords > NB * 1000, "SAR words received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

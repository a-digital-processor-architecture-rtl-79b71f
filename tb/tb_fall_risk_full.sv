// Full-size testbench for fall_risk_top: every parameter at its default
// (512/128-sample EMG windows, 256-point FFT, 2^14 data-clock divider, i.e.
// 16384 system clocks per 500 Hz sample). Same checks as tb_fall_risk_top.
// The testbench follows the internal data clock, presents new samples while
// it is low, and plays 840 samples (1.68 s of signal):
//   EMG: quiet noise with contraction bursts; right gastrocnemius bursts
//        twice (re-arm), overlapping bursts on every agonist-antagonist pair.
//   EEG: on-bin tones at 3.9 Hz (BP), 9.8 Hz (mu), 21.5 Hz (beta); channel
//        c has a large BP tone if c[0], mu if c[1], beta if c[2], else a
//        small one, so its expected flags are {c[0], c[1], c[2]}.
// A model of the EMG windows predicts every trigger and co-contraction bit
// each sample. EEG analyses are checked by which channels report MRP ready
// (contralateral routing, Cz on both sides) and by their flags.
// Mechanisms counted (each must occur): trigger rise right/left, trigger
// re-arm, each co-contraction output, left-hemisphere, right-hemisphere and
// Cz analyses, MRP flag set, MRP flag clear, and an enable freeze during
// which the EMG powers must not change. Every analysis must report MRP ready
// within 1 ms of the data-clock edge of the sample that raised its trigger.
module tb_fall_risk_full;
  import fall_risk_pkg::*;

  localparam int GD = 512, LD = 128;
  localparam int NS = 840;

  logic clk = 0, rst_n = 0, enable = 1;
  logic clk500;
  logic signed [N_EMG-1:0][EMG_W-1:0]    emg_data;
  logic signed [N_EEG_IN-1:0][EEG_W-1:0] eeg_data;
  logic [N_EMG-1:0][POW_W-1:0]           emg_rest_thr;
  logic [N_EEG-1:0][POW_W-1:0]           bp_thr, mu_thr, beta_thr;
  logic [N_EEG-1:0] bp_flag, mu_flag, beta_flag, mrp_ready;
  logic [3:0]       cocontraction;
  logic [N_EEG-1:0][POW_W-1:0] bp_pow, mu_pow, beta_pow;
  logic [N_EMG-1:0] emg_trigger;

  fall_risk_top dut (
    .clk, .rst_n, .enable, .clk500_in(1'b0), .clk500,
    .emg_data, .eeg_data, .emg_rest_thr, .bp_thr, .mu_thr, .beta_thr,
    .bp_flag, .mu_flag, .beta_flag, .cocontraction, .emg_trigger, .mrp_ready,
    .bp_pow, .mu_pow, .beta_pow
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #(10 * 16000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int m_rise_r = 0, m_rise_l = 0, m_rearm = 0, m_freeze = 0;
  int m_cocon [4] = '{0, 0, 0, 0};
  int m_left = 0, m_right = 0, m_cz = 0, m_flag_set = 0, m_flag_clr = 0;
  int ready_cnt [N_EEG];
  int exp_ready [N_EEG];

  // Latency: MRP ready must follow the data-clock edge of the sample that
  // raised the trigger within 1 ms (8192 clocks).
  longint cyc = 0, t_edge = 0;
  logic   c500_d = 0;
  int     slow = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    c500_d <= clk500;
    if (clk500 && !c500_d) t_edge = cyc;
    for (int e = 0; e < int'(N_EEG); e++) if (mrp_ready[e]) begin
      if (cyc - t_edge >= 8192) slow++;
      ready_cnt[e]++;
      if (e == int'(EEG_T3) || e == int'(EEG_C3) || e == int'(EEG_P3)) m_left++;
      if (e == int'(EEG_T4) || e == int'(EEG_C4) || e == int'(EEG_P4)) m_right++;
      if (e == int'(EEG_CZ)) m_cz++;
    end
  end

  // ---- EMG model ----
  longint unsigned gq [N_EMG][$], lq [N_EMG][$];
  longint unsigned gs [N_EMG], ls [N_EMG];
  logic [N_EMG-1:0] mtrig;
  int rises_r0 = 0;

  function automatic bit burst(input int ch, input int n);
    unique case (ch)
      0: return (n >= 560 && n < 600) || (n >= 760 && n < 800);
      1: return (n >= 580 && n < 620);
      2, 3: return (n >= 600 && n < 650);
      4: return (n >= 620 && n < 660);
      5: return (n >= 630 && n < 670);
      6, 7: return (n >= 650 && n < 690);
      default: return 0;
    endcase
  endfunction

  real eamp [N_EEG_IN][3];

  initial begin
    logic [POW_W-1:0] gp_before;
    for (int m = 0; m < int'(N_EMG); m++) begin
      gs[m] = 0; ls[m] = 0; emg_rest_thr[m] = 64'd100000;
    end
    for (int e = 0; e < int'(N_EEG); e++) begin
      bp_thr[e] = 64'd10_000_000_000_000; mu_thr[e] = 64'd10_000_000_000_000;
      beta_thr[e] = 64'd10_000_000_000_000;
      ready_cnt[e] = 0; exp_ready[e] = 0;
    end
    for (int e = 0; e < int'(N_EEG_IN); e++) begin
      eamp[e][0] = e[0] ? 1.0e5 : 1.0e3;
      eamp[e][1] = e[1] ? 1.0e5 : 1.0e3;
      eamp[e][2] = e[2] ? 1.0e5 : 1.0e3;
    end
    emg_data = '0; eeg_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int n = 0; n < NS; n++) begin
      bit frozen;
      // present sample n while the data clock is low
      @(negedge clk500);
      #1;
      frozen = (n >= 200 && n < 205);
      if (n == 200) begin
        enable = 0;
        gp_before = dut.g_emg[0].u_emg.global_pow;
      end
      if (n == 205) begin
        checks++;
        if (dut.g_emg[0].u_emg.global_pow != gp_before) begin
          failures++; $display("EMG power changed while disabled");
        end else m_freeze++;
        enable = 1;
      end
      for (int m = 0; m < int'(N_EMG); m++) begin
        int amp, v;
        longint unsigned sq;
        amp = burst(m, n) ? 8000 : 50;
        v   = int'($urandom_range(0, 2 * amp)) - amp;
        emg_data[m] = 16'(v);
        if (!frozen) begin
          sq = longint'(v) * longint'(v);
          gq[m].push_back(sq); gs[m] += sq;
          if (gq[m].size() > GD) gs[m] -= gq[m].pop_front();
          lq[m].push_back(sq); ls[m] += sq;
          if (lq[m].size() > LD) ls[m] -= lq[m].pop_front();
          mtrig[m] = ((ls[m] >> 7) > (gs[m] >> 9)) && ((ls[m] >> 7) > emg_rest_thr[m]);
        end
      end
      for (int e = 0; e < int'(N_EEG_IN); e++) begin
        real v;
        v = eamp[e][0] * $sin(6.283185307179586 * 2.0 * n / 256.0)
          + eamp[e][1] * $sin(6.283185307179586 * 5.0 * n / 256.0)
          + eamp[e][2] * $cos(6.283185307179586 * 11.0 * n / 256.0);
        eeg_data[e] = 24'($rtoi(v));
      end
      // wait for the refresh (well after the rising edge), then compare
      @(posedge clk500);
      repeat (200) @(posedge clk);
      #1;
      if (!frozen) begin
        checks += 2;
        if (emg_trigger != mtrig) begin
          failures++;
          if (failures < 10) $display("sample %0d: triggers %b expected %b", n, emg_trigger, mtrig);
        end
        if (cocontraction != {mtrig[7] & mtrig[6], mtrig[5] & mtrig[4], mtrig[3] & mtrig[2], mtrig[1] & mtrig[0]}) begin
          failures++;
          $display("sample %0d: cocontraction %b", n, cocontraction);
        end
        // an analysis starts on each rise of its routed trigger
        if (mtrig[EMG_R_GASTRO] && !mtrig_d[EMG_R_GASTRO]) begin
          exp_ready[EEG_T3]++; exp_ready[EEG_C3]++; exp_ready[EEG_P3]++;
        end
        if (mtrig[EMG_L_GASTRO] && !mtrig_d[EMG_L_GASTRO]) begin
          exp_ready[EEG_T4]++; exp_ready[EEG_C4]++; exp_ready[EEG_P4]++;
        end
        if ((mtrig[EMG_R_GASTRO] | mtrig[EMG_L_GASTRO]) && !(mtrig_d[EMG_R_GASTRO] | mtrig_d[EMG_L_GASTRO]))
          exp_ready[EEG_CZ]++;
        if (mtrig[EMG_R_GASTRO] && !mtrig_d[EMG_R_GASTRO]) begin
          m_rise_r++;
          if (m_rise_r > 1) m_rearm++;
        end
        if (mtrig[EMG_L_GASTRO] && !mtrig_d[EMG_L_GASTRO]) m_rise_l++;
        for (int c = 0; c < 4; c++) if (cocontraction[c]) m_cocon[c]++;
        mtrig_d = mtrig;
      end
    end

    // ---- final checks ----
    for (int e = 0; e < int'(N_EEG); e++) begin
      checks += 2;
      if (ready_cnt[e] != exp_ready[e]) begin
        failures++;
        $display("EEG channel %0d: %0d analyses, expected %0d", e, ready_cnt[e], exp_ready[e]);
      end
      if (ready_cnt[e] > 0) begin
        if ({bp_flag[e], mu_flag[e], beta_flag[e]} != {e[0], e[1], e[2]}) begin
          failures++;
          $display("EEG channel %0d: flags %b expected %b", e, {bp_flag[e], mu_flag[e], beta_flag[e]},
                   {e[0], e[1], e[2]});
        end
        m_flag_set += int'(bp_flag[e]) + int'(mu_flag[e]) + int'(beta_flag[e]);
        m_flag_clr += 3 - (int'(bp_flag[e]) + int'(mu_flag[e]) + int'(beta_flag[e]));
      end
    end
    $display("mechanisms: rise_r=%0d rise_l=%0d rearm=%0d freeze=%0d cocon=%0d/%0d/%0d/%0d left=%0d right=%0d cz=%0d flag_set=%0d flag_clear=%0d",
             m_rise_r, m_rise_l, m_rearm, m_freeze, m_cocon[0], m_cocon[1], m_cocon[2], m_cocon[3],
             m_left, m_right, m_cz, m_flag_set, m_flag_clr);
    checks += 14;
    if (slow != 0) begin failures++; $display("%0d analyses took 1 ms or more", slow); end
    if (m_rise_r == 0)   begin failures++; $display("no right trigger rise"); end
    if (m_rise_l == 0)   begin failures++; $display("no left trigger rise"); end
    if (m_rearm == 0)    begin failures++; $display("no trigger re-arm"); end
    if (m_freeze == 0)   begin failures++; $display("no enable freeze"); end
    for (int c = 0; c < 4; c++)
      if (m_cocon[c] == 0) begin failures++; $display("co-contraction %0d never set", c); end
    if (m_left == 0)     begin failures++; $display("no left-hemisphere analysis"); end
    if (m_right == 0)    begin failures++; $display("no right-hemisphere analysis"); end
    if (m_cz == 0)       begin failures++; $display("no Cz analysis"); end
    if (m_flag_set == 0) begin failures++; $display("no MRP flag set"); end
    if (m_flag_clr == 0) begin failures++; $display("no MRP flag clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N_EMG-1:0] mtrig_d = '0;   // model triggers of the previous sample
endmodule

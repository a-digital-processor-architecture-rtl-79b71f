// End-to-end testbench for fall_risk_test_system (reduced sizes for speed):
// replay of stored recordings into the processor and recording of its outputs.
//
// Parameters: 1024-word replay and result stores, EMG windows 64/16, a 2^12
// data-clock divider (4096 clocks per sample); the FFT stays at 256 points.
// A 768-sample segment is loaded into all 16 replay RAMs through the load
// port (EMG: noise with contraction bursts; EEG: on-bin tones at 3.9, 9.8 and
// 21.5 Hz whose period divides the segment, so it repeats seamlessly; channel
// c has a large BP tone if c[0], mu if c[1], beta if c[2]). Then 800 data-clock
// periods are replayed, which wraps the segment once, with a five-period
// enable freeze after period 200.
// Checks:
//   replay    on every sample the processor's inputs equal the loaded word
//             of the current replay position;
//   flags     every flag-store word equals a model of the EMG windows
//             (triggers and co-contractions) and the expected MRP flags;
//   analyses  each EEG channel analyses once per rise of its routed trigger
//             (contralateral, Cz from both sides), each within 1 ms of the
//             data-clock edge of the triggering sample;
//   powers    the power store holds one record per analysis of the monitored
//             channel (C3), each within 2% of the on-bin tone powers
//             (N/2 * amplitude)^2 of its bands;
//   freeze    while disabled, no EMG power changes and nothing is stored;
//   restart   rewinds the replay and empties both stores.
// Mechanisms counted (each must occur): replay wrap, restart, freeze, power
// record, trigger rise right/left, re-arm, each co-contraction output,
// left-hemisphere, right-hemisphere and Cz analyses, MRP flag set and clear.
module tb_fall_risk_test_system;
  import fall_risk_pkg::*;

  localparam int GD = 64, LD = 16, L = 768, NP = 800, DEPTH = 1024;
  localparam int RAW = $clog2(DEPTH), SAW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0, enable = 0;
  logic load_we = 0, restart = 0;
  logic [3:0]  load_chan = '0;
  logic [RAW-1:0] load_addr = '0, replay_last = RAW'(L - 1);
  logic [EEG_W-1:0] load_data = '0;
  logic        replay_wrapped, clk500;
  logic [N_EMG-1:0][POW_W-1:0] emg_rest_thr;
  logic [N_EEG-1:0][POW_W-1:0] bp_thr, mu_thr, beta_thr;
  logic [2:0]  mon_chan = 3'(EEG_C3);
  logic [SAW-1:0] flag_rd_addr = '0, pow_rd_addr = '0;
  logic [32:0] flag_rd_data;
  logic [191:0] pow_rd_data;
  logic [SAW:0] flag_count, pow_count;
  logic [N_EEG-1:0] bp_flag, mu_flag, beta_flag, mrp_ready;
  logic [3:0]       cocontraction;
  logic [N_EMG-1:0] emg_trigger;

  fall_risk_test_system #(
    .REPLAY_DEPTH(DEPTH), .RESULT_DEPTH(DEPTH), .GLOBAL_DEPTH(GD), .LOCAL_DEPTH(LD),
    .DATA_CLK_DIV_LOG2(12)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #(10 * 4500000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- recorded segment ----
  logic signed [EMG_W-1:0] emg_mem [N_EMG][L];
  logic signed [EEG_W-1:0] eeg_mem [N_EEG_IN][L];
  real eamp [N_EEG_IN][3];

  function automatic bit burst(input int ch, input int n);
    unique case (ch)
      0: return (n >= 300 && n < 340) || (n >= 500 && n < 540);
      1: return (n >= 320 && n < 360);
      2, 3: return (n >= 600 && n < 650);
      4: return (n >= 400 && n < 440);
      5: return (n >= 410 && n < 450);
      6, 7: return (n >= 700 && n < 750);
      default: return 0;
    endcase
  endfunction

  // ---- EMG window model: expected flag word of every replayed period ----
  longint unsigned gq [N_EMG][$], lq [N_EMG][$];
  longint unsigned gs [N_EMG], ls [N_EMG];
  logic [N_EMG-1:0] mtrig, mtrig_d = '0;
  logic [N_EEG-1:0] analysed = '0;
  logic [32:0] exp_word [NP];
  int exp_ready [N_EEG];
  int ready_cnt [N_EEG];

  initial begin
    for (int m = 0; m < int'(N_EMG); m++) begin
      gs[m] = 0; ls[m] = 0; emg_rest_thr[m] = 64'd100000;
      for (int n = 0; n < L; n++) begin
        int amp;
        amp = burst(m, n) ? 8000 : 50;
        emg_mem[m][n] = 16'(int'($urandom_range(0, 2 * amp)) - amp);
      end
    end
    for (int e = 0; e < int'(N_EEG); e++) begin
      bp_thr[e] = 64'd10_000_000_000_000; mu_thr[e] = 64'd10_000_000_000_000;
      beta_thr[e] = 64'd10_000_000_000_000;
      exp_ready[e] = 0; ready_cnt[e] = 0;
    end
    for (int e = 0; e < int'(N_EEG_IN); e++) begin
      eamp[e][0] = e[0] ? 1.0e5 : 1.0e3;
      eamp[e][1] = e[1] ? 1.0e5 : 1.0e3;
      eamp[e][2] = e[2] ? 1.0e5 : 1.0e3;
      for (int n = 0; n < L; n++) begin
        real v;
        v = eamp[e][0] * $sin(6.283185307179586 * 2.0 * n / 256.0)
          + eamp[e][1] * $sin(6.283185307179586 * 5.0 * n / 256.0)
          + eamp[e][2] * $cos(6.283185307179586 * 11.0 * n / 256.0);
        eeg_mem[e][n] = 24'($rtoi(v));
      end
    end
    for (int p = 0; p < NP; p++) begin
      int k;
      logic [N_EEG-1:0] bpf, muf, betaf;
      k = p % L;
      for (int m = 0; m < int'(N_EMG); m++) begin
        longint unsigned sq;
        sq = longint'(emg_mem[m][k]) * longint'(emg_mem[m][k]);
        gq[m].push_back(sq); gs[m] += sq;
        if (gq[m].size() > GD) gs[m] -= gq[m].pop_front();
        lq[m].push_back(sq); ls[m] += sq;
        if (lq[m].size() > LD) ls[m] -= lq[m].pop_front();
        mtrig[m] = ((ls[m] >> $clog2(LD)) > (gs[m] >> $clog2(GD))) && ((ls[m] >> $clog2(LD)) > emg_rest_thr[m]);
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
      for (int e = 0; e < int'(N_EEG); e++) begin
        analysed[e] = analysed[e] || (exp_ready[e] > 0);
        bpf[e]   = analysed[e] & e[0];
        muf[e]   = analysed[e] & e[1];
        betaf[e] = analysed[e] & e[2];
      end
      exp_word[p] = {betaf, muf, bpf,
                     mtrig[7] & mtrig[6], mtrig[5] & mtrig[4], mtrig[3] & mtrig[2], mtrig[1] & mtrig[0],
                     mtrig};
      mtrig_d = mtrig;
    end
  end

  // ---- replay check: inputs seen by the processor on each sample ----
  int pos = 0, n_replay_ok = 0;
  always @(posedge clk500) if (enable) begin
    bit ok;
    repeat (3) @(posedge clk);
    ok = 1;
    for (int m = 0; m < int'(N_EMG); m++)
      if (dut.emg_data[m] !== emg_mem[m][pos % L]) ok = 0;
    for (int e = 0; e < int'(N_EEG_IN); e++)
      if (dut.eeg_data[e] !== eeg_mem[e][pos % L]) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("period %0d: replayed inputs differ from word %0d", pos, pos % L);
    end else n_replay_ok++;
    pos++;
  end

  // ---- analyses: count per channel, each within 1 ms of its data-clock edge ----
  longint cyc = 0, t_edge = 0;
  logic   c500_d = 0;
  int     slow = 0, m_left = 0, m_right = 0, m_cz = 0;
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

  int n_wrap = 0, n_records = 0, m_freeze = 0, m_restart = 0;
  int m_rise_r = 0, m_rise_l = 0, m_rearm = 0, m_flag_set = 0, m_flag_clr = 0;
  int m_cocon [4] = '{0, 0, 0, 0};

  initial begin
    logic [POW_W-1:0] gp_before;
    logic [32:0] w, w_d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // load the segment while the processor is disabled
    for (int c = 0; c < 16; c++)
      for (int n = 0; n < L; n++) begin
        @(negedge clk);
        load_we = 1; load_chan = 4'(c); load_addr = RAW'(n);
        load_data = (c < 8) ? EEG_W'(emg_mem[c][n]) : eeg_mem[c - 8][n];
      end
    @(negedge clk) load_we = 0;
    // start right after a data-clock fall, replay NP periods
    @(negedge clk500);
    @(negedge clk) enable = 1;
    for (int p = 0; p < NP; p++) begin
      @(negedge clk500);
      if (replay_wrapped && n_wrap == 0) n_wrap = 1;
      if (p == 199) begin
        // freeze for five periods: no processing, no replay, no stored word
        repeat (2) @(negedge clk);
        enable = 0;
        gp_before = dut.u_top.g_emg[0].u_emg.global_pow;
        repeat (5) @(negedge clk500);
        checks++;
        if (dut.u_top.g_emg[0].u_emg.global_pow != gp_before || flag_count != (SAW+1)'(200)) begin
          failures++; $display("processing or storage went on while disabled");
        end else m_freeze++;
        @(negedge clk) enable = 1;
      end
    end
    repeat (2) @(negedge clk);
    enable = 0;
    repeat (4) @(posedge clk);

    // ---- flag store ----
    checks++;
    if (flag_count != (SAW+1)'(NP)) begin
      failures++; $display("flag store holds %0d words, expected %0d", flag_count, NP);
    end
    w_d = '0;
    for (int p = 0; p < NP; p++) begin
      @(negedge clk) flag_rd_addr = SAW'(p);
      @(posedge clk); #1;
      w = flag_rd_data;
      checks++;
      if (w !== exp_word[p]) begin
        failures++;
        if (failures < 10) $display("flag word %0d: %b expected %b", p, w, exp_word[p]);
      end
      if (w[EMG_R_GASTRO] && !w_d[EMG_R_GASTRO]) begin
        m_rise_r++;
        if (m_rise_r > 1) m_rearm++;
      end
      if (w[EMG_L_GASTRO] && !w_d[EMG_L_GASTRO]) m_rise_l++;
      for (int c = 0; c < 4; c++) if (w[8 + c]) m_cocon[c]++;
      w_d = w;
    end
    // MRP flags of the analysed channels in the last word
    for (int e = 0; e < int'(N_EEG); e++) if (ready_cnt[e] > 0) begin
      m_flag_set += int'(w[12 + e]) + int'(w[19 + e]) + int'(w[26 + e]);
      m_flag_clr += 3 - (int'(w[12 + e]) + int'(w[19 + e]) + int'(w[26 + e]));
    end
    // analyses per channel
    for (int e = 0; e < int'(N_EEG); e++) begin
      checks++;
      if (ready_cnt[e] != exp_ready[e]) begin
        failures++;
        $display("EEG channel %0d: %0d analyses, expected %0d", e, ready_cnt[e], exp_ready[e]);
      end
    end

    // ---- power store (monitored channel C3) ----
    checks++;
    if (int'(pow_count) != exp_ready[EEG_C3]) begin
      failures++; $display("power store holds %0d records, expected %0d", pow_count, exp_ready[EEG_C3]);
    end
    for (int r = 0; r < int'(pow_count); r++) begin
      @(negedge clk) pow_rd_addr = SAW'(r);
      @(posedge clk); #1;
      for (int b = 0; b < 3; b++) begin
        real got, want;
        got  = real'(pow_rd_data[64 * b +: 64]);
        want = (128.0 * eamp[EEG_C3][b]) * (128.0 * eamp[EEG_C3][b]);
        checks++;
        if (got < 0.98 * want || got > 1.02 * want) begin
          failures++;
          $display("record %0d band %0d: power %e expected %e", r, b, got, want);
        end
      end
      n_records++;
    end

    // ---- restart ----
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (flag_count != 0 || pow_count != 0 || replay_wrapped ||
        dut.emg_data[0] !== emg_mem[0][0] || dut.eeg_data[7] !== eeg_mem[7][0]) begin
      failures++; $display("restart did not rewind the replay and empty the stores");
    end else m_restart++;

    $display("mechanisms: replayed=%0d wrap=%0d restart=%0d freeze=%0d power_records=%0d rise_r=%0d rise_l=%0d rearm=%0d cocon=%0d/%0d/%0d/%0d left=%0d right=%0d cz=%0d flag_set=%0d flag_clear=%0d",
             n_replay_ok, n_wrap, m_restart, m_freeze, n_records, m_rise_r, m_rise_l, m_rearm,
             m_cocon[0], m_cocon[1], m_cocon[2], m_cocon[3], m_left, m_right, m_cz, m_flag_set, m_flag_clr);
    checks += 17;
    if (n_replay_ok < NP) begin failures++; $display("only %0d replayed samples checked", n_replay_ok); end
    if (n_wrap == 0)      begin failures++; $display("replay never wrapped"); end
    if (m_restart == 0)   begin failures++; $display("no restart"); end
    if (m_freeze == 0)    begin failures++; $display("no enable freeze"); end
    if (n_records == 0)   begin failures++; $display("no power record"); end
    if (slow != 0)        begin failures++; $display("%0d analyses took 1 ms or more", slow); end
    if (m_rise_r == 0)    begin failures++; $display("no right trigger rise"); end
    if (m_rise_l == 0)    begin failures++; $display("no left trigger rise"); end
    if (m_rearm == 0)     begin failures++; $display("no trigger re-arm"); end
    for (int c = 0; c < 4; c++)
      if (m_cocon[c] == 0) begin failures++; $display("co-contraction %0d never set", c); end
    if (m_left == 0)      begin failures++; $display("no left-hemisphere analysis"); end
    if (m_right == 0)     begin failures++; $display("no right-hemisphere analysis"); end
    if (m_cz == 0)        begin failures++; $display("no Cz analysis"); end
    if (m_flag_set == 0)  begin failures++; $display("no MRP flag set"); end
    if (m_flag_clr == 0)  begin failures++; $display("no MRP flag clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

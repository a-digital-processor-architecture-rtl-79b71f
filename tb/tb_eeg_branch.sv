// Testbench for eeg_branch at its defaults (256-point FFT, 24-bit samples).
//
// EEG samples (one per 3000-clock data period) are a mix of tones at
// 3.9 Hz (BP band), 9.8 Hz (mu) and 21.5 Hz (beta) whose amplitudes change
// between segments, plus noise. Three trigger rises start three analyses.
// For each, the testbench computes the DFT of the last 256 samples in double
// precision and the band powers over bins 1-3, 4-6 and 7-15, and checks:
//   - bp/mu/beta powers within 1e-4 relative (+64 absolute) of the model;
//   - the flags against thresholds set at 0.5x or 2x the model powers;
//   - mrp_ready once per analysis, within 0.13 ms (1065 clocks at
//     8.192 MHz) of the analysis start;
//   - no analysis while the trigger stays high.
module tb_eeg_branch;
  import fall_risk_pkg::*;

  logic               clk = 0, rst_n = 0, enable = 1, clk500 = 0, trigger = 0;
  logic signed [23:0] eeg_data = 0;
  logic [63:0]        bp_thr = 0, mu_thr = 0, beta_thr = 0;
  logic [63:0]        bp_pow, mu_pow, beta_pow;
  logic               bp_flag, mu_flag, beta_flag, mrp_ready, start, busy;
  int checks = 0, failures = 0, readies = 0, starts = 0;
  longint cyc = 0, t_start = 0, t_ready = 0;

  eeg_branch dut (
    .clk, .rst_n, .enable, .clk500, .eeg_data, .trigger,
    .bp_thr, .mu_thr, .beta_thr, .bp_pow, .mu_pow, .beta_pow,
    .bp_flag, .mu_flag, .beta_flag, .mrp_ready, .start, .busy
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (start) begin starts++; t_start = cyc; end
    if (mrp_ready) begin readies++; t_ready = cyc; end
  end

  initial begin
    #(10 * 4000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  hist [$];
  real pbp, pmu, pbeta;

  task automatic model();
    real br, bi, a;
    pbp = 0; pmu = 0; pbeta = 0;
    for (int k = 1; k <= 15; k++) begin
      br = 0; bi = 0;
      for (int n = 0; n < 256; n++) begin
        a  = 6.283185307179586 * real'((n * k) % 256) / 256.0;
        br += real'(hist[hist.size() - 256 + n]) * $cos(a);
        bi -= real'(hist[hist.size() - 256 + n]) * $sin(a);
      end
      if (k <= 3)      pbp   += br * br + bi * bi;
      else if (k <= 6) pmu   += br * br + bi * bi;
      else             pbeta += br * br + bi * bi;
    end
  endtask

  function automatic bit close(input logic [63:0] got, input real expv);
    real d;
    d = real'(got) - expv;
    if (d < 0) d = -d;
    return d <= 1.0e-4 * expv + 64.0;
  endfunction

  int seg = 0;
  task automatic sample(input int n);
    real a1, a2, a3, v;
    a1 = (seg == 0) ? 2.0e5 : (seg == 1) ? 2.0e4 : 1.0e5;
    a2 = (seg == 0) ? 1.0e4 : (seg == 1) ? 3.0e5 : 1.0e5;
    a3 = (seg == 0) ? 5.0e4 : (seg == 1) ? 1.0e4 : 2.0e5;
    v  = a1 * $sin(6.283185307179586 * 3.9 * n / 500.0)
       + a2 * $sin(6.283185307179586 * 9.8 * n / 500.0)
       + a3 * $cos(6.283185307179586 * 21.5 * n / 500.0)
       + real'(int'($urandom_range(0, 2000)) - 1000);
    @(negedge clk);
    eeg_data = 24'($rtoi(v));
    hist.push_back(int'(eeg_data));
    clk500 = 1;
    repeat (1500) @(negedge clk);
    clk500 = 0;
    repeat (1500) @(negedge clk);
  endtask

  task automatic analysis(input int id, input int thr_mode);
    int r0;
    r0 = readies;
    repeat (3) @(negedge clk);    // sample n is in the history now
    model();
    // thresholds: bit set -> 0.5x (flag expected 1), clear -> 2x (expected 0)
    bp_thr   = thr_mode[2] ? 64'($rtoi(pbp   / 2.0e6)) * 64'd1000000 : 64'($rtoi(pbp   / 1.0e6)) * 64'd2000000;
    mu_thr   = thr_mode[1] ? 64'($rtoi(pmu   / 2.0e6)) * 64'd1000000 : 64'($rtoi(pmu   / 1.0e6)) * 64'd2000000;
    beta_thr = thr_mode[0] ? 64'($rtoi(pbeta / 2.0e6)) * 64'd1000000 : 64'($rtoi(pbeta / 1.0e6)) * 64'd2000000;
    wait (readies > r0);
    @(negedge clk);
    checks += 4;
    if (!close(bp_pow, pbp) || !close(mu_pow, pmu) || !close(beta_pow, pbeta)) begin
      failures++;
      $display("analysis %0d: powers %0d %0d %0d model %e %e %e", id, bp_pow, mu_pow, beta_pow, pbp, pmu, pbeta);
    end
    if ({bp_flag, mu_flag, beta_flag} != 3'(thr_mode)) begin
      failures++;
      $display("analysis %0d: flags %b expected %b", id, {bp_flag, mu_flag, beta_flag}, 3'(thr_mode));
    end
    if (t_ready - t_start > 1065) begin
      failures++;
      $display("analysis %0d: %0d clocks from start to ready", id, t_ready - t_start);
    end
    $display("analysis %0d: %0d clocks from start to MRP ready", id, t_ready - t_start);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (300) @(posedge clk);
    for (int n = 0; n < 900; n++) begin
      seg = (n < 350) ? 0 : (n < 650) ? 1 : 2;
      // the trigger set before sample n is seen while that sample is stored
      if (n == 300 || n == 600 || n == 850) trigger = 1;
      if (n == 320 || n == 700 || n == 870) trigger = 0;
      fork
        sample(n);
        if (n == 300) analysis(0, 3'b101);
        if (n == 600) analysis(1, 3'b010);
        if (n == 850) analysis(2, 3'b111);
      join
    end
    checks += 2;
    if (starts != 3)  begin failures++; $display("%0d analyses started, expected 3", starts); end
    if (readies != 3) begin failures++; $display("%0d MRP ready pulses, expected 3", readies); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for fft_controller with a 256 x 24 block_ram.
//
// The FFT is replaced by a model that accepts sink beats while it is
// loading and, 600 clocks after the last one, returns a source eop beat.
// 700 EEG samples are written (one per 2000-clock data period). The
// trigger is raised and lowered between samples; the testbench checks:
//   - an analysis starts only on the first sample after a trigger rise,
//     never while the trigger stays high (counted: starts vs. rises);
//   - the 256 sink beats are the last 256 samples, oldest first, with sop
//     on the first and eop on the last;
//   - the beats are 2 clocks apart (512 clocks per frame);
//   - enable = 0 during a transfer pauses it without losing a beat;
//   - fft_ce toggles every clock.
module tb_fft_controller;
  import fall_risk_pkg::*;

  logic               clk = 0, rst_n = 0, enable = 1, clk500 = 0, trigger = 0;
  logic signed [23:0] eeg_data = 0;
  logic               ram_we;
  logic [7:0]         ram_waddr, ram_raddr;
  logic [23:0]        ram_wdata, ram_rdata;
  logic               fft_ce, sink_ready, start, busy;
  fft_beat_t          sink, source;
  int checks = 0, failures = 0;
  int starts = 0, expected_starts = 0, frames_ok = 0;

  block_ram #(.DEPTH(256), .WIDTH(24)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata), .raddr(ram_raddr), .rdata(ram_rdata)
  );

  fft_controller dut (
    .clk, .rst_n, .enable, .clk500, .eeg_data, .trigger,
    .ram_we, .ram_waddr, .ram_wdata, .ram_raddr, .ram_rdata,
    .fft_ce, .sink, .sink_ready, .source, .start, .busy
  );

  always #5 clk = ~clk;

  initial begin
    #(10 * 3000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- FFT model ----
  int     nbeats = 0;
  int     delay  = -1;
  int     got [256];
  longint cyc = 0, t_prev = 0;
  logic   prev_ce = 0, prev_en = 0;
  always_comb sink_ready = (delay < 0);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    source <= '0;
    if (rst_n && enable && prev_en) begin
      checks++;
      if (fft_ce == prev_ce) begin failures++; $display("fft_ce did not toggle"); end
    end
    prev_ce <= fft_ce;
    prev_en <= rst_n && enable;
    if (fft_ce && sink.valid && sink_ready && enable) begin
      got[nbeats] = int'(signed'(sink.re[23:0]));
      checks += 2;
      if (sink.sop != (nbeats == 0) || sink.eop != (nbeats == 255)) begin
        failures++; $display("packet marks wrong at beat %0d", nbeats);
      end
      if (nbeats > 0 && cyc - t_prev != 2 && !paused) begin
        failures++; $display("beat spacing %0d clocks", cyc - t_prev);
      end
      t_prev = cyc;
      nbeats++;
      if (nbeats == 256) delay = 600;
    end
    if (delay > 0) delay--;
    else if (delay == 0) begin
      source.valid <= 1; source.eop <= 1;
      delay = -1;
    end
    if (start) starts++;
  end

  // ---- stimulus ----
  int   hist [$];
  logic paused = 0;

  task automatic check_frame();
    int errs = 0;
    checks++;
    for (int i = 0; i < 256; i++)
      if (got[i] != hist[hist.size() - 256 + i]) errs++;
    if (errs != 0) begin failures++; $display("frame %0d: %0d beats wrong", starts, errs); end
    else frames_ok++;
  endtask

  task automatic sample(input int n);
    @(negedge clk);
    eeg_data = 24'($urandom);
    hist.push_back(int'(eeg_data));
    clk500 = 1;
    // pause one transfer part-way
    if (n == 450) begin
      repeat (100) @(negedge clk);
      paused = 1; enable = 0;
      repeat (37) @(negedge clk);
      enable = 1;
      repeat (4) @(negedge clk);
      paused = 0;
    end
    repeat (999) @(negedge clk);
    clk500 = 0;
    repeat (999) @(negedge clk);
    if (nbeats == 256) begin
      check_frame();
      nbeats = 0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (300) @(posedge clk);
    for (int n = 0; n < 700; n++) begin
      // trigger pattern: rises at 300, 320 (after falling at 310), 449;
      // stays high 320..400 (no retrigger)
      if (n == 300 || n == 320 || n == 449 || n == 600) begin trigger = 1; expected_starts++; end
      if (n == 310 || n == 400 || n == 460 || n == 601) trigger = 0;
      sample(n);
    end
    checks += 2;
    if (starts != expected_starts) begin failures++; $display("%0d starts, expected %0d", starts, expected_starts); end
    if (frames_ok != expected_starts) begin failures++; $display("%0d good frames", frames_ok); end
    $display("starts=%0d frames_ok=%0d", starts, frames_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

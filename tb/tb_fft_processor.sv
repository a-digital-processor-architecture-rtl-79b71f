// Testbench for fft_processor.
//
// Streams two 256-sample frames (random 24-bit data, then a full-scale-ish
// cosine on bin 5 plus a sine on bin 12) through the sink with the clock
// enable toggling every cycle, as in the EEG branch, and compares every
// output bin with a double-precision DFT computed here. Tolerance: 2e-5 of
// the frame's sum of |x| plus 8 LSB (twiddles have 16 fraction bits).
// Also checks the packet marks and the compute latency: 256 FFT-clock
// cycles (512 system clocks) from the last sink beat to the first source
// beat, plus one FFT-clock cycle (2 clocks) for the output register.
module tb_fft_processor;
  import fall_risk_pkg::*;

  localparam int N = 256;
  localparam int IN_W = 24;

  logic      clk = 0;
  logic      rst_n = 0;
  logic      ce = 0;
  fft_beat_t sink, source;
  logic      sink_ready;

  int checks = 0, failures = 0;

  fft_processor #(.N(N), .IN_W(IN_W), .NB(4)) dut (
    .clk, .rst_n, .ce, .sink, .sink_ready, .source
  );

  always #5 clk = ~clk;

  initial begin
    #(2_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   x [N];
  real  ref_re [N], ref_im [N];
  longint t_last_in, t_first_out, cyc;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic compute_ref();
    for (int k = 0; k < N; k++) begin
      real sr, si, a;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        a  = 6.283185307179586 * real'((n * k) % N) / real'(N);
        sr = sr + real'(x[n]) * $cos(a);
        si = si - real'(x[n]) * $sin(a);
      end
      ref_re[k] = sr;
      ref_im[k] = si;
    end
  endtask

  task automatic run_frame(input string name);
    real tol, sumabs;
    int  got;
    int  errs;
    compute_ref();
    sumabs = 0.0;
    for (int n = 0; n < N; n++) sumabs += (x[n] < 0) ? -real'(x[n]) : real'(x[n]);
    tol = 2.0e-5 * sumabs + 8.0;
    // load
    for (int n = 0; n < N; n++) begin
      // present on a ce cycle
      while (!(ce && sink_ready)) begin
        sink <= '0;
        @(posedge clk);
        #1;
      end
      sink.valid = 1'b1;
      sink.sop   = (n == 0);
      sink.eop   = (n == N - 1);
      sink.re    = FFT_DW'(x[n]);
      sink.im    = '0;
      @(posedge clk);
      #1;
      if (n == N - 1) t_last_in = cyc;
      sink = '0;
    end
    // collect
    got = 0;
    errs = 0;
    while (got < N) begin
      @(posedge clk);
      #1;
      if (source.valid) begin
        real dr, di;
        if (got == 0) begin
          t_first_out = cyc;
          checks++;
          if (t_first_out - t_last_in != 2 * 256 + 2) begin
            failures++;
            $display("%s: latency %0d clocks, expected %0d", name, t_first_out - t_last_in, 2 * 256 + 2);
          end
        end
        checks++;
        if (source.sop != (got == 0) || source.eop != (got == N - 1)) begin
          failures++;
          $display("%s: bad packet marks at bin %0d", name, got);
        end
        dr = real'(source.re) - ref_re[got];
        di = real'(source.im) - ref_im[got];
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        checks++;
        if (dr > tol || di > tol) begin
          failures++;
          errs++;
          if (errs < 5)
            $display("%s: bin %0d got (%0d,%0d) ref (%f,%f)", name, got, source.re, source.im,
                     ref_re[got], ref_im[got]);
        end
        got++;
      end
    end
  endtask

  initial begin
    sink = '0;
    cyc  = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
  end

  always @(posedge clk) if (rst_n) ce <= ~ce;

  initial begin
    @(posedge rst_n);
    @(posedge clk);
    #1;
    for (int n = 0; n < N; n++) x[n] = int'($urandom_range(0, (1 << IN_W) - 1)) - (1 << (IN_W - 1));
    run_frame("random");
    for (int n = 0; n < N; n++)
      x[n] = $rtoi(3.0e6 * $cos(6.283185307179586 * 5.0 * n / N)
                 + 1.5e6 * $sin(6.283185307179586 * 12.0 * n / N));
    run_frame("tones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for mrp_calculator.
//
// Drives FFT source packets of 256 beats (one beat every second clock, as
// the FFT delivers them) and compares the BP (bins 1-3), mu (4-6) and beta
// (7-15) powers and flags with sums computed here. Frames: random bins with
// thresholds just below, just above, and equal to the expected powers, and
// one frame of full-scale bins that must saturate the 64-bit sums.
// Also checks that mrp_ready pulses exactly once per packet, on the clock
// after bin 15 is delivered, and that the flags hold afterwards.
module tb_mrp_calculator;
  import fall_risk_pkg::*;

  logic        clk = 0, rst_n = 0;
  fft_beat_t   source;
  logic [63:0] bp_thr, mu_thr, beta_thr;
  logic [63:0] bp_pow, mu_pow, beta_pow;
  logic        mrp_ready, bp_flag, mu_flag, beta_flag;
  int checks = 0, failures = 0, readies = 0;
  longint cyc = 0, t_bin15 = 0, t_ready = 0;

  mrp_calculator dut (
    .clk, .rst_n, .source, .bp_thr, .mu_thr, .beta_thr,
    .bp_pow, .mu_pow, .beta_pow, .mrp_ready, .bp_flag, .mu_flag, .beta_flag
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (mrp_ready) begin
      readies++;
      t_ready = cyc;
    end
  end

  initial begin
    #(10 * 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] sadd(input logic [63:0] a, input logic [63:0] b);
    logic [64:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[64] ? 64'hFFFF_FFFF_FFFF_FFFF : s[63:0];
  endfunction

  // mode 0: thresholds below, 1: above, 2: equal, 3: saturation frame
  task automatic frame(input int mode);
    logic [63:0] ebp, emu, ebeta, m;
    logic signed [31:0] re, im;
    int r0;
    ebp = 0; emu = 0; ebeta = 0;
    r0 = readies;
    for (int k = 0; k < 256; k++) begin
      if (mode == 3) begin re = 32'sh8000_0000; im = 32'sh8000_0000; end
      else begin
        re = 32'(int'($urandom_range(0, 32'h7FFF_FFFF)) >>> 1) - 32'sh2000_0000;
        im = 32'(int'($urandom_range(0, 32'h7FFF_FFFF)) >>> 1) - 32'sh2000_0000;
      end
      m = 64'(longint'(re) * longint'(re)) + 64'(longint'(im) * longint'(im));
      if (k >= 1 && k <= 3)  ebp   = sadd(ebp, m);
      if (k >= 4 && k <= 6)  emu   = sadd(emu, m);
      if (k >= 7 && k <= 15) ebeta = sadd(ebeta, m);
      if (k == 0) begin
        unique case (mode)
          0, 3: begin bp_thr = 64'd1000; mu_thr = 64'd1000; beta_thr = 64'd1000; end
          default: ;
        endcase
      end
      @(negedge clk);
      source       = '0;
      source.valid = 1;
      source.sop   = (k == 0);
      source.eop   = (k == 255);
      source.re    = re;
      source.im    = im;
      if (k == 15) begin
        if (mode == 1) begin bp_thr = ebp + 1; mu_thr = emu + 1; beta_thr = ebeta + 1; end
        if (mode == 2) begin bp_thr = ebp;     mu_thr = emu - 1; beta_thr = ebeta;     end
      end
      @(posedge clk);
      if (k == 15) t_bin15 = cyc;
      @(negedge clk);
      source = '0;
    end
    checks += 8;
    if (bp_pow != ebp || mu_pow != emu || beta_pow != ebeta) begin
      failures++;
      $display("mode %0d: powers %0d %0d %0d expected %0d %0d %0d", mode, bp_pow, mu_pow, beta_pow, ebp, emu, ebeta);
    end
    unique case (mode)
      0, 3: if ({bp_flag, mu_flag, beta_flag} != 3'b111) begin failures++; $display("mode %0d flags %b", mode, {bp_flag, mu_flag, beta_flag}); end
      1:    if ({bp_flag, mu_flag, beta_flag} != 3'b000) begin failures++; $display("mode 1 flags %b", {bp_flag, mu_flag, beta_flag}); end
      2:    if ({bp_flag, mu_flag, beta_flag} != 3'b010) begin failures++; $display("mode 2 flags %b", {bp_flag, mu_flag, beta_flag}); end
      default: ;
    endcase
    if (readies - r0 != 1) begin failures++; $display("mode %0d: %0d ready pulses", mode, readies - r0); end
    if (t_ready != t_bin15 + 1) begin failures++; $display("ready at %0d, bin 15 at %0d", t_ready, t_bin15); end
    if (mode == 3 && (bp_pow != 64'hFFFF_FFFF_FFFF_FFFF || beta_pow != 64'hFFFF_FFFF_FFFF_FFFF)) begin
      failures++; $display("no saturation");
    end
  endtask

  initial begin
    source = '0;
    bp_thr = 0; mu_thr = 0; beta_thr = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      frame(0); frame(1); frame(2);
    end
    frame(3);
    frame(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

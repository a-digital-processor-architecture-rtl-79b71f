// MRP (movement-related potential) calculator.
//
// Consumes the FFT source stream, squares each bin (re^2 + im^2, 64-bit
// unsigned) and adds it to one of three band powers by bin index:
//   BP   (Bereitschaftspotential, 2-5 Hz)  bins BP_LO..BP_HI
//   mu   (7-12 Hz)                          bins MU_LO..MU_HI
//   beta (13-30 Hz)                         bins BETA_LO..BETA_HI
// With 500 Hz sampling and N=256 one bin is 1.953 Hz; the default bin
// ranges are the band edges divided by the bin width and rounded, which this
// design chose (bins 1-3, 4-6, 7-15). Beta ends at bin 15, so only the first
// 16 coefficients are used. Band accumulators saturate at 2^64-1.
// When the last band bin (BETA_HI) has been added, 'mrp_ready' pulses for one
// clock and the powers are compared with the subject thresholds; the flags
// (power > threshold) and the powers are held until the next analysis.
// A new packet (source.sop) clears the accumulators. The band split, squaring,
// 64-bit sums and threshold comparison follow the source.
module mrp_calculator
  import fall_risk_pkg::*;
#(
  parameter int unsigned N       = 256,
  parameter int unsigned BP_LO   = 1,
  parameter int unsigned BP_HI   = 3,
  parameter int unsigned MU_LO   = 4,
  parameter int unsigned MU_HI   = 6,
  parameter int unsigned BETA_LO = 7,
  parameter int unsigned BETA_HI = 15,
  localparam int unsigned AW     = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  fft_beat_t        source,
  input  logic [POW_W-1:0] bp_thr,
  input  logic [POW_W-1:0] mu_thr,
  input  logic [POW_W-1:0] beta_thr,
  output logic [POW_W-1:0] bp_pow,
  output logic [POW_W-1:0] mu_pow,
  output logic [POW_W-1:0] beta_pow,
  output logic             mrp_ready,
  output logic             bp_flag,
  output logic             mu_flag,
  output logic             beta_flag
);
  logic [AW-1:0]    bin;       // index of the current beat
  logic [POW_W-1:0] acc_bp, acc_mu, acc_beta;
  logic [POW_W-1:0] mag2;
  logic [POW_W-1:0] nbp, nmu, nbeta;

  function automatic logic [POW_W-1:0] sat_add(input logic [POW_W-1:0] a, input logic [POW_W-1:0] b);
    logic [POW_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[POW_W] ? '1 : s[POW_W-1:0];
  endfunction

  always_comb begin
    logic [AW-1:0]          k;
    logic signed [2*FFT_DW-1:0] rr, ii;
    k     = source.sop ? '0 : bin;
    rr    = source.re * source.re;
    ii    = source.im * source.im;
    mag2  = POW_W'(rr) + POW_W'(ii);
    // A new packet restarts the sums.
    nbp   = source.sop ? '0 : acc_bp;
    nmu   = source.sop ? '0 : acc_mu;
    nbeta = source.sop ? '0 : acc_beta;
    if (k >= AW'(BP_LO)   && k <= AW'(BP_HI))   nbp   = sat_add(nbp, mag2);
    if (k >= AW'(MU_LO)   && k <= AW'(MU_HI))   nmu   = sat_add(nmu, mag2);
    if (k >= AW'(BETA_LO) && k <= AW'(BETA_HI)) nbeta = sat_add(nbeta, mag2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin       <= '0;
      acc_bp    <= '0;
      acc_mu    <= '0;
      acc_beta  <= '0;
      bp_pow    <= '0;
      mu_pow    <= '0;
      beta_pow  <= '0;
      mrp_ready <= 1'b0;
      bp_flag   <= 1'b0;
      mu_flag   <= 1'b0;
      beta_flag <= 1'b0;
    end else begin
      mrp_ready <= 1'b0;
      if (source.valid) begin
        bin      <= (source.sop ? '0 : bin) + 1'b1;
        acc_bp   <= nbp;
        acc_mu   <= nmu;
        acc_beta <= nbeta;
        if ((source.sop ? '0 : bin) == AW'(BETA_HI)) begin
          bp_pow    <= nbp;
          mu_pow    <= nmu;
          beta_pow  <= nbeta;
          bp_flag   <= nbp   > bp_thr;
          mu_flag   <= nmu   > mu_thr;
          beta_flag <= nbeta > beta_thr;
          mrp_ready <= 1'b1;
        end
      end
    end
  end
endmodule

// EEG processing branch: one motor-cortex channel to three MRP flags.
//
// EEG Block RAM (N x SAMPLE_W circular buffer) + FFT controller + N-point
// butterfly FFT + MRP calculator, wired as in the source. Every data-clock
// period the current sample is stored; on a rising edge of 'trigger' (the
// coupled EMG trigger) the last N samples (512 ms at 500 Hz) are
// transformed and the BP, mu and beta band powers are compared with the
// subject thresholds.
// Timing at the defaults, counted in system clocks from the trigger check
// (about 11 clocks after the data clock rises):
// 512 to load the FFT, 512 (256 FFT-clock cycles) to compute, then bins
// stream out one per FFT-clock cycle; mrp_ready pulses after bin 15, i.e.
// about 1060 clocks (0.13 ms at 8.19 MHz) after the analysis starts. The
// flags hold until the next analysis.
module eeg_branch
  import fall_risk_pkg::*;
#(
  parameter int unsigned N     = 256,
  parameter int unsigned SAMPLE_W = 24,
  parameter int unsigned NB    = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    clk500,
  input  logic signed [SAMPLE_W-1:0] eeg_data,
  input  logic                    trigger,
  input  logic [POW_W-1:0]        bp_thr,
  input  logic [POW_W-1:0]        mu_thr,
  input  logic [POW_W-1:0]        beta_thr,
  output logic [POW_W-1:0]        bp_pow,
  output logic [POW_W-1:0]        mu_pow,
  output logic [POW_W-1:0]        beta_pow,
  output logic                    bp_flag,
  output logic                    mu_flag,
  output logic                    beta_flag,
  output logic                    mrp_ready,
  output logic                    start,
  output logic                    busy
);
  localparam int unsigned AW = $clog2(N);

  logic             ram_we;
  logic [AW-1:0]    ram_waddr, ram_raddr;
  logic [SAMPLE_W-1:0] ram_wdata, ram_rdata;
  logic             fft_ce, sink_ready;
  fft_beat_t        sink, source;

  block_ram #(.DEPTH(N), .WIDTH(SAMPLE_W)) u_eeg_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(ram_raddr), .rdata(ram_rdata)
  );

  fft_controller #(.N(N), .SAMPLE_W(SAMPLE_W)) u_ctrl (
    .clk, .rst_n, .enable, .clk500, .eeg_data, .trigger,
    .ram_we, .ram_waddr, .ram_wdata, .ram_raddr, .ram_rdata,
    .fft_ce, .sink, .sink_ready, .source, .start, .busy
  );

  fft_processor #(.N(N), .IN_W(SAMPLE_W), .NB(NB)) u_fft (
    .clk, .rst_n, .ce(fft_ce), .sink, .sink_ready, .source
  );

  mrp_calculator #(.N(N)) u_mrp (
    .clk, .rst_n, .source, .bp_thr, .mu_thr, .beta_thr,
    .bp_pow, .mu_pow, .beta_pow, .mrp_ready, .bp_flag, .mu_flag, .beta_flag
  );
endmodule

// Test and validation system: the fall-risk processor fed from replay
// storage and recording its outputs for comparison with a reference model.
//
// Sixteen replay RAMs hold one recorded channel each: eight EMG channels of
// EMG_W-bit samples (load_chan 0-7, EMG channel order of fall_risk_pkg) and
// eight EEG channels of EEG_W-bit samples (load_chan 8-15, EEG input order,
// O2 last). They are loaded through one shared port while enable = 0
// (EMG words use the low EMG_W bits of load_data). Replay follows the
// processor's own 500 Hz data clock: every word read address moves on when
// that clock falls, so each sample is steady for the whole high phase in
// which the processor takes it. Word 0 is presented first; after word
// 'replay_last' the segment repeats. Replay pauses while enable = 0.
//
// Two result stores record the outputs:
//   flag store  one 33-bit word per data-clock period, written when the
//               data clock falls (after that sample's processing):
//               {beta_flag[6:0], mu_flag[6:0], bp_flag[6:0],
//                cocontraction[3:0], emg_trigger[7:0]}
//   power store one 192-bit word {beta_pow, mu_pow, bp_pow} for each
//               analysis of the monitored EEG channel 'mon_chan', written
//               when that channel's MRP ready strobe pulses.
// 'restart' rewinds the replay and empties both stores. Stored words are
// read back through the rd_addr/rd_data ports (one clock of latency).
// The processor's flags, triggers and MRP-ready strobes are also brought
// out live, for the decision stage that would act on them.
module fall_risk_test_system
  import fall_risk_pkg::*;
#(
  parameter int unsigned REPLAY_DEPTH      = 65536,
  parameter int unsigned RESULT_DEPTH      = 65536,
  parameter int unsigned GLOBAL_DEPTH      = 512,
  parameter int unsigned LOCAL_DEPTH       = 128,
  parameter int unsigned FFT_N             = 256,
  parameter int unsigned FFT_NB            = 4,
  parameter int unsigned DATA_CLK_DIV_LOG2 = 14,
  localparam int unsigned RAW              = $clog2(REPLAY_DEPTH),
  localparam int unsigned SAW              = $clog2(RESULT_DEPTH),
  localparam int unsigned FLAG_W           = 3 * N_EEG + 4 + N_EMG,
  localparam int unsigned PWR_W            = 3 * POW_W
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           enable,
  // replay storage
  input  logic                           load_we,
  input  logic [3:0]                     load_chan,
  input  logic [RAW-1:0]                 load_addr,
  input  logic [EEG_W-1:0]               load_data,
  input  logic [RAW-1:0]                 replay_last,
  input  logic                           restart,
  output logic                           replay_wrapped,
  // processor thresholds
  input  logic [N_EMG-1:0][POW_W-1:0]    emg_rest_thr,
  input  logic [N_EEG-1:0][POW_W-1:0]    bp_thr,
  input  logic [N_EEG-1:0][POW_W-1:0]    mu_thr,
  input  logic [N_EEG-1:0][POW_W-1:0]    beta_thr,
  // result storage
  input  logic [2:0]                     mon_chan,
  input  logic [SAW-1:0]                 flag_rd_addr,
  output logic [FLAG_W-1:0]              flag_rd_data,
  output logic [SAW:0]                   flag_count,
  input  logic [SAW-1:0]                 pow_rd_addr,
  output logic [PWR_W-1:0]               pow_rd_data,
  output logic [SAW:0]                   pow_count,
  // live processor outputs (for the decision stage that follows)
  output logic [N_EEG-1:0]               bp_flag,
  output logic [N_EEG-1:0]               mu_flag,
  output logic [N_EEG-1:0]               beta_flag,
  output logic [3:0]                     cocontraction,
  output logic [N_EMG-1:0]               emg_trigger,
  output logic [N_EEG-1:0]               mrp_ready,
  output logic                           clk500
);
  logic signed [N_EMG-1:0][EMG_W-1:0]    emg_data;
  logic signed [N_EEG_IN-1:0][EEG_W-1:0] eeg_data;
  logic [N_EEG-1:0][POW_W-1:0]           bp_pow, mu_pow, beta_pow;
  logic [N_EMG+N_EEG_IN-1:0]             wrapped;
  logic                                  c500_d, advance;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c500_d <= 1'b0;
    else        c500_d <= enable && clk500;   // only high phases seen while enabled
  end
  always_comb advance = enable && c500_d && !clk500;

  // ---- replay storage ----
  for (genvar m = 0; m < int'(N_EMG); m++) begin : g_emg_rom
    replay_ram #(.DEPTH(REPLAY_DEPTH), .WIDTH(EMG_W)) u_rom (
      .clk, .rst_n,
      .load_we(load_we && load_chan == 4'(m)), .load_addr, .load_data(load_data[EMG_W-1:0]),
      .last_addr(replay_last), .restart, .advance,
      .sample(emg_data[m]), .wrapped(wrapped[m])
    );
  end
  for (genvar e = 0; e < int'(N_EEG_IN); e++) begin : g_eeg_rom
    replay_ram #(.DEPTH(REPLAY_DEPTH), .WIDTH(EEG_W)) u_rom (
      .clk, .rst_n,
      .load_we(load_we && load_chan == 4'(N_EMG + e)), .load_addr, .load_data,
      .last_addr(replay_last), .restart, .advance,
      .sample(eeg_data[e]), .wrapped(wrapped[N_EMG + e])
    );
  end
  always_comb replay_wrapped = wrapped[0];

  // ---- processor ----
  fall_risk_top #(
    .GLOBAL_DEPTH(GLOBAL_DEPTH), .LOCAL_DEPTH(LOCAL_DEPTH), .FFT_N(FFT_N), .FFT_NB(FFT_NB),
    .DATA_CLK_DIV_LOG2(DATA_CLK_DIV_LOG2), .USE_INTERNAL_DATA_CLK(1'b1)
  ) u_top (
    .clk, .rst_n, .enable, .clk500_in(1'b0), .clk500,
    .emg_data, .eeg_data, .emg_rest_thr, .bp_thr, .mu_thr, .beta_thr,
    .bp_flag, .mu_flag, .beta_flag, .cocontraction, .emg_trigger, .mrp_ready,
    .bp_pow, .mu_pow, .beta_pow
  );

  // ---- result storage ----
  result_store #(.DEPTH(RESULT_DEPTH), .WIDTH(FLAG_W)) u_flag_store (
    .clk, .rst_n, .clear(restart), .wr_en(advance),
    .wr_data({beta_flag, mu_flag, bp_flag, cocontraction, emg_trigger}),
    .rd_addr(flag_rd_addr), .rd_data(flag_rd_data), .count(flag_count), .full()
  );

  result_store #(.DEPTH(RESULT_DEPTH), .WIDTH(PWR_W)) u_pow_store (
    .clk, .rst_n, .clear(restart), .wr_en(enable && mrp_ready[mon_chan]),
    .wr_data({beta_pow[mon_chan], mu_pow[mon_chan], bp_pow[mon_chan]}),
    .rd_addr(pow_rd_addr), .rd_data(pow_rd_data), .count(pow_count), .full()
  );
endmodule

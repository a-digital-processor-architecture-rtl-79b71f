// Combined EEG/EMG fall-risk prediction processor (top level).
//
// Eight EMG branches turn each muscle's 500 Hz samples into a 1-bit
// contraction trigger (local power above a dynamic, window-averaged
// threshold). Pairs of triggers give four agonist-antagonist co-contraction
// flags. The gastrocnemius triggers start a time-frequency analysis on the
// contralateral motor-cortex EEG channels: each of the seven EEG branches
// transforms the last 256 samples (about 500 ms before the movement) and
// raises BP, mu and beta flags when the band powers exceed subject
// thresholds. Outputs: 21 MRP flags and 4 co-contraction flags, as in the
// source, plus the EMG triggers, MRP-ready strobes and the band powers behind the
// MRP flags (held until the channel's next analysis) for observation.
//
// Clocking: one system clock (8.19209 MHz in the prototype, from a PLL that
// is outside this design). The 500 Hz data clock is, by default, made
// on-chip by dividing the system clock by 2^14 (data_clk_gen), as the
// prototype did when replaying stored recordings; it is output on 'clk500'
// and samples must be valid on emg_data/eeg_data while it is high. With
// USE_INTERNAL_DATA_CLK = 0 an external data clock on clk500_in is
// synchronised (two flops) instead; that option is this design's. rst_n is
// an asynchronous active-low reset; enable = 0 freezes all processing.
// Thresholds are inputs so they can be trimmed per subject. The occipital
// channel O2 (eeg_data[7]) is accepted but not processed: its use for noise
// reduction is not specified, so that input is intentionally unread.
module fall_risk_top
  import fall_risk_pkg::*;
#(
  parameter int unsigned GLOBAL_DEPTH          = 512,
  parameter int unsigned LOCAL_DEPTH           = 128,
  parameter int unsigned FFT_N                 = 256,
  parameter int unsigned FFT_NB                = 4,
  parameter int unsigned DATA_CLK_DIV_LOG2     = 14,
  parameter bit          USE_INTERNAL_DATA_CLK = 1'b1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                enable,
  input  logic                                clk500_in,
  output logic                                clk500,
  input  logic signed [N_EMG-1:0][EMG_W-1:0]  emg_data,
  input  logic signed [N_EEG_IN-1:0][EEG_W-1:0] eeg_data,
  input  logic [N_EMG-1:0][POW_W-1:0]         emg_rest_thr,
  input  logic [N_EEG-1:0][POW_W-1:0]         bp_thr,
  input  logic [N_EEG-1:0][POW_W-1:0]         mu_thr,
  input  logic [N_EEG-1:0][POW_W-1:0]         beta_thr,
  output logic [N_EEG-1:0]                    bp_flag,
  output logic [N_EEG-1:0]                    mu_flag,
  output logic [N_EEG-1:0]                    beta_flag,
  output logic [3:0]                          cocontraction,
  output logic [N_EMG-1:0]                    emg_trigger,
  output logic [N_EEG-1:0]                    mrp_ready,
  output logic [N_EEG-1:0][POW_W-1:0]         bp_pow,
  output logic [N_EEG-1:0][POW_W-1:0]         mu_pow,
  output logic [N_EEG-1:0][POW_W-1:0]         beta_pow
);
  logic [N_EEG-1:0] eeg_trigger;

  // ---- 500 Hz data clock ----
  generate
    if (USE_INTERNAL_DATA_CLK) begin : g_int_clk
      logic tick_unused;
      data_clk_gen #(.DIV_LOG2(DATA_CLK_DIV_LOG2)) u_div (
        .clk, .rst_n, .clk500(clk500), .tick(tick_unused)
      );
    end else begin : g_ext_clk
      logic [1:0] sync;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) sync <= '0;
        else        sync <= {sync[0], clk500_in};
      end
      always_comb clk500 = sync[1];
    end
  endgenerate

  // ---- EMG branches ----
  for (genvar m = 0; m < int'(N_EMG); m++) begin : g_emg
    logic [POW_W-1:0] gpow, lpow;
    logic             upd;
    emg_branch #(
      .EMG_W(EMG_W), .GLOBAL_DEPTH(GLOBAL_DEPTH), .LOCAL_DEPTH(LOCAL_DEPTH), .POW_W(POW_W)
    ) u_emg (
      .clk, .rst_n, .enable, .clk500,
      .emg_data(emg_data[m]), .rest_thr(emg_rest_thr[m]),
      .global_pow(gpow), .local_pow(lpow), .update(upd), .trigger(emg_trigger[m])
    );
  end

  cocontraction u_cocon (.emg_trigger, .cocon(cocontraction));

  eeg_trigger_router u_route (.emg_trigger, .eeg_trigger);

  // ---- EEG branches (motor-cortex channels only) ----
  for (genvar e = 0; e < int'(N_EEG); e++) begin : g_eeg
    logic             st, bsy;
    eeg_branch #(.N(FFT_N), .SAMPLE_W(EEG_W), .NB(FFT_NB)) u_eeg (
      .clk, .rst_n, .enable, .clk500,
      .eeg_data(eeg_data[e]), .trigger(eeg_trigger[e]),
      .bp_thr(bp_thr[e]), .mu_thr(mu_thr[e]), .beta_thr(beta_thr[e]),
      .bp_pow(bp_pow[e]), .mu_pow(mu_pow[e]), .beta_pow(beta_pow[e]),
      .bp_flag(bp_flag[e]), .mu_flag(mu_flag[e]), .beta_flag(beta_flag[e]),
      .mrp_ready(mrp_ready[e]), .start(st), .busy(bsy)
    );
  end
endmodule

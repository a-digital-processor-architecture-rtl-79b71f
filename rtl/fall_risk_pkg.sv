// Shared types and constants of the EEG/EMG fall-risk processor.
//
// The processor samples eight EMG channels (16 bit) and eight EEG channels
// (24 bit) at 500 Hz. EMG channels are numbered right leg first, then left
// leg, each leg in the order gastrocnemius, tibialis, rectus femoris, biceps
// femoris. EEG channels are numbered T3, T4, C3, C4, Cz, P3, P4, O2; only the
// first seven (motor cortex) have an analysis branch. The channel lists and
// widths follow the source description; the index order is this design's
// choice.
//
// fft_beat_t is the bundle that carries one complex sample into (sink) or
// out of (source) the FFT processor, with start/end-of-packet marks in the
// style of a streaming FFT core.
package fall_risk_pkg;

  localparam int unsigned EMG_W     = 16;   // EMG sample width
  localparam int unsigned EEG_W     = 24;   // EEG sample width
  localparam int unsigned SQ_W      = 32;   // squared EMG word in RAM
  localparam int unsigned POW_W     = 64;   // power accumulators / comparators
  localparam int unsigned FFT_DW    = 32;   // FFT internal and output width
  localparam int unsigned N_EMG     = 8;
  localparam int unsigned N_EEG     = 7;    // analysed motor-cortex channels
  localparam int unsigned N_EEG_IN  = 8;    // including O2

  // EMG channel indices
  localparam int unsigned EMG_R_GASTRO = 0;
  localparam int unsigned EMG_R_TIB    = 1;
  localparam int unsigned EMG_R_RECT   = 2;
  localparam int unsigned EMG_R_BICF   = 3;
  localparam int unsigned EMG_L_GASTRO = 4;
  localparam int unsigned EMG_L_TIB    = 5;
  localparam int unsigned EMG_L_RECT   = 6;
  localparam int unsigned EMG_L_BICF   = 7;

  // EEG channel indices
  localparam int unsigned EEG_T3 = 0;
  localparam int unsigned EEG_T4 = 1;
  localparam int unsigned EEG_C3 = 2;
  localparam int unsigned EEG_C4 = 3;
  localparam int unsigned EEG_CZ = 4;
  localparam int unsigned EEG_P3 = 5;
  localparam int unsigned EEG_P4 = 6;
  localparam int unsigned EEG_O2 = 7;

  typedef struct packed {
    logic                     valid;
    logic                     sop;
    logic                     eop;
    logic signed [FFT_DW-1:0] re;
    logic signed [FFT_DW-1:0] im;
  } fft_beat_t;

endpackage

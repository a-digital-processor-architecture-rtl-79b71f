// Agonist-antagonist co-contraction detector.
//
// Each output is the AND of the EMG triggers of a coupled muscle pair. With
// the EMG channel order of fall_risk_pkg the four pairs are, in bit order:
//   [0] right gastrocnemius & right tibialis
//   [1] right rectus femoris & right biceps femoris
//   [2] left gastrocnemius  & left tibialis
//   [3] left rectus femoris  & left biceps femoris
// The AND follows the source; the choice of pairs is this design's (the
// source names the gastrocnemius/tibialis pair and four outputs).
// Combinational.
module cocontraction
  import fall_risk_pkg::*;
(
  input  logic [N_EMG-1:0] emg_trigger,
  output logic [3:0]       cocon
);
  always_comb begin
    cocon[0] = emg_trigger[EMG_R_GASTRO] & emg_trigger[EMG_R_TIB];
    cocon[1] = emg_trigger[EMG_R_RECT]   & emg_trigger[EMG_R_BICF];
    cocon[2] = emg_trigger[EMG_L_GASTRO] & emg_trigger[EMG_L_TIB];
    cocon[3] = emg_trigger[EMG_L_RECT]   & emg_trigger[EMG_L_BICF];
  end
endmodule

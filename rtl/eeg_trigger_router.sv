// Routes EMG triggers to the EEG analysis branches.
//
// Cortical activity is contralateral to the movement: a right gastrocnemius
// trigger starts the analysis of the left-hemisphere channels T3, C3, P3, a
// left gastrocnemius trigger that of T4, C4, P4, and the central channel Cz
// is started by either. This mapping follows the source. Combinational; the
// EEG branches detect the rising edge themselves.
module eeg_trigger_router
  import fall_risk_pkg::*;
(
  input  logic [N_EMG-1:0] emg_trigger,
  output logic [N_EEG-1:0] eeg_trigger
);
  logic r_move, l_move;

  always_comb begin
    r_move = emg_trigger[EMG_R_GASTRO];
    l_move = emg_trigger[EMG_L_GASTRO];
    eeg_trigger         = '0;
    eeg_trigger[EEG_T3] = r_move;
    eeg_trigger[EEG_C3] = r_move;
    eeg_trigger[EEG_P3] = r_move;
    eeg_trigger[EEG_T4] = l_move;
    eeg_trigger[EEG_C4] = l_move;
    eeg_trigger[EEG_P4] = l_move;
    eeg_trigger[EEG_CZ] = r_move | l_move;
  end
endmodule

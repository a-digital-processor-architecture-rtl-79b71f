// EMG trigger comparator.
//
// The trigger is high when the local power (mean of the last N squared
// samples) exceeds the dynamic threshold (mean of the last M squared samples)
// and also exceeds a fixed rest threshold trimmed on the subject, which keeps
// noise from triggering when the subject stands still. Both comparisons are
// unsigned, W bits wide and combinational, as in the source ("asynchronous
// 64bit comparator"). The AND of the two comparisons is this design's reading
// of "Local THR is also compared to a fixed threshold".
module emg_trigger_cmp #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] local_pow,
  input  logic [W-1:0] global_pow,
  input  logic [W-1:0] rest_thr,
  output logic         trigger
);
  always_comb trigger = (local_pow > global_pow) && (local_pow > rest_thr);
endmodule

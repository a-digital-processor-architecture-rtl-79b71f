// EMG processing branch: one muscle channel to a 1-bit trigger.
//
// The sample is squared (emg_squarer) and fed to two moving-window power
// FSMs running in lockstep: the global window (GLOBAL_DEPTH samples, 1 s at
// 500 Hz) gives the dynamic threshold, the local window (LOCAL_DEPTH samples)
// the local power. The trigger is local > global and local > rest_thr
// (emg_trigger_cmp). Structure, window sizes and widths follow the source.
//
// Interface: emg_data must be stable while clk500 is high. Seven clock edges
// after clk500 is first seen high both powers are refreshed and 'update'
// pulses; the trigger is combinational from the registered powers and so is
// valid from that cycle until the next refresh. enable=0 freezes the branch.
// After reset the branch first clears its RAMs (GLOBAL_DEPTH cycles).
module emg_branch #(
  parameter int unsigned EMG_W        = 16,
  parameter int unsigned GLOBAL_DEPTH = 512,
  parameter int unsigned LOCAL_DEPTH  = 128,
  parameter int unsigned POW_W        = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    clk500,
  input  logic signed [EMG_W-1:0] emg_data,
  input  logic [POW_W-1:0]        rest_thr,
  output logic [POW_W-1:0]        global_pow,
  output logic [POW_W-1:0]        local_pow,
  output logic                    update,
  output logic                    trigger
);
  logic [2*EMG_W-1:0] sq;
  logic               upd_g, upd_l;
  logic               rdy_g, rdy_l;
  logic               clk500_run;

  // Neither FSM sees a sample until both have cleared their RAMs, so the two
  // windows always hold the same sample stream.
  always_comb clk500_run = clk500 & rdy_g & rdy_l;

  emg_squarer #(.IN_W(EMG_W)) u_sq (.sample(emg_data), .square(sq));

  emg_power_fsm #(.DEPTH(GLOBAL_DEPTH), .IN_W(2*EMG_W), .SUM_W(POW_W)) u_global (
    .clk, .rst_n, .enable, .clk500(clk500_run), .sq_in(sq), .power(global_pow), .update(upd_g),
    .ready(rdy_g)
  );

  emg_power_fsm #(.DEPTH(LOCAL_DEPTH), .IN_W(2*EMG_W), .SUM_W(POW_W)) u_local (
    .clk, .rst_n, .enable, .clk500(clk500_run), .sq_in(sq), .power(local_pow), .update(upd_l),
    .ready(rdy_l)
  );

  emg_trigger_cmp #(.W(POW_W)) u_cmp (
    .local_pow(local_pow), .global_pow(global_pow), .rest_thr(rest_thr), .trigger(trigger)
  );

  // Both FSMs step together, so either update marks the refresh.
  always_comb update = upd_g & upd_l;
endmodule

// Testbench for emg_branch at its default windows (512 global, 128 local).
//
// 2000 EMG samples: quiet noise with contraction bursts of varying length and
// amplitude, one per data-clock period. A model in the testbench squares
// each sample, keeps both windows, and predicts global and local power and
// the trigger (local > global and local > rest threshold). All three are
// checked after every refresh, together with the 7-clock refresh latency.
// Trigger rises and falls are counted; each must happen.
module tb_emg_branch;
  logic               clk = 0, rst_n = 0, enable = 1, clk500 = 0;
  logic signed [15:0] emg_data = 0;
  logic [63:0]        rest_thr = 64'd4000;
  logic [63:0]        global_pow, local_pow;
  logic               update, trigger;
  int checks = 0, failures = 0, rises = 0, falls = 0;
  longint cyc = 0, t_rise = 0;
  longint unsigned gq [$], lq [$];
  longint unsigned gsum = 0, lsum = 0;
  logic prev_trig = 0;

  emg_branch dut (
    .clk, .rst_n, .enable, .clk500, .emg_data, .rest_thr,
    .global_pow, .local_pow, .update, .trigger
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(10 * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample(input int v);
    longint unsigned sq, eg, el;
    logic et;
    @(negedge clk);
    emg_data = 16'(v);
    clk500   = 1;
    t_rise   = cyc + 1;
    sq = longint'(v) * longint'(v);
    gq.push_back(sq); gsum += sq;
    if (gq.size() > 512) gsum -= gq.pop_front();
    lq.push_back(sq); lsum += sq;
    if (lq.size() > 128) lsum -= lq.pop_front();
    eg = gsum >> 9;
    el = lsum >> 7;
    et = (el > eg) && (el > rest_thr);
    do begin @(posedge clk); #1; end while (!update);
    checks += 4;
    if (cyc - t_rise + 1 != 7) begin
      failures++;
      $display("latency %0d, expected 7", cyc - t_rise + 1);
    end
    if (global_pow != eg || local_pow != el || trigger != et) begin
      failures++;
      if (failures < 10)
        $display("n=%0d g=%0d/%0d l=%0d/%0d trig=%b/%b", gq.size(), global_pow, eg, local_pow, el, trigger, et);
    end
    if (trigger && !prev_trig) rises++;
    if (!trigger && prev_trig) falls++;
    prev_trig = trigger;
    repeat (10) @(negedge clk);
    clk500 = 0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (600) @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      int amp;
      // bursts: 150 samples on, 350 off, amplitude changing per burst
      amp = ((i % 500) < 150) ? 2000 + 3000 * ((i / 500) % 3) : 40;
      sample(int'($urandom_range(0, 2 * amp)) - amp);
    end
    checks += 2;
    if (rises == 0) begin failures++; $display("trigger never rose"); end
    if (falls == 0) begin failures++; $display("trigger never fell"); end
    $display("trigger rises=%0d falls=%0d", rises, falls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

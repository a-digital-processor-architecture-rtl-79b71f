// Testbench for emg_power_fsm at its default 512-word window.
//
// After the reset clear sweep, 1300 samples are applied, one per data-clock
// period (40 system clocks, high for 20), with random magnitudes and quiet
// stretches. A queue model of the window gives the expected power
// (sum of the last 512 samples >> 9, missing samples counting as zero).
// Checks: the power after every update, the 7-clock latency from the first
// clock that sees clk500 high to 'update', and that enable = 0 freezes the
// FSM (a sample presented while disabled is taken only after re-enable).
module tb_emg_power_fsm;
  localparam int DEPTH = 512;
  logic        clk = 0, rst_n = 0, enable = 1, clk500 = 0;
  logic [31:0] sq_in = 0;
  logic [63:0] power;
  logic        update, ready;
  int checks = 0, failures = 0;
  longint cyc = 0, t_rise = 0;
  longint unsigned win [$];
  longint unsigned sum = 0;

  emg_power_fsm #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .enable, .clk500, .sq_in, .power, .update, .ready
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(10 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample(input logic [31:0] v, input bit freeze);
    longint unsigned expv;
    @(negedge clk);
    sq_in  = v;
    clk500 = 1;
    t_rise = cyc + 1;                      // first edge that sees it high
    win.push_back(v);
    sum += v;
    if (win.size() > DEPTH) sum -= win.pop_front();
    expv = sum >> 9;
    if (freeze) begin
      enable = 0;
      repeat (30) @(negedge clk);
      checks++;
      if (update) begin failures++; $display("update while disabled"); end
      t_rise = cyc + 1;
      enable = 1;
    end
    do begin @(posedge clk); #1; end while (!update);
    checks += 2;
    if (cyc - t_rise + 1 != 7 && !freeze) begin
      failures++;
      $display("latency %0d clocks, expected 7", cyc - t_rise + 1);
    end
    if (power != expv) begin
      failures++;
      if (failures < 10) $display("sample %0d: power %0d expected %0d", win.size(), power, expv);
    end
    repeat (12) @(negedge clk);
    clk500 = 0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (ready) begin failures++; $display("ready during clear"); end
    wait (ready);
    for (int i = 0; i < 1300; i++) begin
      logic [31:0] v;
      if ((i / 150) % 2 == 1) v = $urandom_range(0, 1000);
      else                    v = $urandom & 32'h3FFF_FFFF;
      sample(v, i == 700);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for emg_trigger_cmp: directed edge cases (equal values, one of
// the two conditions only) and random 64-bit triples.
module tb_emg_trigger_cmp;
  logic [63:0] local_pow, global_pow, rest_thr;
  logic        trigger;
  int checks = 0, failures = 0;

  emg_trigger_cmp #(.W(64)) dut (.local_pow, .global_pow, .rest_thr, .trigger);

  task automatic check(input logic [63:0] l, input logic [63:0] g, input logic [63:0] r);
    logic expv;
    local_pow = l; global_pow = g; rest_thr = r;
    #1;
    expv = (l > g) && (l > r);
    checks++;
    if (trigger !== expv) begin
      failures++;
      $display("l=%0d g=%0d r=%0d trigger=%b expected %b", l, g, r, trigger, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(10, 10, 0);  check(11, 10, 0);  check(11, 10, 11); check(11, 10, 12);
    check(11, 12, 5);  check(64'hFFFF_FFFF_FFFF_FFFF, 64'h8000_0000_0000_0000, 1);
    check(64'h8000_0000_0000_0000, 64'h7FFF_FFFF_FFFF_FFFF, 0);
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] l, g, r;
      l = {$urandom, $urandom} >> $urandom_range(0, 40);
      g = {$urandom, $urandom} >> $urandom_range(0, 40);
      r = {$urandom, $urandom} >> $urandom_range(0, 40);
      check(l, g, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

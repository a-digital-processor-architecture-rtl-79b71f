// Testbench for emg_squarer: corner values and 2000 random samples,
// each compared with the square computed in 64-bit integer arithmetic.
module tb_emg_squarer;
  logic signed [15:0] sample;
  logic        [31:0] square;
  int checks = 0, failures = 0;

  emg_squarer #(.IN_W(16)) dut (.sample, .square);

  task automatic check(input int v);
    longint expv;
    sample = 16'(v);
    #1;
    expv = longint'(v) * longint'(v);
    checks++;
    if (longint'(square) != expv) begin
      failures++;
      $display("square(%0d) = %0d, expected %0d", v, square, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(1); check(-1); check(32767); check(-32768); check(-12345);
    for (int i = 0; i < 2000; i++) check(int'($urandom_range(0, 65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

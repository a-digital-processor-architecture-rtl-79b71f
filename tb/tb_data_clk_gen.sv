// Testbench for data_clk_gen at its default 14-bit divider: the data clock
// must rise every 16384 system clocks with 50 % duty, and 'tick' must pulse
// exactly on the rising cycles.
module tb_data_clk_gen;
  logic clk = 0, rst_n = 0;
  logic clk500, tick, prev;
  longint cyc = 0, last_rise = -1, high_cnt = 0;
  int rises = 0;
  int checks = 0, failures = 0;

  data_clk_gen dut (.clk, .rst_n, .clk500, .tick);

  always #5 clk = ~clk;

  initial begin
    #(10 * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (rises < 5) begin
      @(posedge clk);
      #1;
      cyc++;
      if (clk500) high_cnt++;
      checks++;
      if (tick !== (clk500 && !prev)) begin
        failures++;
        $display("tick mismatch at cycle %0d", cyc);
      end
      if (clk500 && !prev) begin
        if (last_rise >= 0) begin
          checks += 2;
          if (cyc - last_rise != 16384) begin
            failures++;
            $display("period %0d, expected 16384", cyc - last_rise);
          end
          if (high_cnt - 1 != 8192) begin
            failures++;
            $display("high time %0d, expected 8192", high_cnt - 1);
          end
        end
        last_rise = cyc;
        high_cnt = 1;
        rises++;
      end
      prev = clk500;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

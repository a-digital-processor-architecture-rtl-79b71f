// 500 Hz data clock generator.
//
// A free-running DIV_LOG2-bit counter divides the system clock; its top bit
// is the data clock, a square wave of f_clk / 2^DIV_LOG2. With the 8.19209
// MHz system clock and the source's 14-bit counter this is 500.0 Hz. The
// data clock paces sample arrival: new samples are presented while it is
// high. 'tick' is a one-cycle pulse on the cycle the data clock rises.
// Asynchronous active-low reset clears the counter.
module data_clk_gen #(
  parameter int unsigned DIV_LOG2 = 14
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk500,
  output logic tick
);
  logic [DIV_LOG2-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  always_comb begin
    clk500 = cnt[DIV_LOG2-1];
    tick   = (cnt == {1'b1, {(DIV_LOG2-1){1'b0}}});
  end
endmodule

// Result storage RAM for testing: records output words for off-line
// comparison with a reference model.
//
// Each clock with wr_en = 1 writes wr_data to the next free word, starting
// at word 0, until DEPTH words are stored ('full'); further writes are
// dropped. 'count' is the number of stored words. The contents are read
// back through rd_addr; rd_data shows the word one clock later. 'clear'
// empties the store (count = 0). rst_n is asynchronous, active low; the
// contents are not reset.
module result_store #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned WIDTH = 33,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  output logic [AW:0]      count,
  output logic             full
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_comb full = (count == (AW+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                count <= '0;
    else if (clear)            count <= '0;
    else if (wr_en && !full)   count <= count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[count[AW-1:0]] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule

// Sample replay RAM for testing with recorded signals.
//
// One storage RAM per input channel holds a recorded segment, one sample per
// word in two's complement (the prototype used about 65k words per channel,
// 16-bit words for EMG and 24-bit for EEG, loaded from memory-initialisation
// files). Here the segment is written through a load port. Replay: the read
// address counter starts at 0 and moves to the next word on each 'advance'
// strobe (one per 500 Hz data-clock period); after 'last_addr' it wraps to 0
// and sets 'wrapped'. 'sample' always shows the word at the read address,
// one clock after the address (or its contents) changes. 'restart' returns
// the address to 0 and clears 'wrapped'. rst_n is asynchronous, active low;
// the contents are not reset.
module replay_ram #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_we,
  input  logic [AW-1:0]    load_addr,
  input  logic [WIDTH-1:0] load_data,
  input  logic [AW-1:0]    last_addr,
  input  logic             restart,
  input  logic             advance,
  output logic [WIDTH-1:0] sample,
  output logic             wrapped
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr <= '0;
      wrapped <= 1'b0;
    end else if (restart) begin
      rd_addr <= '0;
      wrapped <= 1'b0;
    end else if (advance) begin
      if (rd_addr == last_addr) begin
        rd_addr <= '0;
        wrapped <= 1'b1;
      end else begin
        rd_addr <= rd_addr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
    sample <= mem[rd_addr];
  end
endmodule

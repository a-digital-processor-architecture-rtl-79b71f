// Block RAM with one write port and one registered read port.
//
// Used as a circular buffer: the EMG global window (512 x 32 bit), the EMG
// local window (128 x 32 bit) and the EEG sample buffer (256 x 24 bit). The
// surrounding controller supplies a wrapping address counter, which gives the
// FIFO-like behaviour the source describes without a shift register.
// Timing: a write happens at the clock edge with we=1; rdata shows
// mem[raddr] one clock after raddr is presented (read-before-write when the
// same address is written in that cycle). Contents are not reset; the
// controllers clear them by writing zeros where that matters.
module block_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule

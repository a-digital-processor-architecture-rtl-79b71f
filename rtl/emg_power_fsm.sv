// Moving-window EMG power (Global Power FSM / Local Power FSM).
//
// Keeps the last DEPTH squared EMG samples in a block RAM used as a circular
// buffer and a running Sum of them. On each new sample it reads the oldest
// word (the one about to be overwritten), subtracts it from Sum, adds the
// new sample, overwrites the word and advances the loop address counter. The
// power is Sum shifted right by log2(DEPTH), i.e. the window mean. One RAM
// read and one RAM write per sample, no re-summation of the window. The same
// module serves as global average (DEPTH=512, 9-bit shift) and local average
// (DEPTH=128, 7-bit shift). All of this follows the source.
//
// Sequencing: after reset the FSM clears every RAM word (DEPTH cycles; the
// source resets the RAMs, the sweep is how this design does it), then waits
// for the data clock clk500 to be high. New samples must be stable while
// clk500 is high. Seven clock edges after the first edge that sees clk500
// high, 'power' holds the new value and 'update' pulses for one cycle:
//   IDLE -> POINT -> READ -> SUB -> ADD -> WRITE -> UPDATE -> WAIT_LOW
// The FSM then waits for clk500 low before accepting the next sample.
// 'ready' is low while the RAM is being cleared.
// enable=0 freezes the FSM in whatever state it is in. rst_n is asynchronous
// and active low.
module emg_power_fsm #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned IN_W  = 32,
  parameter int unsigned SUM_W = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             clk500,
  input  logic [IN_W-1:0]  sq_in,
  output logic [SUM_W-1:0] power,
  output logic             update,
  output logic             ready
);
  typedef enum logic [3:0] {
    S_CLEAR, S_IDLE, S_POINT, S_READ, S_SUB, S_ADD, S_WRITE, S_UPDATE, S_WAIT_LOW
  } state_t;

  state_t           state;
  logic [AW-1:0]    ptr;       // loop address counter: oldest word
  logic [AW-1:0]    raddr;
  logic [IN_W-1:0]  new_s;     // latched new squared sample
  logic [SUM_W-1:0] sum;
  logic             we;
  logic [IN_W-1:0]  wdata;
  logic [IN_W-1:0]  rdata;

  block_ram #(.DEPTH(DEPTH), .WIDTH(IN_W)) u_ram (
    .clk   (clk),
    .we    (we),
    .waddr (ptr),
    .wdata (wdata),
    .raddr (raddr),
    .rdata (rdata)
  );

  always_comb begin
    we    = enable && (state == S_CLEAR || state == S_WRITE);
    wdata = (state == S_CLEAR) ? '0 : new_s;
    ready = (state != S_CLEAR);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_CLEAR;
      ptr    <= '0;
      raddr  <= '0;
      new_s  <= '0;
      sum    <= '0;
      power  <= '0;
      update <= 1'b0;
    end else begin
      update <= 1'b0;
      if (enable) begin
        unique case (state)
          S_CLEAR: begin
            ptr <= ptr + 1'b1;
            if (ptr == AW'(DEPTH - 1)) state <= S_IDLE;
          end
          S_IDLE: if (clk500) begin
            new_s <= sq_in;
            state <= S_POINT;
          end
          S_POINT: begin
            raddr <= ptr;
            state <= S_READ;
          end
          S_READ:  state <= S_SUB;       // RAM samples raddr on this edge
          S_SUB: begin
            sum   <= sum - SUM_W'(rdata);
            state <= S_ADD;
          end
          S_ADD: begin
            sum   <= sum + SUM_W'(new_s);
            state <= S_WRITE;
          end
          S_WRITE: begin
            ptr   <= ptr + 1'b1;
            state <= S_UPDATE;
          end
          S_UPDATE: begin
            power  <= sum >> AW;
            update <= 1'b1;
            state  <= S_WAIT_LOW;
          end
          S_WAIT_LOW: if (!clk500) state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule

// FFT controller of an EEG branch.
//
// Keeps the EEG Block RAM filled with the last N samples through a loop
// address counter, and when the coupled EMG trigger rises, streams those N
// samples, oldest first, into the FFT sink. It also makes the FFT clock
// enable 'fft_ce', high every second system clock (4 MHz from 8 MHz).
//
// Sequence per data-clock period, following the source:
//   IDLE     wait for clk500 high (sample present on eeg_data)
//   WRITE    write the sample at the loop address
//   ADVANCE  advance the loop address (second RAM clock of the write)
//   SETTLE   wait TRIG_WAIT clocks so that the EMG branch (7 clocks from
//            the data-clock edge) has refreshed the trigger for this sample
//   CHECK    trigger rising edge (trigger high, and low at the previous
//            check)? yes: SEND, no: WAIT_LOW
//   SEND     N sink beats, 2 system clocks per beat (N*2 clocks)
//   WAIT_FFT wait for the last source beat (source eop) of the FFT
//   WAIT_LOW wait for clk500 low, then IDLE
// The source then waits for the trigger to fall before re-arming; here the
// rising-edge test at CHECK does the same job while samples keep being
// stored every period. The SETTLE wait makes the analysed frame end with the
// very sample whose EMG power raised the trigger. These two points are this
// design's.
// After reset the RAM is cleared (N cycles) so the first analysis sees
// defined data. enable=0 freezes the controller and the FFT clock enable.
module fft_controller
  import fall_risk_pkg::*;
#(
  parameter int unsigned N     = 256,
  parameter int unsigned SAMPLE_W = 24,
  parameter int unsigned TRIG_WAIT = 8,
  localparam int unsigned AW   = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    clk500,
  input  logic signed [SAMPLE_W-1:0] eeg_data,
  input  logic                    trigger,
  // EEG Block RAM
  output logic                    ram_we,
  output logic [AW-1:0]           ram_waddr,
  output logic [SAMPLE_W-1:0]        ram_wdata,
  output logic [AW-1:0]           ram_raddr,
  input  logic [SAMPLE_W-1:0]        ram_rdata,
  // FFT processor
  output logic                    fft_ce,
  output fft_beat_t               sink,
  input  logic                    sink_ready,
  input  fft_beat_t               source,
  // status
  output logic                    start,     // pulse: analysis started
  output logic                    busy
);
  typedef enum logic [3:0] {
    S_CLEAR, S_IDLE, S_WRITE, S_ADVANCE, S_SETTLE, S_CHECK, S_SEND, S_WAIT_FFT, S_WAIT_LOW
  } state_t;

  state_t           state;
  logic [AW-1:0]    wptr;        // loop address counter (oldest sample)
  logic [AW-1:0]    idx;         // beats sent
  logic             rd_ok;       // ram_rdata holds mem[ram_raddr]
  logic             trig_prev;
  logic [$clog2(TRIG_WAIT+1)-1:0] wait_cnt;
  logic             xfer;

  always_comb begin
    ram_we    = enable && (state == S_CLEAR || state == S_WRITE);
    ram_waddr = wptr;
    ram_wdata = (state == S_CLEAR) ? '0 : eeg_data;
    ram_raddr = wptr + idx;
    sink       = '0;
    sink.valid = (state == S_SEND) && rd_ok;
    sink.sop   = (idx == '0);
    sink.eop   = (idx == AW'(N - 1));
    sink.re    = FFT_DW'(signed'(ram_rdata));
    xfer       = enable && fft_ce && sink.valid && sink_ready;
    busy       = (state == S_SEND) || (state == S_WAIT_FFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CLEAR;
      wptr      <= '0;
      idx       <= '0;
      rd_ok     <= 1'b0;
      trig_prev <= 1'b0;
      wait_cnt  <= '0;
      fft_ce    <= 1'b0;
      start     <= 1'b0;
    end else begin
      start <= 1'b0;
      if (enable) begin
        fft_ce <= ~fft_ce;
        rd_ok  <= !xfer;
        unique case (state)
          S_CLEAR: begin
            wptr <= wptr + 1'b1;
            if (wptr == AW'(N - 1)) state <= S_IDLE;
          end
          S_IDLE:    if (clk500) state <= S_WRITE;
          S_WRITE:   state <= S_ADVANCE;
          S_ADVANCE: begin
            wptr     <= wptr + 1'b1;
            wait_cnt <= '0;
            state    <= S_SETTLE;
          end
          S_SETTLE: begin
            wait_cnt <= wait_cnt + 1'b1;
            if (wait_cnt == $bits(wait_cnt)'(TRIG_WAIT - 1)) state <= S_CHECK;
          end
          S_CHECK: begin
            trig_prev <= trigger;
            if (trigger && !trig_prev) begin
              idx   <= '0;
              rd_ok <= 1'b0;
              start <= 1'b1;
              state <= S_SEND;
            end else begin
              state <= S_WAIT_LOW;
            end
          end
          S_SEND: if (xfer) begin
            idx <= idx + 1'b1;
            if (idx == AW'(N - 1)) state <= S_WAIT_FFT;
          end
          S_WAIT_FFT: if (source.valid && source.eop) state <= S_WAIT_LOW;
          S_WAIT_LOW: if (!clk500) state <= S_IDLE;
          default:    state <= S_IDLE;
        endcase
      end
    end
  end
endmodule

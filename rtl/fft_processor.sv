// 256-point radix-2 butterfly FFT processor with streaming sink/source.
//
// Computes X[k] = sum_n x[n] exp(-j 2 pi n k / N) of N real EEG samples.
// The source asks for a 256-point, 24-bit-input butterfly FFT loaded from a
// sink and unloaded through a source with packet controls; the organisation
// below is this design's own:
//   LOAD    N sink beats, one per clock-enable (ce) cycle, written to an
//           in-place working memory at bit-reversed addresses.
//   COMPUTE log2(N) decimation-in-time stages. Each ce cycle performs NB
//           butterflies on disjoint pairs, so a stage takes N/(2*NB) ce
//           cycles; with N=256 and NB=4 the transform takes 256 ce cycles,
//           the compute time quoted for the prototype.
//   UNLOAD  N source beats in natural order, bin 0 first, one per ce cycle.
// ce is the 4 MHz FFT clock enable (every second cycle of the 8 MHz clock).
// A sink beat is taken on a clock where ce, sink.valid and sink_ready are
// all high; sink.sop must mark the first beat and sink.eop the last. A source
// beat is valid for the single clock cycle that source.valid is high.
//
// Arithmetic: two's complement, DW bits throughout, no scaling. Inputs are
// sign-extended from IN_W; the DW = IN_W + log2(N) bits hold the full growth
// of N-point sums, except the single corner of every sample at the negative
// full scale. Twiddles are TW_W-bit signed with TW_W-2 fraction bits (so +1
// is exact); products are rounded to nearest. The twiddle table is computed
// at elaboration from cos/sin.
module fft_processor
  import fall_risk_pkg::*;
#(
  parameter int unsigned N    = 256,
  parameter int unsigned IN_W = 24,
  parameter int unsigned NB   = 4,
  parameter int unsigned TW_W = 18,
  localparam int unsigned DW  = FFT_DW,
  localparam int unsigned LN  = $clog2(N)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  input  fft_beat_t sink,
  output logic      sink_ready,
  output fft_beat_t source
);
  localparam int unsigned HALF = N / 2;
  localparam int unsigned GPS  = HALF / NB;          // ce cycles per stage
  localparam int unsigned GW   = (GPS > 1) ? $clog2(GPS) : 1;
  localparam int unsigned SW   = (LN > 1) ? $clog2(LN) : 1;
  localparam int unsigned FRAC = TW_W - 2;
  localparam int unsigned PW   = DW + TW_W;

  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t tw_tab_t [HALF];

  function automatic tw_tab_t make_tw(input bit sine);
    tw_tab_t t;
    real     ang;
    for (int m = 0; m < int'(HALF); m++) begin
      ang = 6.283185307179586 * real'(m) / real'(N);
      if (sine) t[m] = tw_t'($rtoi(-$sin(ang) * real'(1 << FRAC) + ((-$sin(ang) >= 0.0) ? 0.5 : -0.5)));
      else      t[m] = tw_t'($rtoi( $cos(ang) * real'(1 << FRAC) + (( $cos(ang) >= 0.0) ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam tw_tab_t TW_RE = make_tw(1'b0);   //  cos(2 pi m / N)
  localparam tw_tab_t TW_IM = make_tw(1'b1);   // -sin(2 pi m / N)

  typedef enum logic [1:0] {S_LOAD, S_COMPUTE, S_UNLOAD} state_t;

  state_t                 state;
  logic signed [DW-1:0]   mem_re [N];
  logic signed [DW-1:0]   mem_im [N];
  logic [LN-1:0]          cnt;      // load / unload index
  logic [SW-1:0]          stage;
  logic [GW-1:0]          grp;

  function automatic logic [LN-1:0] bitrev(input logic [LN-1:0] a);
    for (int b = 0; b < int'(LN); b++) bitrev[b] = a[LN-1-b];
  endfunction

  // Rounded twiddle product: (a * w + 2^(FRAC-1)) >>> FRAC
  function automatic logic signed [DW-1:0] tmul(input logic signed [PW-1:0] p);
    logic signed [PW-1:0] r;
    r = (p + (PW'(1) <<< (FRAC - 1))) >>> FRAC;
    return r[DW-1:0];
  endfunction

  // Butterfly addressing for this cycle
  logic [LN-1:0]          top_a [NB];
  logic [LN-1:0]          bot_a [NB];
  logic [LN-2:0]          tw_a  [NB];
  logic signed [DW-1:0]   y_top_re [NB], y_top_im [NB];
  logic signed [DW-1:0]   y_bot_re [NB], y_bot_im [NB];

  always_comb begin
    for (int p = 0; p < int'(NB); p++) begin
      logic [LN-2:0]        k, j, hmask;
      logic [LN-1:0]        blk;
      logic signed [DW-1:0] ar, ai, br, bi, tr, ti;
      logic signed [TW_W-1:0] wr, wi;
      k        = (LN-1)'(int'(grp) * int'(NB) + p);
      hmask    = (LN-1)'((1 << stage) - 1);
      j        = k & hmask;
      blk      = LN'(k >> stage);
      top_a[p] = LN'((blk << (stage + 1)) | LN'(j));
      bot_a[p] = top_a[p] | LN'(1 << stage);
      tw_a[p]  = (LN-1)'(j << (LN - 1 - int'(stage)));
      ar = mem_re[top_a[p]];  ai = mem_im[top_a[p]];
      br = mem_re[bot_a[p]];  bi = mem_im[bot_a[p]];
      wr = TW_RE[tw_a[p]];    wi = TW_IM[tw_a[p]];
      tr = tmul(PW'(br) * PW'(wr) - PW'(bi) * PW'(wi));
      ti = tmul(PW'(br) * PW'(wi) + PW'(bi) * PW'(wr));
      y_top_re[p] = ar + tr;  y_top_im[p] = ai + ti;
      y_bot_re[p] = ar - tr;  y_bot_im[p] = ai - ti;
    end
  end

  always_comb sink_ready = (state == S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_LOAD;
      cnt    <= '0;
      stage  <= '0;
      grp    <= '0;
      source <= '0;
    end else begin
      source.valid <= 1'b0;
      if (ce) begin
        unique case (state)
          S_LOAD: if (sink.valid) begin
            cnt <= cnt + 1'b1;
            if (cnt == LN'(N - 1)) begin
              state <= S_COMPUTE;
              stage <= '0;
              grp   <= '0;
            end
          end
          S_COMPUTE: begin
            grp <= grp + 1'b1;
            if (grp == GW'(GPS - 1)) begin
              grp   <= '0;
              stage <= stage + 1'b1;
              if (stage == SW'(LN - 1)) begin
                state <= S_UNLOAD;
                cnt   <= '0;
              end
            end
          end
          S_UNLOAD: begin
            source.valid <= 1'b1;
            source.sop   <= (cnt == '0);
            source.eop   <= (cnt == LN'(N - 1));
            source.re    <= mem_re[cnt];
            source.im    <= mem_im[cnt];
            cnt          <= cnt + 1'b1;
            if (cnt == LN'(N - 1)) state <= S_LOAD;
          end
          default: state <= S_LOAD;
        endcase
      end
    end
  end

  // Working memory: written by the loader and by the butterflies.
  always_ff @(posedge clk) begin
    if (ce && state == S_LOAD && sink.valid) begin
      mem_re[bitrev(cnt)] <= DW'(signed'(sink.re[IN_W-1:0]));
      mem_im[bitrev(cnt)] <= '0;
    end else if (ce && state == S_COMPUTE) begin
      for (int p = 0; p < int'(NB); p++) begin
        mem_re[top_a[p]] <= y_top_re[p];
        mem_im[top_a[p]] <= y_top_im[p];
        mem_re[bot_a[p]] <= y_bot_re[p];
        mem_im[bot_a[p]] <= y_bot_im[p];
      end
    end
  end

  // Packet framing of the sink stream.
  a_sop_first: assert property (@(posedge clk) disable iff (!rst_n)
      (ce && sink_ready && sink.valid) |-> (sink.sop == (cnt == '0)));
  a_eop_last: assert property (@(posedge clk) disable iff (!rst_n)
      (ce && sink_ready && sink.valid) |-> (sink.eop == (cnt == LN'(N - 1))));
endmodule

// EMG squarer: rectifies and squares one two's complement EMG sample.
//
// The squared value is the instantaneous EMG power that the global and local
// moving-window averages accumulate. Squaring a signed value rectifies it in
// the same step, so no separate absolute-value stage is needed. The block is
// purely combinational, as the source describes ("asynchronous squarer").
// The output width is 2*IN_W: the largest square, (-2^(IN_W-1))^2, fits.
module emg_squarer #(
  parameter int unsigned IN_W = 16
) (
  input  logic signed [IN_W-1:0]   sample,
  output logic        [2*IN_W-1:0] square
);
  logic signed [2*IN_W-1:0] prod;

  always_comb begin
    prod   = sample * sample;
    square = prod;
  end
endmodule

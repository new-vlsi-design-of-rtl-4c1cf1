// add_sub: channel part of the branch metrics.
//
// With the noise variance term fixed (N0 = 2), the channel contribution of a
// trellis branch with BPSK label (xs, xp) is simply xs*Yd + xp*Yp, so the four
// possible values are -Yd-Yp, -Yd+Yp, +Yd-Yp and +Yd+Yp; no multiplier is
// needed. This matches the decoder's branch metric equations.
//
// Yd and Yp are signed fixed-point samples of DATA_W bits, DATA_FRAC of them
// fractional (default 6 bits, 3 integer + 3 fraction, range [-4, 3.875]).
// The node metrics are integers, so each sum is rounded to the nearest
// integer (ties upward) here; that rounding step is this design's choice,
// made so that the 8-bit integer metrics of the quantisation study can be
// used downstream.
//
// Purely combinational; sums[G00..G11] are indexed by the branch label.
module add_sub
  import map_pkg::*;
#(
  parameter int DATA_W    = 6,
  parameter int DATA_FRAC = 3
) (
  input  logic signed [DATA_W-1:0] yd,   // systematic channel sample
  input  logic signed [DATA_W-1:0] yp,   // parity channel sample
  output metric_vec_t              sums  // rounded +-Yd +-Yp, by label
);

  localparam int SW = DATA_W + 2;

  // Round a fixed-point sum to an integer metric.
  function automatic metric_t round_int(logic signed [SW-1:0] v);
    logic signed [SW-1:0] r;
    if (DATA_FRAC == 0) r = v;
    else                r = (v + SW'(1 <<< (DATA_FRAC - 1))) >>> DATA_FRAC;
    return metric_t'(r);
  endfunction

  logic signed [SW-1:0] d, p;

  always_comb begin
    d = SW'(yd);
    p = SW'(yp);
    sums[G00] = round_int(-d - p);
    sums[G01] = round_int(-d + p);
    sums[G10] = round_int( d - p);
    sums[G11] = round_int( d + p);
  end

endmodule

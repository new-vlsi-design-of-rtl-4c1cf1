// app_lut: a priori look-up table of the branch metric unit.
//
// The APP input is the log ratio ln(AP(+1)/AP(-1)) supplied by the other
// constituent decoder of a turbo decoder. The branch metrics need the two
// log probabilities themselves:
//   ln AP(+1) = APP - ln(1 + e^APP) = -ln(1 + e^-APP)
//   ln AP(-1) =     - ln(1 + e^APP)
// APP is an integer, clamped to [-8, 8]; both outputs are rounded to integers
// and so lie in [-8, 0]. Rounding ln(1 + e^k) to the nearest integer gives
// max(k, 0) for every integer k except k = 0, where ln 2 = 0.69 rounds to 1;
// the table below is built from that formula at elaboration time and is
// indexed by the clamped APP.
//
// The equations, the input range and the integer outputs follow the
// decoder's quantisation study; the round-to-nearest rule is this design's
// reading of "quantised into integer values". Purely combinational.
module app_lut
  import map_pkg::*;
#(
  parameter int APP_W   = 5,
  parameter int APP_MAX = 8
) (
  input  logic signed [APP_W-1:0] app,   // log a priori ratio, integer
  output metric_t                 pr1,   // ln AP(+1)
  output metric_t                 prm1   // ln AP(-1)
);

  localparam int NENT = 2 * APP_MAX + 1;

  // Integer nearest to ln(1 + e^k).
  function automatic int softplus_round(int k);
    return ((k > 0) ? k : 0) + ((k == 0) ? 1 : 0);
  endfunction

  typedef metric_t table_t [NENT];

  function automatic table_t build_table(bit plus);
    table_t t;
    for (int i = 0; i < NENT; i++) begin
      int k;
      k = i - APP_MAX;
      t[i] = metric_t'(plus ? -softplus_round(-k) : -softplus_round(k));
    end
    return t;
  endfunction

  localparam table_t LUT_P1 = build_table(1'b1);
  localparam table_t LUT_M1 = build_table(1'b0);

  int idx;

  always_comb begin
    if (int'(app) > APP_MAX)       idx = NENT - 1;
    else if (int'(app) < -APP_MAX) idx = 0;
    else                           idx = int'(app) + APP_MAX;
    pr1  = LUT_P1[idx];
    prm1 = LUT_M1[idx];
  end

endmodule

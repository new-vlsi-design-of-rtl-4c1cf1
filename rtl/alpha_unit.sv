// alpha_unit: forward node metric (alpha) recursion of the Max-Log-MAP decoder.
//
// For each of the four states, ln alpha_t(m) = max over the two predecessors
// m' of [ln alpha_{t-1}(m') + ln gamma_t(m', m)]: one add-compare-select
// unit per state, all four working in parallel. After the selection the
// largest of the four new metrics is subtracted from each (max normalisation),
// so the best state is 0 and no metric can grow without bound. Every add and
// the subtraction saturate to [-128, 127].
//
// Timing: the computation takes two clock cycles, as in the decoder
// description. Cycle 1 (g_valid high) registers the eight path sums; cycle 2
// compares, selects, normalises and updates `alpha`, and pulses `a_valid`
// in the following cycle. `alpha` holds alpha_{t-1} until the update, so a
// caller storing it in the cycle of g_valid stores the metric that belongs
// with gamma_t. g_valid must not be high in two consecutive cycles
// (checked by an assertion).
//
// `init` (or reset) loads the start-of-frame metrics: state 0 at 0 (log 1)
// and the other states at -128 (log 0), since the encoder starts in state 0.
// The register structure and handshake are this design's own choice.
module alpha_unit
  import map_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        init,      // reload the start-of-frame metrics
  input  logic        g_valid,   // gamma_t is on g
  input  metric_vec_t g,         // branch metrics by label
  output metric_vec_t alpha,     // current node metrics, by state
  output metric_t     max_a,     // maximum before the last normalisation
  output logic        a_valid    // alpha was updated in the previous cycle
);

  metric_vec_t xa, xb;           // path sums from the two predecessors
  logic        s1_valid;
  metric_vec_t sel;
  metric_t     mx;

  // Stage 2: compare-select and normalisation.
  always_comb begin
    for (int s = 0; s < NSTATES; s++) sel[s] = max2(xa[s], xb[s]);
    mx = max4(sel);
  end

  always_ff @(posedge clk) begin
    if (rst || init) begin
      for (int s = 0; s < NSTATES; s++) alpha[s] <= (s == 0) ? metric_t'(0) : M_NEGINF;
      xa       <= '0;
      xb       <= '0;
      s1_valid <= 1'b0;
      a_valid  <= 1'b0;
      max_a    <= '0;
    end else begin
      s1_valid <= g_valid;
      a_valid  <= s1_valid;
      if (g_valid) begin
        for (int s = 0; s < NSTATES; s++) begin
          xa[s] <= sat_add(alpha[PRED_A[s]], g[GA[s]]);
          xb[s] <= sat_add(alpha[PRED_B[s]], g[GB[s]]);
        end
      end
      if (s1_valid) begin
        for (int s = 0; s < NSTATES; s++) alpha[s] <= sat_sub(sel[s], mx);
        max_a <= mx;
      end
    end
  end

  a_spacing: assert property (@(posedge clk) disable iff (rst)
    g_valid |=> !g_valid)
    else $error("alpha_unit: gamma presented in two consecutive cycles");

endmodule

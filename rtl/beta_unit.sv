// beta_unit: backward node metric (beta) recursion of the Max-Log-MAP decoder.
//
// Runs after the whole frame has been received, from the last trellis step
// back to the first: ln beta_{t-1}(m') = max over the two successors m of
// [ln beta_t(m) + ln gamma_t(m', m)], one add-compare-select unit per state.
// As in the alpha unit, the maximum of the four new metrics is subtracted
// from each (max normalisation) and all arithmetic saturates to [-128, 127].
// Normalising beta by its own maximum follows the decoder's normalisation
// rule ("subtract the node metrics at each time from the maximum node metric
// at that time").
//
// Timing: two clock cycles per step, like the alpha unit. `g_valid` high
// registers the path sums; one cycle later `beta` is updated to beta_{t-1}.
// Until then `beta` holds beta_t, which the LLR unit uses together with the
// same gamma_t. g_valid must not be high in two consecutive cycles.
//
// `init` (or reset) loads the end-of-frame metrics: state 0 at 0 and the
// others at -128, because the encoder is terminated in state 0.
module beta_unit
  import map_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        init,      // load the end-of-frame metrics
  input  logic        g_valid,   // gamma_t (read back from memory) is on g
  input  metric_vec_t g,         // branch metrics by label
  output metric_vec_t beta,      // current node metrics, by state
  output logic        b_valid    // beta was updated in the previous cycle
);

  metric_vec_t y0, y1;           // path sums through the -1 and +1 branches
  logic        s1_valid;
  metric_vec_t sel;
  metric_t     mx;

  always_comb begin
    for (int s = 0; s < NSTATES; s++) sel[s] = max2(y0[s], y1[s]);
    mx = max4(sel);
  end

  always_ff @(posedge clk) begin
    if (rst || init) begin
      for (int s = 0; s < NSTATES; s++) beta[s] <= (s == 0) ? metric_t'(0) : M_NEGINF;
      y0       <= '0;
      y1       <= '0;
      s1_valid <= 1'b0;
      b_valid  <= 1'b0;
    end else begin
      s1_valid <= g_valid;
      b_valid  <= s1_valid;
      if (g_valid) begin
        for (int s = 0; s < NSTATES; s++) begin
          y0[s] <= sat_add(beta[SUCC0[s]], g[GS0[s]]);
          y1[s] <= sat_add(beta[SUCC1[s]], g[GS1[s]]);
        end
      end
      if (s1_valid)
        for (int s = 0; s < NSTATES; s++) beta[s] <= sat_sub(sel[s], mx);
    end
  end

  b_spacing: assert property (@(posedge clk) disable iff (rst)
    g_valid |=> !g_valid)
    else $error("beta_unit: gamma presented in two consecutive cycles");

endmodule

// llr_unit: soft output (log-likelihood ratio) calculation unit.
//
// For one trellis step t it computes
//   L_t = max over the '+1' transitions (m'->m) of [alpha_{t-1}(m') + gamma_t + beta_t(m)]
//       - max over the '-1' transitions         of [alpha_{t-1}(m') + gamma_t + beta_t(m)]
// with two add-compare trees (one per input value) and a subtractor, as in
// the decoder's soft output unit. All additions and the final subtraction
// saturate to the 8-bit range.
//
// It is a five-stage pipeline, so an LLR appears five clock cycles after its
// inputs (the decoder description gives five cycles per LLR value); a new
// step can enter every cycle:
//   1: alpha + beta for the eight transitions
//   2: + gamma                      (the a posteriori metrics)
//   3: max of pairs                 (four compares)
//   4: max of the '+1' and of the '-1' metrics
//   5: difference, registered on `l`, with `l_valid`
// The split of the work into the five stages is this design's choice.
module llr_unit
  import map_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  metric_vec_t alpha,     // alpha_{t-1}, by state
  input  metric_vec_t beta,      // beta_t, by state
  input  metric_vec_t g,         // gamma_t, by label
  output metric_t     l,         // LLR of bit t, positive means +1
  output logic        l_valid
);

  logic [4:0]  v;                // valid of each stage
  metric_vec_t i0, i1, z0, z1;   // per starting state, input -1 / +1
  metric_vec_t g_s1;
  metric_t     c0a, c0b, c1a, c1b, max0, max1;

  always_ff @(posedge clk) begin
    if (rst) begin
      v <= '0;
      l <= '0;
      {i0, i1, z0, z1, g_s1} <= '0;
      {c0a, c0b, c1a, c1b, max0, max1} <= '0;
    end else begin
      v <= {v[3:0], in_valid};
      // stage 1
      for (int s = 0; s < NSTATES; s++) begin
        i0[s] <= sat_add(alpha[s], beta[SUCC0[s]]);
        i1[s] <= sat_add(alpha[s], beta[SUCC1[s]]);
      end
      g_s1 <= g;
      // stage 2
      for (int s = 0; s < NSTATES; s++) begin
        z0[s] <= sat_add(i0[s], g_s1[GS0[s]]);
        z1[s] <= sat_add(i1[s], g_s1[GS1[s]]);
      end
      // stage 3
      c0a <= max2(z0[0], z0[1]);
      c0b <= max2(z0[2], z0[3]);
      c1a <= max2(z1[0], z1[1]);
      c1b <= max2(z1[2], z1[3]);
      // stage 4
      max0 <= max2(c0a, c0b);
      max1 <= max2(c1a, c1b);
      // stage 5
      if (v[3]) l <= sat_sub(max1, max0);
    end
  end

  assign l_valid = v[4];

endmodule

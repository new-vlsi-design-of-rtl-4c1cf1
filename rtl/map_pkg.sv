// map_pkg: types, constants and arithmetic shared by the Max-Log-MAP decoder.
//
// All metrics (branch metrics gamma, node metrics alpha and beta, the LLR)
// are 8-bit two's-complement integers. Every addition in the recursions
// saturates to [-128, 127] instead of wrapping, and -128 stands for
// "minus infinity" (log of probability zero). Node metrics are normalised
// each step by subtracting the largest of the four, so the best state sits
// at 0 and the others are negative.
//
// Trellis of the rate-1/2 RSC code with generators (7,5), state = (M1,M2):
//   from state 0: input -1 -> state 0, label 00 ; input +1 -> state 2, label 11
//   from state 1: input -1 -> state 2, label 00 ; input +1 -> state 0, label 11
//   from state 2: input -1 -> state 3, label 01 ; input +1 -> state 1, label 10
//   from state 3: input -1 -> state 1, label 01 ; input +1 -> state 3, label 10
// A label is (systematic, parity) with 0 = -1 and 1 = +1 in BPSK. The four
// branch metrics are therefore indexed by the label: G00, G01, G10, G11.
// The metric width, the saturation and the max normalisation follow the
// decoder's quantisation study; the names and helper functions are this
// implementation's own.
package map_pkg;

  localparam int METRIC_W = 8;
  localparam int NSTATES  = 4;

  typedef logic signed [METRIC_W-1:0] metric_t;
  // Four metrics, one per state or one per branch label, packed so that a
  // vector is also one RAM word.
  typedef metric_t [NSTATES-1:0] metric_vec_t;

  // Index of a branch metric by its (systematic, parity) label.
  typedef enum logic [1:0] {G00 = 2'd0, G01 = 2'd1, G10 = 2'd2, G11 = 2'd3} glabel_e;

  localparam metric_t M_MAX    = 8'sd127;
  localparam metric_t M_NEGINF = -8'sd128;

  // Saturating add of two metrics.
  function automatic metric_t sat_add(metric_t a, metric_t b);
    logic signed [METRIC_W:0] s;
    s = {a[METRIC_W-1], a} + {b[METRIC_W-1], b};
    if (s > 9'sd127)       return M_MAX;
    else if (s < -9'sd128) return M_NEGINF;
    else                   return s[METRIC_W-1:0];
  endfunction

  // Saturating subtract a - b.
  function automatic metric_t sat_sub(metric_t a, metric_t b);
    logic signed [METRIC_W:0] s;
    s = {a[METRIC_W-1], a} - {b[METRIC_W-1], b};
    if (s > 9'sd127)       return M_MAX;
    else if (s < -9'sd128) return M_NEGINF;
    else                   return s[METRIC_W-1:0];
  endfunction

  function automatic metric_t max2(metric_t a, metric_t b);
    return (a >= b) ? a : b;
  endfunction

  function automatic metric_t max4(metric_vec_t v);
    return max2(max2(v[0], v[1]), max2(v[2], v[3]));
  endfunction

  // Predecessors of each state: state s is reached from PRED_A[s] with the
  // branch label GA[s] and from PRED_B[s] with the label GB[s].
  localparam int PRED_A [NSTATES] = '{0, 2, 0, 2};
  localparam int PRED_B [NSTATES] = '{1, 3, 1, 3};
  localparam int GA     [NSTATES] = '{int'(G00), int'(G10), int'(G11), int'(G01)};
  localparam int GB     [NSTATES] = '{int'(G11), int'(G01), int'(G00), int'(G10)};

  // Successors of each state: state s goes to SUCC0[s] on input -1 with
  // label GS0[s], and to SUCC1[s] on input +1 with label GS1[s].
  localparam int SUCC0 [NSTATES] = '{0, 2, 3, 1};
  localparam int SUCC1 [NSTATES] = '{2, 0, 1, 3};
  localparam int GS0   [NSTATES] = '{int'(G00), int'(G00), int'(G01), int'(G01)};
  localparam int GS1   [NSTATES] = '{int'(G11), int'(G11), int'(G10), int'(G10)};

endpackage

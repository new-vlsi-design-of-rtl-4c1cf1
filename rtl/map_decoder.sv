// map_decoder: Max-Log-MAP (BCJR) soft-in soft-out decoder for the 4-state,
// rate-1/2 recursive systematic convolutional code with generators (7,5).
//
// It is one constituent decoder of a turbo decoder. Per trellis step it
// receives the noisy systematic and parity samples Yd and Yp and the a
// priori log ratio APP of the other constituent decoder, and after the
// frame it produces the log-likelihood ratio l of every information bit.
//
// Data flow:
//  forward phase  - add_sub, app_lut and gamma_add form the four branch
//                   metrics of the symbol (one cycle); alpha_unit advances
//                   the forward recursion (two cycles). The branch metrics go
//                   into RAM1 and the alpha values into RAM2, one word per
//                   step.
//  backward phase - after `block`, map_ctrl reads both memories from the last
//                   step back to the first; beta_unit runs the backward
//                   recursion from the stored branch metrics and, in the same
//                   step, llr_unit combines alpha_{t-1} from RAM2, gamma_t
//                   from RAM1 and the live beta_t into the LLR. Beta values are
//                   never stored, which is what lets the design get by with
//                   two memories.
//
// Interface (all synchronous to the rising edge of clk, rst active high):
//  start  - pulse for one cycle with a symbol on yd/yp/app; it is taken only
//           if busy is low in that cycle. At most every second cycle.
//  block  - pulse for one cycle, together with or after the last symbol of
//           the frame, to end the frame (frames of 1 to MAX_FRAME symbols).
//  l, l_valid - the LLRs, in reverse order (last bit of the frame first),
//           two cycles apart; the first appears 7 cycles after `block` when
//           `block` comes with the last symbol. Positive l means bit = 1.
//  busy   - high during the backward phase, for one cycle after every
//           accepted symbol, and when the frame is full.
// The encoder is assumed to start and end the frame in state 0 (terminated
// trellis). A frame of N symbols takes 2N cycles to receive at full rate and
// 2N + 6 cycles to decode after `block`.
//
// The architecture (branch metric unit without multipliers, parallel ACS
// units, LLR in the backward pass, two memories, 8-bit saturating metrics
// with max normalisation) follows the decoder description. The data input
// width of 6 bits follows its quantisation study. The ports l_valid and busy,
// the reverse output order signalled by l_valid, and the cycle schedule are
// this design's own choices.
module map_decoder
  import map_pkg::*;
#(
  parameter int MAX_FRAME = 1024,
  parameter int DATA_W    = 6,
  parameter int DATA_FRAC = 3,
  parameter int APP_W     = 5
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic                     block,
  input  logic signed [DATA_W-1:0] yd,
  input  logic signed [DATA_W-1:0] yp,
  input  logic signed [APP_W-1:0]  app,
  output metric_t                  l,
  output logic                     l_valid,
  output logic                     busy
);

  localparam int ADDR_W = $clog2(MAX_FRAME);

  metric_vec_t       sums, g, alpha, beta, g_rd, a_rd;
  metric_t           pr1, prm1, max_a;
  logic              accept, g_valid, a_valid, b_valid;
  logic              ram_me, ram_we, bwd_valid, beta_init, alpha_init, bwd_phase;
  logic [ADDR_W-1:0] ram_addr;
  logic [ADDR_W:0]   frame_len;

  // Branch metric calculation unit.
  add_sub #(.DATA_W(DATA_W), .DATA_FRAC(DATA_FRAC)) u_add_sub (
    .yd(yd), .yp(yp), .sums(sums));

  app_lut #(.APP_W(APP_W)) u_lut (
    .app(app), .pr1(pr1), .prm1(prm1));

  gamma_add u_gamma (
    .clk(clk), .rst(rst), .en(accept), .sums(sums), .pr1(pr1), .prm1(prm1),
    .g(g), .g_valid(g_valid));

  // Forward recursion.
  alpha_unit u_alpha (
    .clk(clk), .rst(rst), .init(alpha_init), .g_valid(g_valid), .g(g),
    .alpha(alpha), .max_a(max_a), .a_valid(a_valid));

  // Control.
  map_ctrl #(.MAX_FRAME(MAX_FRAME)) u_ctrl (
    .clk(clk), .rst(rst), .start(start), .block(block), .g_valid(g_valid),
    .accept(accept), .busy(busy), .bwd_phase(bwd_phase),
    .ram_me(ram_me), .ram_we(ram_we), .ram_addr(ram_addr),
    .bwd_valid(bwd_valid), .beta_init(beta_init), .alpha_init(alpha_init),
    .frame_len(frame_len));

  // RAM1: branch metrics. RAM2: alpha values. Same address for both.
  metric_ram #(.DEPTH(MAX_FRAME)) u_ram1 (
    .clk(clk), .me(ram_me), .we(ram_we), .addr(ram_addr), .d(g), .q(g_rd));

  metric_ram #(.DEPTH(MAX_FRAME)) u_ram2 (
    .clk(clk), .me(ram_me), .we(ram_we), .addr(ram_addr), .d(alpha), .q(a_rd));

  // Backward recursion and soft output.
  beta_unit u_beta (
    .clk(clk), .rst(rst), .init(beta_init), .g_valid(bwd_valid), .g(g_rd),
    .beta(beta), .b_valid(b_valid));

  llr_unit u_llr (
    .clk(clk), .rst(rst), .in_valid(bwd_valid), .alpha(a_rd), .beta(beta),
    .g(g_rd), .l(l), .l_valid(l_valid));

endmodule

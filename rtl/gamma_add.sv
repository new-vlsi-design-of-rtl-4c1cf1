// gamma_add: final adders and output register of the branch metric unit.
//
// Adds the channel sums from add_sub and the a priori log probabilities from
// app_lut, as in the branch metric equations of the decoder:
//   g00 = (-Yd-Yp) + ln AP(-1)     g01 = (-Yd+Yp) + ln AP(-1)
//   g10 = (+Yd-Yp) + ln AP(+1)     g11 = (+Yd+Yp) + ln AP(+1)
// The four metrics are registered when `en` is high (one accepted input
// symbol) and `g_valid` pulses for one cycle in the next clock cycle, so the
// unit has one cycle of latency. The additions saturate to the 8-bit metric
// range (they cannot overflow with the default input widths).
// Reset is synchronous and active high; it only clears g_valid.
module gamma_add
  import map_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,       // a new symbol is on the inputs
  input  metric_vec_t sums,     // from add_sub
  input  metric_t     pr1,      // ln AP(+1) from app_lut
  input  metric_t     prm1,     // ln AP(-1) from app_lut
  output metric_vec_t g,        // branch metrics by label
  output logic        g_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      g_valid <= 1'b0;
      g       <= '0;
    end else begin
      g_valid <= en;
      if (en) begin
        g[G00] <= sat_add(sums[G00], prm1);
        g[G01] <= sat_add(sums[G01], prm1);
        g[G10] <= sat_add(sums[G10], pr1);
        g[G11] <= sat_add(sums[G11], pr1);
      end
    end
  end

endmodule

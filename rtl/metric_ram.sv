// metric_ram: single-port synchronous RAM for one frame of metrics.
//
// One word holds the four 8-bit metrics of one trellis step (the four branch
// metrics, or the four alpha values), so DEPTH words of 32 bits store a frame
// of up to DEPTH bits: 4096 bytes for the default 1024-bit frame, the memory
// size the decoder calls for. The decoder uses two instances: one for the
// branch metrics and one for the alpha values; beta is never stored.
//
// Interface in the style of a compiled SRAM macro: `me` enables the memory
// for the cycle, with `we` high it writes `d` to `addr`, with `we` low it
// reads `addr` and presents the word on `q` in the next cycle. `q` holds its
// value until the next read. Contents are not reset.
module metric_ram
  import map_pkg::*;
#(
  parameter int DEPTH  = 1024,
  parameter int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              me,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  metric_vec_t       d,
  output metric_vec_t       q
);

  metric_vec_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (me) begin
      if (we) mem[addr] <= d;
      else    q         <= mem[addr];
    end
  end

endmodule

// map_ctrl: frame controller of the Max-Log-MAP decoder.
//
// The decoder works on one frame at a time in two phases, as in the
// decoder's block diagram:
//  * forward (busy low between symbols): each `start` pulse accepted while
//    `busy` is low takes one symbol (Yd, Yp, APP) from the input bus. One
//    cycle later its four branch metrics arrive on g_valid and are written,
//    together with the alpha values that precede them, at the next address
//    of both memories. The alpha unit needs two cycles per step, so `busy`
//    is also high for the one cycle after every accepted symbol.
//  * backward (busy high): `block` marks the end of the frame. After one
//    cycle that lets the last symbol reach memory, the beta unit is loaded
//    with its end-of-frame metrics and the memories are read from the last
//    address down to address 0, one read every two cycles (the beta
//    recursion needs two cycles per step). In the cycle after each read,
//    `bwd_valid` tells the beta and LLR units that gamma_t and alpha_{t-1}
//    are on the memory outputs. Five more cycles let the LLR pipeline empty;
//    then the alpha unit is reloaded and `busy` falls.
//
// A frame may hold 1 to MAX_FRAME symbols; once MAX_FRAME symbols have been
// taken, `busy` stays high until `block`. A `block` with no symbol in the
// frame is ignored, and `start` or `block` during the backward phase is
// ignored. The phase split and the busy signal follow the decoder
// description; the exact cycle schedule is this design's own.
module map_ctrl #(
  parameter int MAX_FRAME = 1024,
  parameter int ADDR_W    = $clog2(MAX_FRAME),
  parameter int FLUSH_CYC = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,       // one symbol is on the input bus
  input  logic              block,       // end of the frame
  input  logic              g_valid,     // branch metrics of an accepted symbol are ready
  output logic              accept,      // the symbol on the bus is taken this cycle
  output logic              busy,        // start is not accepted this cycle
  output logic              bwd_phase,   // backward recursion is running
  output logic              ram_me,
  output logic              ram_we,
  output logic [ADDR_W-1:0] ram_addr,
  output logic              bwd_valid,   // memory outputs hold step t of the backward pass
  output logic              beta_init,   // load the end-of-frame beta metrics
  output logic              alpha_init,  // load the start-of-frame alpha metrics
  output logic [ADDR_W:0]   frame_len    // symbols in the current frame
);

  typedef enum logic [2:0] {FWD, DRAIN, RD, WAITQ, FLUSH} state_e;

  state_e            state;
  logic              accept_d;
  logic [ADDR_W:0]   n_acc;     // symbols accepted in this frame
  logic [ADDR_W-1:0] wr_addr;
  logic [ADDR_W-1:0] rd_addr;
  logic [3:0]        flush_cnt;
  logic              wr_now;

  assign busy       = (state != FWD) || accept_d || (n_acc == (ADDR_W+1)'(MAX_FRAME));
  assign accept     = start && !busy;
  assign bwd_phase  = (state == RD) || (state == WAITQ) || (state == FLUSH);
  assign wr_now     = g_valid && ((state == FWD) || (state == DRAIN));
  assign bwd_valid  = (state == WAITQ);
  assign beta_init  = (state == DRAIN);
  assign alpha_init = (state == FLUSH) && (flush_cnt == 4'd0);
  assign frame_len  = n_acc;

  always_comb begin
    ram_me   = 1'b0;
    ram_we   = 1'b0;
    ram_addr = wr_addr;
    if (wr_now) begin
      ram_me = 1'b1;
      ram_we = 1'b1;
    end else if (state == RD) begin
      ram_me   = 1'b1;
      ram_addr = rd_addr;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= FWD;
      accept_d  <= 1'b0;
      n_acc     <= '0;
      wr_addr   <= '0;
      rd_addr   <= '0;
      flush_cnt <= '0;
    end else begin
      accept_d <= accept;
      if (accept) n_acc <= n_acc + 1'b1;
      if (wr_now) wr_addr <= wr_addr + 1'b1;
      unique case (state)
        FWD: begin
          if (block && (n_acc != 0 || accept)) state <= DRAIN;
        end
        DRAIN: begin
          rd_addr <= ADDR_W'(n_acc - 1'b1);
          state   <= RD;
        end
        RD: state <= WAITQ;
        WAITQ: begin
          if (rd_addr == '0) begin
            flush_cnt <= 4'(FLUSH_CYC - 1);
            state     <= FLUSH;
          end else begin
            rd_addr <= rd_addr - 1'b1;
            state   <= RD;
          end
        end
        FLUSH: begin
          if (flush_cnt == 4'd0) begin
            state   <= FWD;
            n_acc   <= '0;
            wr_addr <= '0;
          end else begin
            flush_cnt <= flush_cnt - 1'b1;
          end
        end
        default: state <= FWD;
      endcase
    end
  end

  // Every symbol taken in the forward phase is in memory before the reads start.
  wr_before_rd: assert property (@(posedge clk) disable iff (rst)
    (state == RD) |-> !g_valid)
    else $error("map_ctrl: branch metrics arrived during the backward phase");

endmodule

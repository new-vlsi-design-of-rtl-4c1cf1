// tb_map_ctrl: drives the frame controller through frames of random length
// (including a full frame), with start offered every cycle or with gaps,
// start offered during the backward phase, an empty block, and block in the
// same cycle as the last symbol. The branch-metric-ready signal is modelled
// as the accept signal delayed by one cycle, like the real branch metric
// unit. Checks the write addresses (0, 1, ... in order), the read addresses
// (last to first, one every two cycles), bwd_valid one cycle after each read,
// the init pulses, and the length of the backward phase (2N + 6 cycles).
module tb_map_ctrl;
  localparam int MAXF = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, block = 0, g_valid = 0;
  logic accept, busy, bwd_phase, ram_me, ram_we, bwd_valid, beta_init, alpha_init;
  logic [3:0] ram_addr;
  logic [4:0] frame_len;
  int full_frames = 0, ignored_starts = 0, same_cycle_blocks = 0;

  map_ctrl #(.MAX_FRAME(MAXF)) dut (
    .clk(clk), .rst(rst), .start(start), .block(block), .g_valid(g_valid),
    .accept(accept), .busy(busy), .bwd_phase(bwd_phase), .ram_me(ram_me), .ram_we(ram_we),
    .ram_addr(ram_addr), .bwd_valid(bwd_valid), .beta_init(beta_init),
    .alpha_init(alpha_init), .frame_len(frame_len));

  always #5 clk = ~clk;
  always @(posedge clk) g_valid <= rst ? 1'b0 : accept;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, msg);
    end
  endtask

  // Run one frame of n symbols; returns after busy has fallen.
  task automatic run_frame(int n, bit dense, bit block_with_last);
    int taken, wr_expect, last_read, bwd_cycles, reads, valids, prev_read_cyc, cyc;
    bit read_prev;
    taken = 0; wr_expect = 0; reads = 0; valids = 0; bwd_cycles = 0;
    read_prev = 0; prev_read_cyc = -10; cyc = 0;
    last_read = n;
    // forward phase
    while (taken < n) begin
      @(negedge clk);
      cyc++;
      start = dense ? 1'b1 : 1'($urandom_range(1, 0));
      block = block_with_last && (taken == n - 1) && start && !busy;
      #1;
      if (ram_me && ram_we) begin
        check(int'(ram_addr) == wr_expect, "write address out of order");
        wr_expect++;
      end
      if (start && !busy) taken++;
      check(accept == (start && !busy), "accept differs from start && !busy");
    end
    if (block_with_last) same_cycle_blocks++;
    if (n == MAXF && !block_with_last) begin
      // frame full: further starts are refused
      @(negedge clk);
      start = 1; block = 0;
      #1;
      if (ram_me && ram_we) begin
        check(int'(ram_addr) == wr_expect, "write address out of order");
        wr_expect++;
      end
      check(busy && !accept, "start accepted into a full frame");
      full_frames++;
    end
    if (!block_with_last) begin
      @(negedge clk);
      start = 0; block = 1;
      #1;
      if (ram_me && ram_we) begin
        check(int'(ram_addr) == wr_expect, "write address out of order");
        wr_expect++;
      end
    end
    // backward phase: count cycles until busy drops
    @(negedge clk);
    block = 0;
    start = 1;                       // offered throughout, must be ignored
    #1;
    while (busy) begin
      bwd_cycles++;
      if (ram_me && ram_we) begin
        check(int'(ram_addr) == wr_expect, "write address out of order");
        wr_expect++;
      end else if (ram_me) begin
        reads++;
        check(int'(ram_addr) == last_read - 1, "read address not descending");
        check(bwd_cycles - prev_read_cyc == 2 || reads == 1, "reads not two cycles apart");
        prev_read_cyc = bwd_cycles;
        last_read = int'(ram_addr);
      end
      if (bwd_valid) begin
        valids++;
        check(read_prev, "bwd_valid not one cycle after a read");
      end
      read_prev = ram_me && !ram_we;
      check(!accept, "start accepted during the backward phase");
      if (start) ignored_starts++;
      @(negedge clk);
      #1;
    end
    start = 0;
    check(wr_expect == n, "not every symbol was written");
    check(reads == n, "wrong number of reads");
    check(valids == n, "wrong number of bwd_valid cycles");
    check(bwd_cycles == 2 * n + 6, $sformatf("backward phase took %0d cycles, expected %0d", bwd_cycles, 2*n+6));
    check(last_read == 0, "reads did not reach address 0");
  endtask

  // init pulses
  int beta_inits = 0, alpha_inits = 0;
  always @(posedge clk) begin
    if (beta_init) beta_inits++;
    if (alpha_init) alpha_inits++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // a block with no symbols is ignored
    @(negedge clk); block = 1;
    @(negedge clk); block = 0; #1;
    check(!busy, "empty block started a backward phase");
    for (int f = 0; f < 40; f++) begin
      int n;
      n = (f % 5 == 0) ? MAXF : int'($urandom_range(MAXF, 1));
      run_frame(n, f % 2 == 0, f % 3 == 0);
    end
    check(beta_inits == 40, "beta_init count");
    check(alpha_inits == 40, "alpha_init count");
    check(full_frames > 0, "no full frame");
    check(ignored_starts > 0, "no start ignored");
    check(same_cycle_blocks > 0, "no block with the last symbol");
    $display("full frames %0d, starts ignored while busy %0d, blocks with last symbol %0d",
             full_frames, ignored_starts, same_cycle_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

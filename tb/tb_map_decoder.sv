// tb_map_decoder: end-to-end test of the decoder at its default parameters.
//
// Random information bits are encoded with the (7,5) RSC code, terminated
// in state 0, sent as BPSK over an additive noise channel and quantised to
// the 6-bit input format; random a priori values (some outside the [-8, 8]
// table range) are applied on app. Each frame is decoded by the hardware and
// by the reference model, and every LLR must match exactly. Noise-free
// frames must also decode to the transmitted bits.
//
// Frames: random lengths from 10 to 512 symbols, one frame of the maximum
// 1024 symbols, frames with start offered every cycle (so half of the starts
// meet busy and are refused) or with gaps, and block given with the last
// symbol or after it. Timing checks: first LLR 7 cycles after a block given
// with the last symbol, LLRs two cycles apart, busy low again 2N + 6 cycles
// after that block.
//
// Mechanisms counted (each must happen at least once): saturation of a
// metric addition, a nonzero max normalisation in the alpha unit, a start
// refused while busy, a full frame, a block with the last symbol, an APP
// value clamped by the table, a frame that decodes without error.
module tb_map_decoder;
  import map_pkg::*;
  import map_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, block = 0;
  logic signed [5:0] yd = '0, yp = '0;
  logic signed [4:0] app = '0;
  metric_t l;
  logic l_valid, busy;

  map_decoder dut (.clk(clk), .rst(rst), .start(start), .block(block), .yd(yd), .yp(yp),
                   .app(app), .l(l), .l_valid(l_valid), .busy(busy));

  always #5 clk = ~clk;

  int n_sat = 0, n_norm = 0, n_refused = 0, n_full = 0, n_blk_last = 0, n_clamp = 0, n_clean = 0;
  int cyc = 0;
  int llr_got [$];
  int llr_cyc [$];

  always @(negedge clk) begin
    cyc++;
    if (l_valid) begin
      llr_got.push_back(int'(l));
      llr_cyc.push_back(cyc);
    end
    if (dut.u_alpha.a_valid && dut.u_alpha.max_a != 0) n_norm++;
  end

  initial begin
    #50ms;
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

  task automatic run_frame(int n_info, real amp, real sigma, bit dense, bit blk_last, bit app_on);
    int d[], xp[], yd_v[], yp_v[], app_v[], ref_llr[];
    int n, taken, blk_cyc, errors;
    n = n_info + 2;
    encode(n_info, d, xp);
    yd_v = new[n]; yp_v = new[n]; app_v = new[n];
    for (int t = 0; t < n; t++) begin
      yd_v[t]  = quantise(d[t], amp, sigma, 6, 3);
      yp_v[t]  = quantise(xp[t], amp, sigma, 6, 3);
      app_v[t] = app_on ? int'($urandom_range(24, 0)) - 12 : 0;
      if (app_v[t] > 8 || app_v[t] < -8) n_clamp++;
    end
    clamp_hits = 0;
    decode(yd_v, yp_v, app_v, 3, ref_llr);
    if (clamp_hits > 0) n_sat++;
    llr_got.delete();
    llr_cyc.delete();
    taken = 0;
    blk_cyc = 0;
    while (taken < n) begin
      @(negedge clk);
      #1;
      start = dense ? 1'b1 : 1'($urandom_range(1, 0));
      yd  = 6'(yd_v[taken]);
      yp  = 6'(yp_v[taken]);
      app = 5'(app_v[taken]);
      block = blk_last && (taken == n - 1) && start && !busy;
      if (start && busy) n_refused++;
      if (start && !busy) begin
        taken++;
        if (block) blk_cyc = cyc + 1;
      end
    end
    if (!blk_last) begin
      @(negedge clk);
      #1;
      start = 0;
      block = 1;
    end else n_blk_last++;
    @(negedge clk);
    #1;
    start = 0;
    block = 0;
    while (busy) begin
      @(negedge clk);
      #1;
    end
    if (blk_last)
      check(cyc - blk_cyc == 2 * n + 6, $sformatf("busy fell %0d cycles after block, expected %0d", cyc - blk_cyc, 2*n+6));
    if (n == 1024) n_full++;
    // compare; the hardware emits the last bit first
    check(llr_got.size() == n, $sformatf("got %0d LLRs, expected %0d", llr_got.size(), n));
    errors = 0;
    for (int i = 0; i < llr_got.size() && i < n; i++) begin
      int t;
      t = n - 1 - i;
      checks++;
      if (llr_got[i] != ref_llr[t]) begin
        failures++;
        if (failures < 20) $display("frame n=%0d bit %0d: LLR %0d, reference %0d", n, t, llr_got[i], ref_llr[t]);
      end
      if ((llr_got[i] > 0) != (d[t] == 1)) errors++;
      if (i > 0) check(llr_cyc[i] - llr_cyc[i-1] == 2, "LLRs not two cycles apart");
    end
    if (blk_last && llr_cyc.size() > 0)
      check(llr_cyc[0] - blk_cyc == 7, $sformatf("first LLR %0d cycles after block, expected 7", llr_cyc[0] - blk_cyc));
    if (sigma == 0.0 && !app_on) begin
      check(errors == 0, $sformatf("noise-free frame decoded with %0d bit errors", errors));
      if (errors == 0) n_clean++;
    end
    $display("frame %0d symbols, amp %0.2f sigma %0.2f: %0d bit errors, %0d saturations",
             n, amp, sigma, errors, clamp_hits);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run_frame(20, 1.0, 0.0, 1, 1, 0);
    run_frame(100, 1.0, 0.0, 0, 0, 0);
    run_frame(1022, 1.0, 0.5, 1, 1, 1);
    for (int f = 0; f < 8; f++)
      run_frame(int'($urandom_range(510, 8)), (f % 2) ? 1.0 : 2.0, (f % 3) * 0.4,
                f % 2 == 0, f % 3 != 1, f % 4 != 0);
    run_frame(300, 3.5, 0.0, 1, 1, 0);
    check(n_sat > 0,      "saturation never happened");
    check(n_norm > 0,     "normalisation never shifted a metric");
    check(n_refused > 0,  "no start was refused while busy");
    check(n_full > 0,     "no full frame");
    check(n_blk_last > 0, "no block with the last symbol");
    check(n_clamp > 0,    "no APP value outside the table range");
    check(n_clean > 0,    "no noise-free frame decoded");
    $display("saturating frames %0d, normalisations %0d, refused starts %0d, full frames %0d, blocks with last %0d, clamped APP %0d, clean frames %0d",
             n_sat, n_norm, n_refused, n_full, n_blk_last, n_clamp, n_clean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

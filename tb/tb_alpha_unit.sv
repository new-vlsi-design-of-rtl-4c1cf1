// tb_alpha_unit: runs the forward recursion on random branch metrics (small
// ones as in normal operation and large ones that drive the adders into
// saturation) and compares every new alpha vector with a reference step
// built from the encoder equations. Checks the two-cycle update timing,
// that alpha holds between steps, and the reload by init.
module tb_alpha_unit;
  import map_pkg::*;
  import map_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, init = 0, g_valid = 0;
  metric_vec_t g, alpha;
  metric_t max_a;
  logic a_valid;
  int ref_a [4];

  alpha_unit dut (.clk(clk), .rst(rst), .init(init), .g_valid(g_valid), .g(g),
                  .alpha(alpha), .max_a(max_a), .a_valid(a_valid));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_alpha(string what);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (int'(alpha[s]) != ref_a[s]) begin
        failures++;
        if (failures < 10) $display("%s: alpha[%0d] got %0d exp %0d", what, s, alpha[s], ref_a[s]);
      end
    end
  endtask

  initial begin
    g = '0;
    for (int s = 0; s < 4; s++) ref_a[s] = (s == 0) ? 0 : -128;
    repeat (2) @(negedge clk);
    rst = 0;
    check_alpha("reset");
    clamp_hits = 0;
    for (int it = 0; it < 3000; it++) begin
      int gl [4];
      int nw [4];
      int mx, gap;
      bit big;
      big = ($urandom_range(9, 0) == 0);
      for (int k = 0; k < 4; k++) begin
        gl[k] = big ? int'($urandom_range(255, 0)) - 128 : int'($urandom_range(24, 0)) - 16;
        g[k]  = metric_t'(gl[k]);
      end
      // reference step
      for (int s = 0; s < 4; s++) nw[s] = -1000;
      for (int s = 0; s < 4; s++)
        for (int d = 0; d < 2; d++) begin
          int v;
          v = clamp8(ref_a[s] + gl[d*2 + parity(s, d)]);
          if (v > nw[next_state(s, d)]) nw[next_state(s, d)] = v;
        end
      mx = nw[0];
      for (int s = 1; s < 4; s++) if (nw[s] > mx) mx = nw[s];
      g_valid = 1;
      @(negedge clk);
      g_valid = 0;
      g = ~g;                      // inputs may change after the valid cycle
      checks++;
      if (a_valid) failures++;     // not yet after one cycle
      check_alpha("hold");         // still the old value
      for (int s = 0; s < 4; s++) ref_a[s] = clamp8(nw[s] - mx);
      @(negedge clk);
      checks++;
      if (!a_valid) begin failures++; $display("a_valid missing"); end
      checks++;
      if (int'(max_a) != mx) failures++;
      check_alpha("step");
      gap = int'($urandom_range(2, 0));
      repeat (gap) @(negedge clk);
      if (it % 500 == 499) begin
        init = 1;
        @(negedge clk);
        init = 0;
        for (int s = 0; s < 4; s++) ref_a[s] = (s == 0) ? 0 : -128;
        check_alpha("init");
      end
    end
    checks++;
    if (clamp_hits == 0) begin failures++; $display("saturation never exercised"); end
    $display("saturating additions exercised: %0d", clamp_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_beta_unit: runs the backward recursion on random branch metrics (small
// and saturating ones) and compares every new beta vector with a reference
// step built from the encoder equations: beta_{t-1}(s) is the best of
// beta_t(next(s,d)) + gamma over the two inputs d, normalised by its maximum.
// Checks the two-cycle update, that beta holds until then, and init.
module tb_beta_unit;
  import map_pkg::*;
  import map_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, init = 0, g_valid = 0;
  metric_vec_t g, beta;
  logic b_valid;
  int ref_b [4];

  beta_unit dut (.clk(clk), .rst(rst), .init(init), .g_valid(g_valid), .g(g),
                 .beta(beta), .b_valid(b_valid));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_beta(string what);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (int'(beta[s]) != ref_b[s]) begin
        failures++;
        if (failures < 10) $display("%s: beta[%0d] got %0d exp %0d", what, s, beta[s], ref_b[s]);
      end
    end
  endtask

  initial begin
    g = '0;
    for (int s = 0; s < 4; s++) ref_b[s] = (s == 0) ? 0 : -128;
    repeat (2) @(negedge clk);
    rst = 0;
    check_beta("reset");
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
      for (int s = 0; s < 4; s++) begin
        nw[s] = -1000;
        for (int d = 0; d < 2; d++) begin
          int v;
          v = clamp8(ref_b[next_state(s, d)] + gl[d*2 + parity(s, d)]);
          if (v > nw[s]) nw[s] = v;
        end
      end
      mx = nw[0];
      for (int s = 1; s < 4; s++) if (nw[s] > mx) mx = nw[s];
      g_valid = 1;
      @(negedge clk);
      g_valid = 0;
      g = ~g;
      checks++;
      if (b_valid) failures++;
      check_beta("hold");
      for (int s = 0; s < 4; s++) ref_b[s] = clamp8(nw[s] - mx);
      @(negedge clk);
      checks++;
      if (!b_valid) begin failures++; $display("b_valid missing"); end
      check_beta("step");
      gap = int'($urandom_range(2, 0));
      repeat (gap) @(negedge clk);
      if (it % 500 == 499) begin
        init = 1;
        @(negedge clk);
        init = 0;
        for (int s = 0; s < 4; s++) ref_b[s] = (s == 0) ? 0 : -128;
        check_beta("init");
      end
    end
    checks++;
    if (clamp_hits == 0) begin failures++; $display("saturation never exercised"); end
    $display("saturating additions exercised: %0d", clamp_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_llr_unit: streams random alpha, beta and gamma vectors into the soft
// output pipeline, one per cycle with random gaps, and compares each LLR
// with the reference max over the '+1' transitions minus the max over the
// '-1' transitions. Checks that every result appears exactly five cycles
// after its inputs and that no extra result appears.
module tb_llr_unit;
  import map_pkg::*;
  import map_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  metric_vec_t alpha, beta, g;
  metric_t l;
  logic l_valid;
  int exp_q [$];
  int cyc = 0;
  int in_cyc_q [$];

  llr_unit dut (.clk(clk), .rst(rst), .in_valid(in_valid), .alpha(alpha), .beta(beta),
                .g(g), .l(l), .l_valid(l_valid));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor, sampled at the negative edge
  always @(negedge clk) begin
    if (!rst) begin
      cyc++;
      if (l_valid) begin
        checks += 2;
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected LLR");
        end else begin
          int e, c;
          e = exp_q.pop_front();
          c = in_cyc_q.pop_front();
          if (int'(l) != e) begin
            failures++;
            if (failures < 10) $display("LLR got %0d exp %0d", l, e);
          end
          if (cyc - c != 5) begin
            failures++;
            $display("LLR latency %0d cycles, expected 5", cyc - c);
          end
        end
      end
    end
  end

  initial begin
    alpha = '0; beta = '0; g = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    clamp_hits = 0;
    for (int it = 0; it < 4000; it++) begin
      int a [4], b [4], gl [4];
      int m0, m1;
      bit big;
      big = ($urandom_range(7, 0) == 0);
      for (int k = 0; k < 4; k++) begin
        a[k]  = big ? int'($urandom_range(255, 0)) - 128 : -int'($urandom_range(40, 0));
        b[k]  = big ? int'($urandom_range(255, 0)) - 128 : -int'($urandom_range(40, 0));
        gl[k] = big ? int'($urandom_range(255, 0)) - 128 : int'($urandom_range(24, 0)) - 16;
        alpha[k] = metric_t'(a[k]);
        beta[k]  = metric_t'(b[k]);
        g[k]     = metric_t'(gl[k]);
      end
      m0 = -1000; m1 = -1000;
      for (int s = 0; s < 4; s++)
        for (int d = 0; d < 2; d++) begin
          int p;
          p = clamp8(clamp8(a[s] + b[next_state(s, d)]) + gl[d*2 + parity(s, d)]);
          if (d == 1 && p > m1) m1 = p;
          if (d == 0 && p > m0) m0 = p;
        end
      exp_q.push_back(clamp8(m1 - m0));
      in_cyc_q.push_back(cyc + 1);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(3, 0) == 0) repeat ($urandom_range(3, 1)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d LLRs missing", exp_q.size()); end
    checks++;
    if (clamp_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

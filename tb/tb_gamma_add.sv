// tb_gamma_add: random operands; checks the four branch metric sums, their
// saturation, that g_valid follows en by one cycle and that g holds when en
// is low.
module tb_gamma_add;
  import map_pkg::*;
  import map_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0;
  metric_vec_t sums, g;
  metric_t pr1, prm1;
  logic g_valid;

  gamma_add dut (.clk(clk), .rst(rst), .en(en), .sums(sums), .pr1(pr1), .prm1(prm1),
                 .g(g), .g_valid(g_valid));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e [4];
    sums = '0; pr1 = '0; prm1 = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int it = 0; it < 2000; it++) begin
      int s [4];
      int p1, m1;
      bit big;
      big = (it % 4 == 0);
      for (int k = 0; k < 4; k++) begin
        s[k] = big ? int'($urandom_range(255, 0)) - 128 : int'($urandom_range(16, 0)) - 8;
        sums[k] = metric_t'(s[k]);
      end
      p1 = big ? int'($urandom_range(255, 0)) - 128 : -int'($urandom_range(8, 0));
      m1 = big ? int'($urandom_range(255, 0)) - 128 : -int'($urandom_range(8, 0));
      pr1 = metric_t'(p1);
      prm1 = metric_t'(m1);
      en = 1;
      @(posedge clk);
      #1;
      en = 0;
      e[0] = clamp8(s[0] + m1);
      e[1] = clamp8(s[1] + m1);
      e[2] = clamp8(s[2] + p1);
      e[3] = clamp8(s[3] + p1);
      checks++;
      if (!g_valid) failures++;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(g[k]) != e[k]) begin
          failures++;
          $display("g[%0d] got %0d exp %0d", k, g[k], e[k]);
        end
      end
      // change inputs with en low: output must hold, g_valid must fall
      sums = ~sums;
      @(posedge clk);
      #1;
      checks++;
      if (g_valid) failures++;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(g[k]) != e[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

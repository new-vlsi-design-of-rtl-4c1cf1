// tb_add_sub: exhaustive check of the channel sums of the branch metric unit.
// Every pair of 6-bit samples is applied and the four rounded sums are
// compared with values computed in real arithmetic by the reference package.
module tb_add_sub;
  import map_pkg::*;
  import map_ref_pkg::*;

  int checks = 0, failures = 0;
  logic signed [5:0] yd, yp;
  metric_vec_t sums;

  add_sub #(.DATA_W(6), .DATA_FRAC(3)) dut (.yd(yd), .yp(yp), .sums(sums));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -32; a < 32; a++)
      for (int b = -32; b < 32; b++) begin
        yd = 6'(a);
        yp = 6'(b);
        #1;
        for (int xs = 0; xs < 2; xs++)
          for (int xp = 0; xp < 2; xp++) begin
            int exp_v;
            exp_v = chan_sum(a, b, xs, xp, 3);
            checks++;
            if (int'(sums[xs*2 + xp]) != exp_v) begin
              failures++;
              if (failures < 10)
                $display("add_sub mismatch yd=%0d yp=%0d label=%0d%0d got %0d exp %0d",
                         a, b, xs, xp, sums[xs*2+xp], exp_v);
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

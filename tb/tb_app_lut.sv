// tb_app_lut: exhaustive check of the a priori look-up table against
// ln AP(+1) = -ln(1+e^-APP) and ln AP(-1) = -ln(1+e^APP) rounded to the
// nearest integer, with APP clamped to [-8, 8].
module tb_app_lut;
  import map_pkg::*;
  import map_ref_pkg::*;

  int checks = 0, failures = 0;
  logic signed [4:0] app;
  metric_t pr1, prm1;

  app_lut #(.APP_W(5)) dut (.app(app), .pr1(pr1), .prm1(prm1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = -16; k < 16; k++) begin
      app = 5'(k);
      #1;
      checks += 3;
      if (int'(pr1) != ln_ap(k, 1)) begin
        failures++;
        $display("pr1 mismatch app=%0d got %0d exp %0d", k, pr1, ln_ap(k, 1));
      end
      if (int'(prm1) != ln_ap(k, 0)) begin
        failures++;
        $display("prm1 mismatch app=%0d got %0d exp %0d", k, prm1, ln_ap(k, 0));
      end
      // outputs stay in [-8, 0]
      if (pr1 > 0 || prm1 > 0 || pr1 < -8 || prm1 < -8) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

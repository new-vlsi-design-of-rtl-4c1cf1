// tb_metric_ram: fills the memory with random words, reads them back in
// random order, and checks the one-cycle read latency, that q holds between
// reads and that nothing happens while me is low.
module tb_metric_ram;
  import map_pkg::*;

  localparam int DEPTH = 1024;
  int checks = 0, failures = 0;
  logic clk = 0, me = 0, we = 0;
  logic [9:0] addr = '0;
  metric_vec_t d = '0, q;
  metric_vec_t model [DEPTH];

  metric_ram #(.DEPTH(DEPTH)) dut (.clk(clk), .me(me), .we(we), .addr(addr), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = metric_vec_t'($urandom());
      me = 1; we = 1; addr = 10'(a); d = model[a];
      @(negedge clk);
    end
    // writes with me low must be ignored
    me = 0; we = 1; addr = 10'd5; d = ~model[5];
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      int a;
      a = int'($urandom_range(DEPTH - 1, 0));
      me = 1; we = 0; addr = 10'(a);
      @(negedge clk);
      checks++;
      if (q !== model[a]) begin
        failures++;
        if (failures < 10) $display("read %0d got %h exp %h", a, q, model[a]);
      end
      // one idle cycle: q must hold
      me = 0; addr = 10'($urandom_range(DEPTH - 1, 0));
      @(negedge clk);
      checks++;
      if (q !== model[a]) failures++;
      // occasionally overwrite a word
      if (i % 7 == 0) begin
        model[a] = metric_vec_t'($urandom());
        me = 1; we = 1; addr = 10'(a); d = model[a];
        @(negedge clk);
        me = 0; we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

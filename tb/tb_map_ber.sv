// tb_map_ber: bit error rate and throughput of the decoder on the frame
// sizes the quantisation study uses (512-bit and 400-bit blocks, rate 1/2
// (7,5) RSC code, BPSK over additive white Gaussian noise, one decoding pass
// with no a priori information), at the decoder's default parameters.
//
// For each frame the hardware LLRs must equal the reference model bit for
// bit, the hard decisions are compared with the transmitted bits, and the
// errors are summed against those of a plain hard decision on the
// systematic samples. The decoded error count must be below the uncoded
// one at every noise level tried. The BPSK amplitude is 2.0 in the input
// format (4 signed integer bits, 3 fraction bits); sigma follows from
// Eb/N0 and the code rate: sigma = amp / sqrt(2 * R * Eb/N0). The block
// sizes and the single pass follow the decoder's quantisation study; the
// amplitude, the three Eb/N0 points (1.0, 2.5, 4.0 dB) and the number of
// frames are this testbench's own choices.
//
// Throughput: starts are offered every cycle, so a frame of N symbols takes
// 2N cycles to load and 2N + 6 cycles from block to the end of the
// backward pass. The testbench measures this, prints the resulting rate at
// a 143 MHz clock and checks that it stays within 11 cycles per bit, the
// figure the 13 Mb/s single-pass rate corresponds to.
module tb_map_ber;
  import map_pkg::*;
  import map_ref_pkg::*;

  localparam real AMP = 2.0;
  localparam real F_MHZ = 143.0;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, block = 0;
  logic signed [5:0] yd = '0, yp = '0;
  logic signed [4:0] app = '0;
  metric_t l;
  logic l_valid, busy;

  map_decoder dut (.clk(clk), .rst(rst), .start(start), .block(block), .yd(yd), .yp(yp),
                   .app(app), .l(l), .l_valid(l_valid), .busy(busy));

  always #5 clk = ~clk;

  int cyc = 0;
  int llr_got [$];

  always @(negedge clk) begin
    cyc++;
    if (l_valid) llr_got.push_back(int'(l));
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

  // Decodes one frame of n_info bits plus two tail bits; returns the decoded
  // and uncoded error counts over the information bits and the cycles used.
  task automatic run_frame(int n_info, real sigma, output int dec_err, output int unc_err,
                           output int cycles);
    int d[], xp[], yd_v[], yp_v[], app_v[], ref_llr[];
    int n, taken, c0, mism;
    n = n_info + 2;
    encode(n_info, d, xp);
    yd_v = new[n]; yp_v = new[n]; app_v = new[n];
    for (int t = 0; t < n; t++) begin
      yd_v[t]  = quantise(d[t], AMP, sigma, 6, 3);
      yp_v[t]  = quantise(xp[t], AMP, sigma, 6, 3);
      app_v[t] = 0;
    end
    decode(yd_v, yp_v, app_v, 3, ref_llr);
    llr_got.delete();
    taken = 0;
    c0 = cyc;
    while (taken < n) begin
      @(negedge clk);
      #1;
      start = 1'b1;
      yd    = 6'(yd_v[taken]);
      yp    = 6'(yp_v[taken]);
      app   = '0;
      block = (taken == n - 1) && !busy;
      if (!busy) taken++;
    end
    @(negedge clk);
    #1;
    start = 0;
    block = 0;
    while (busy) begin
      @(negedge clk);
      #1;
    end
    cycles = cyc - c0;
    check(llr_got.size() == n, $sformatf("got %0d LLRs, expected %0d", llr_got.size(), n));
    dec_err = 0;
    unc_err = 0;
    mism = 0;
    for (int i = 0; i < llr_got.size() && i < n; i++) begin
      int t;
      t = n - 1 - i;
      if (llr_got[i] != ref_llr[t]) mism++;
      if (t < n_info) begin
        if ((llr_got[i] > 0) != (d[t] == 1)) dec_err++;
        if ((yd_v[t] >= 0) != (d[t] == 1))   unc_err++;
      end
    end
    check(mism == 0, $sformatf("%0d LLRs differ from the reference in a %0d-symbol frame", mism, n));
  endtask

  task automatic run_point(int n_info, real ebn0_db, int frames);
    real ebn0, sigma, rate;
    int dec_tot, unc_tot, de, ue, cy, cy_max;
    ebn0  = 10.0 ** (ebn0_db / 10.0);
    sigma = AMP / $sqrt(2.0 * 0.5 * ebn0);
    dec_tot = 0;
    unc_tot = 0;
    cy_max  = 0;
    for (int f = 0; f < frames; f++) begin
      run_frame(n_info, sigma, de, ue, cy);
      dec_tot += de;
      unc_tot += ue;
      if (cy > cy_max) cy_max = cy;
    end
    rate = F_MHZ * real'(n_info) / real'(cy_max);
    $display("block %0d, Eb/N0 %0.1f dB, %0d frames: decoded BER %0.5f, uncoded BER %0.5f, %0d cycles per frame, %0.1f Mb/s at %0.0f MHz",
             n_info, ebn0_db, frames, real'(dec_tot) / real'(frames * n_info),
             real'(unc_tot) / real'(frames * n_info), cy_max, rate, F_MHZ);
    check(dec_tot < unc_tot, $sformatf("block %0d at %0.1f dB: %0d decoded errors, not fewer than %0d uncoded",
                                       n_info, ebn0_db, dec_tot, unc_tot));
    check(cy_max <= 11 * n_info, $sformatf("block %0d: %0d cycles, more than 11 per bit", n_info, cy_max));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int p = 0; p < 3; p++) begin
      run_point(512, 1.0 + 1.5 * p, 6);
      run_point(400, 1.0 + 1.5 * p, 6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

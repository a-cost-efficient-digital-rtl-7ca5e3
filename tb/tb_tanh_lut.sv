// tb_tanh_lut: reads every entry of the slope/intercept tables through both
// ports and checks the piece-wise linear tanh they define against $tanh.
// For each entry i and each of the 256 delta codes d the approximation
//   f_hat = (intercept_i + (slope_i*d >> 6)) * 2^-19
// at s = 8i/1024 + d*2^-15 must be within 8e-6 of tanh(s) (the document's
// best table reaches a 7.6e-6 maximum error); the average error must stay
// below 2e-6. Read latency must be one clock on both ports.
module tb_tanh_lut;
  import esn_pkg::*;

  logic clk = 1'b0;
  logic [LUT_AW-1:0]  a0, a1;
  logic [SLOPE_W-1:0] slope0, slope1;
  logic [ICPT_W-1:0]  icpt0, icpt1;

  tanh_lut dut (.clk, .a0, .a1, .slope0, .icpt0, .slope1, .icpt1);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SLOPE_W-1:0] sl [1024];
    logic [ICPT_W-1:0]  ic [1024];
    real err, emax, esum, s, fh;
    int  bad;
    // port 0 walks up, port 1 walks down
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      a0 = LUT_AW'(i);
      a1 = LUT_AW'(1023 - i);
      @(posedge clk);
      #1;
      sl[i] = slope0;
      ic[i] = icpt0;
      checks++;
      if (i >= 512 && (slope1 !== sl[1023 - i] || icpt1 !== ic[1023 - i])) begin
        failures++;
        $display("FAIL port 1 entry %0d differs from port 0", 1023 - i);
      end
    end
    // one-cycle latency: the output changes on the first edge after the address
    @(negedge clk) a0 = 10'd5;
    @(negedge clk) a0 = 10'd900;
    #1;
    checks++;
    if (icpt0 !== ic[5]) begin
      failures++;
      $display("FAIL read latency is not one clock");
    end
    emax = 0.0;
    esum = 0.0;
    bad  = 0;
    for (int i = 0; i < 1024; i++) begin
      real lmax;
      lmax = 0.0;
      for (int d = 0; d < 256; d++) begin
        s   = 8.0 * real'(i) / 1024.0 + real'(d) / 32768.0;
        fh  = real'(int'(ic[i]) + ((int'(sl[i]) * d) >> 6)) / 524288.0;
        err = $tanh(s) - fh;
        if (err < 0.0) err = -err;
        esum += err;
        if (err > lmax) lmax = err;
      end
      if (lmax > emax) emax = lmax;
      checks++;
      if (lmax > 8.0e-6) begin
        failures++;
        if (bad++ < 5) $display("FAIL entry %0d max error %e", i, lmax);
      end
    end
    $display("tanh table: max abs error %e, average %e", emax, esum / (1024.0 * 256.0));
    checks++;
    if (esum / (1024.0 * 256.0) > 2.0e-6) begin
      failures++;
      $display("FAIL average error too large");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

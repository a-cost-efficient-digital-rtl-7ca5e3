// tb_reservoir_neuron: two neurons sharing one tanh table pair, driven by a
// phase schedule written here (the same spacing the sequencer uses). Random
// weights and states give sums of both signs, small and beyond the +/-8
// saturation point. Checks, per neuron and batch:
//   - s in DSP12 equals the exact integer dot product sum(w*z)
//   - x is within 4e-5 of tanh(s * 2^-32) (LUT error plus the dropped
//     low bits of s), and exactly +/-(1-2^-19) when |s| >= 8
//   - x_valid comes D+14 cycles after the first row address
module tb_reservoir_neuron;
  import esn_pkg::*;

  localparam int D      = 3;      // z rows per batch: up to 27 terms
  localparam int NBATCH = 2;
  localparam int WDEPTH = D * NBATCH;
  localparam int WAW    = $clog2(WDEPTH);

  logic clk = 1'b0, rst = 1'b1;
  nctrl_t ctrl;
  state_t z_row [NDSP];
  state_t zmem [D][NDSP];
  logic [WAW-1:0] w_raddr;
  logic [1:0] w_we;
  logic [WAW-1:0] w_waddr;
  logic [3:0] w_wbank;
  weight_t w_wdata;
  logic [LUT_AW-1:0] lut_addr [2];
  logic [SLOPE_W-1:0] lut_slope [2];
  logic [ICPT_W-1:0] lut_icpt [2];
  state_t x [2];
  pword_t s [2];
  logic [1:0] x_valid;

  for (genvar n = 0; n < 2; n++) begin : g_n
    reservoir_neuron #(.WDEPTH(WDEPTH)) dut (
      .clk, .rst, .ctrl, .z_row, .w_raddr,
      .w_we(w_we[n]), .w_waddr, .w_wbank, .w_wdata,
      .lut_addr(lut_addr[n]), .lut_slope(lut_slope[n]), .lut_icpt(lut_icpt[n]),
      .s(s[n]), .x(x[n]), .x_valid(x_valid[n])
    );
  end
  tanh_lut u_lut (.clk, .a0(lut_addr[0]), .a1(lut_addr[1]),
                  .slope0(lut_slope[0]), .icpt0(lut_icpt[0]),
                  .slope1(lut_slope[1]), .icpt1(lut_icpt[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_neg = 0, n_sat = 0, n_pos = 0;
  weight_t wts [2][WDEPTH][NDSP];
  logic [WAW-1:0] raddr_q;
  pword_t s_at_lut [2];

  // state memory model: one-cycle read latency
  always_ff @(posedge clk) raddr_q <= w_raddr;
  always_comb for (int k = 0; k < int'(NDSP); k++) z_row[k] = zmem[int'(raddr_q) % D][k];

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_batch(input int b, output int lat);
    int t;
    lat = -1;
    for (t = 0; t <= D + 16; t++) begin
      ctrl = '0;
      ctrl.macc       = (t >= 1 && t <= D);
      ctrl.macc_first = (t == 1);
      ctrl.cmp1       = (t == D + 3);
      ctrl.cmp2       = (t == D + 6);
      ctrl.lut_rd     = (t == D + 9);
      ctrl.nl         = (t == D + 10);
      ctrl.x_cap      = (t == D + 13);
      w_raddr = WAW'(b * D + ((t < D) ? t : 0));
      if (x_valid[0] && lat < 0) lat = t;
      if (ctrl.lut_rd) s_at_lut = s;
      @(negedge clk);
    end
    ctrl = '0;
  endtask

  initial begin
    longint s_exp [2];
    real s_real, xr, err;
    int lat, scale;
    ctrl = '0; w_we = '0; w_waddr = '0; w_wbank = '0; w_wdata = '0; w_raddr = '0;
    for (int r = 0; r < D; r++) for (int k = 0; k < int'(NDSP); k++) zmem[r][k] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int trial = 0; trial < 60; trial++) begin
      // weight range: small, medium, large sums
      scale = (trial % 3 == 0) ? 2 : (trial % 3 == 1) ? 6 : 15;
      for (int n = 0; n < 2; n++)
        for (int r = 0; r < WDEPTH; r++)
          for (int k = 0; k < int'(NDSP); k++) begin
            wts[n][r][k] = weight_t'($signed($urandom) >>> (31 - scale));
            @(negedge clk);
            w_we = 2'(1 << n); w_waddr = WAW'(r); w_wbank = 4'(k); w_wdata = wts[n][r][k];
          end
      @(negedge clk) w_we = '0;
      for (int r = 0; r < D; r++)
        for (int k = 0; k < int'(NDSP); k++) zmem[r][k] = state_t'($urandom);
      for (int b = 0; b < NBATCH; b++) begin
        for (int n = 0; n < 2; n++) begin
          s_exp[n] = 0;
          for (int r = 0; r < D; r++)
            for (int k = 0; k < int'(NDSP); k++)
              s_exp[n] += longint'(wts[n][b*D+r][k]) * longint'(zmem[r][k]);
        end
        run_batch(b, lat);
        checks++;
        if (lat != D + 14) begin
          failures++;
          $display("FAIL x_valid after %0d cycles, expected %0d", lat, D + 14);
        end
        for (int n = 0; n < 2; n++) begin
          // exact linear combination left in DSP12
          checks++;
          if (longint'(s_at_lut[n]) != s_exp[n]) begin
            failures++;
            $display("FAIL neuron %0d batch %0d s=%0d expected %0d", n, b,
                     longint'(s_at_lut[n]), s_exp[n]);
          end
          s_real = real'(s_exp[n]) / 4294967296.0;
          xr     = real'(x[n]) / 524288.0;
          checks++;
          if (s_real >= 8.0 || s_real <= -8.0) begin
            n_sat++;
            if (x[n] != (s_real > 0 ? state_t'(20'sh7FFFF) : -state_t'(20'sh7FFFF))) begin
              failures++;
              $display("FAIL saturation: s=%f x=%f", s_real, xr);
            end
          end else begin
            if (s_real < 0) n_neg++; else n_pos++;
            err = xr - $tanh(s_real);
            if (err < 0) err = -err;
            if (err > 4.0e-5) begin
              failures++;
              $display("FAIL neuron %0d s=%f x=%f tanh=%f", n, s_real, xr, $tanh(s_real));
            end
          end
        end
      end
    end
    $display("cases: positive %0d negative %0d saturated %0d", n_pos, n_neg, n_sat);
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL a case class was never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

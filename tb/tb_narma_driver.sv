// tb_narma_driver: runs the NARMA10 task on one esn_top instance.
//
// The NARMA10 system
//   d(t+1) = 0.3 d(t) + 0.05 d(t) sum_{i=0..9} d(t-i) + 1.5 u(t-9) u(t) + 0.1
// is driven by u(t) uniform in [0, 0.5]. A random reservoir (half of the
// weights non-zero, uniform with a spread that puts the spectral radius
// near 0.95; input weights in +/-0.5) is loaded into the accelerator. The
// reference ESN is run in real arithmetic over TRAIN steps; the output
// weights are then found by ridge regression,
//   Wout = D Z^T (Z Z^T + beta I)^-1,  Z = {x(n); u(n)},
// solved here by Gaussian elimination, quantised to <32,14> and loaded.
// The accelerator runs the same TRAIN + TEST steps (the training part
// brings its state to the same point); on the TEST steps the NMSE of the
// accelerator's y against d is compared with the NMSE of the reference
// model with unquantised weights. Checks: the reference learns the task
// (NMSE below 0.8), the accelerator's NMSE is within 10% + 0.01 of the
// reference's, and every step takes the expected number of cycles.
module tb_narma_driver
  import esn_pkg::*;
#(
  parameter int  N_RES  = 20,
  parameter int  N_PHYS = 20,
  parameter int  TRAIN  = 1000,
  parameter int  TEST   = 200,
  parameter real BETA   = 1.0e-4
) (
  input  logic        clk,
  output logic        rst,
  output logic        cfg_we,
  output logic [31:0] cfg_addr,
  output logic [31:0] cfg_wdata,
  input  logic        busy,
  input  logic        done,
  input  yword_t      y [1],
  output logic        finished,
  output int          checks,
  output int          failures
);

  localparam int K     = N_RES + 1;
  localparam int T     = TRAIN + TEST;
  localparam int ZROWS = (K + 8) / 9;
  localparam int XROWS = (N_RES + 8) / 9;
  localparam int NB    = (N_RES + N_PHYS - 1) / N_PHYS;
  localparam int STEP_CYCLES = NB * (ZROWS + 15) + XROWS + (ZROWS * 11 + 2) + 2;

  int  wq [N_RES][K];
  real u  [T];
  real d  [T];
  real xr [N_RES];
  real xn [N_RES];
  real zz [K][K+1];     // normal equations, augmented with Z d^T
  real wo [K];
  real ysw [TEST];
  real yhw [TEST];

  task automatic wr(input logic [31:0] a, input logic [31:0] dat);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = dat;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic int qw(real v);
    int q;
    q = int'($floor(v * 8192.0 + 0.5));
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return q;
  endfunction

  function automatic real urand();
    return (real'($urandom) / 4294967296.0) * 2.0 - 1.0;
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real nmse(real a [TEST], real ref_d [TEST]);
    real mean, num, den;
    mean = 0.0; num = 0.0; den = 0.0;
    for (int t = 0; t < TEST; t++) mean += ref_d[t];
    mean /= real'(TEST);
    for (int t = 0; t < TEST; t++) begin
      num += (a[t] - ref_d[t]) ** 2;
      den += (ref_d[t] - mean) ** 2;
    end
    return (num / real'(TEST)) / (den / real'(TEST - 1));
  endfunction

  initial begin
    real s, acc, piv, f, n_sw, n_hw, wmax;
    real dtest [TEST];
    real z [K];
    int  cyc, bad_cycles, uq;
    rst = 1'b1; cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0;
    finished = 1'b0; checks = 0; failures = 0;

    // NARMA10 series
    for (int t = 0; t < T; t++) u[t] = real'($urandom_range(0, 1 << 19)) / real'(1 << 20);
    for (int t = 0; t < T; t++) begin
      real sum10, dprev;
      dprev = (t > 0) ? d[t-1] : 0.0;
      sum10 = 0.0;
      for (int i = 1; i <= 10; i++) if (t - i >= 0) sum10 += d[t-i];
      d[t] = (t > 0) ? 0.3 * dprev + 0.05 * dprev * sum10
                       + 1.5 * ((t >= 10) ? u[t-10] : 0.0) * u[t-1] + 0.1
                     : 0.1;
    end
    // d[t] depends on u up to t-1; the ESN at step t sees u[t] and learns d[t+1]

    // reservoir
    for (int i = 0; i < N_RES; i++) begin
      for (int j = 0; j < N_RES; j++)
        wq[i][j] = ($urandom_range(0, 1) == 1) ? qw(urand() * 0.95 * $sqrt(6.0 / real'(N_RES))) : 0;
      wq[i][N_RES] = qw(0.5 * urand());
    end

    // reference run over the training part and the normal equations
    for (int i = 0; i < K; i++) for (int j = 0; j <= K; j++) zz[i][j] = 0.0;
    for (int i = 0; i < N_RES; i++) xr[i] = 0.0;
    for (int t = 0; t < T; t++) begin
      for (int i = 0; i < N_RES; i++) begin
        s = real'(wq[i][N_RES]) / 8192.0 * u[t];
        for (int j = 0; j < N_RES; j++) s += real'(wq[i][j]) / 8192.0 * xr[j];
        xn[i] = $tanh(s);
      end
      xr = xn;
      for (int i = 0; i < N_RES; i++) z[i] = xr[i];
      z[N_RES] = u[t];
      if (t < TRAIN) begin
        if (t >= 50)     // washout
          for (int i = 0; i < K; i++) begin
            for (int j = 0; j < K; j++) zz[i][j] += z[i] * z[j];
            zz[i][K] += z[i] * ((t + 1 < T) ? d[t+1] : 0.0);
          end
        if (t == TRAIN - 1) begin
          for (int i = 0; i < K; i++) zz[i][i] += BETA;
          for (int c = 0; c < K; c++) begin
            int pr;
            pr = c;
            for (int r = c + 1; r < K; r++) if (fabs(zz[r][c]) > fabs(zz[pr][c])) pr = r;
            for (int j = 0; j <= K; j++) begin f = zz[c][j]; zz[c][j] = zz[pr][j]; zz[pr][j] = f; end
            piv = zz[c][c];
            for (int r = 0; r < K; r++)
              if (r != c) begin
                f = zz[r][c] / piv;
                for (int j = c; j <= K; j++) zz[r][j] -= f * zz[c][j];
              end
          end
          wmax = 0.0;
          for (int i = 0; i < K; i++) begin
            wo[i] = zz[i][K] / zz[i][i];
            if (fabs(wo[i]) > wmax) wmax = fabs(wo[i]);
          end
        end
      end else begin
        acc = 0.0;
        for (int i = 0; i < K; i++) acc += wo[i] * z[i];
        ysw[t - TRAIN]   = acc;
        dtest[t - TRAIN] = (t + 1 < T) ? d[t+1] : d[t];
      end
    end

    // load the accelerator
    repeat (4) @(negedge clk);
    rst = 1'b0;
    for (int v = 0; v < N_RES; v++)
      for (int j = 0; j < K; j++)
        wr({4'd0, 8'(v % N_PHYS), 16'((v / N_PHYS) * ZROWS + j / 9), 4'(j % 9)}, 32'(wq[v][j]));
    for (int j = 0; j < K; j++) wr({4'd1, 8'd0, 20'(j)}, 32'(int'($floor(wo[j] * 16384.0 + 0.5))));

    bad_cycles = 0;
    for (int t = 0; t < T; t++) begin
      uq = int'($floor(u[t] * 524288.0));
      wr({4'd2, 8'd0, 20'd0}, 32'(uq));
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = {4'd3, 28'd0}; cfg_wdata = 32'd1;
      @(negedge clk);
      cfg_we = 1'b0;
      cyc = 1;
      while (!done && cyc < 100000) begin
        @(negedge clk);
        cyc++;
      end
      if (cyc != STEP_CYCLES) bad_cycles++;
      if (t >= TRAIN) yhw[t - TRAIN] = real'(y[0]) / 65536.0;
    end

    n_sw = nmse(ysw, dtest);
    n_hw = nmse(yhw, dtest);
    $display("NARMA10 N=%0d: largest |Wout| %f, test NMSE software %f, accelerator %f",
             N_RES, wmax, n_sw, n_hw);
    checks += 3;
    if (bad_cycles != 0) begin
      failures++;
      $display("FAIL N=%0d: %0d steps with a wrong cycle count", N_RES, bad_cycles);
    end
    if (n_sw > 0.8) begin
      failures++;
      $display("FAIL N=%0d: the reference ESN did not learn the task", N_RES);
    end
    if (n_hw > 1.1 * n_sw + 0.01) begin
      failures++;
      $display("FAIL N=%0d: accelerator NMSE too far from the reference", N_RES);
    end
    finished = 1'b1;
  end
endmodule

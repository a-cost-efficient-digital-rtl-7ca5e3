// tb_esn_driver: host and reference model for end-to-end runs of esn_top.
//
// Builds a random reservoir (recurrent weights scaled so that every row's
// absolute sum stays near 0.9, which keeps errors from growing over time),
// input weights (every third neuron gets +3.99 on all inputs so that steps
// with all inputs at +/-0.95 drive it beyond the +/-8 saturation point
// when there are three or more inputs), output weights in +/-WO_SCALE and random
// inputs. It loads everything through the register interface, then runs
// STEPS time steps. For each step it
//   - writes u(n), starts the step, and (while busy) tries to overwrite
//     u(n), which must be dropped;
//   - checks the start-to-done time against
//     NB*(ZROWS+15) + XROWS + (ZROWS*11+2) + 2 cycles;
//   - computes x(n) = tanh(W x(n-1) + Win u(n)) and y(n) in real arithmetic
//     from the quantised weights, clamps it to the output range, and compares
//     y with a bound made of a
//     1e-4 state error times sum|Wout| plus two output LSBs.
// It counts the mechanisms it exercises (time-multiplexed batches, a
// partial last batch, saturation, negative sums, dropped writes) and with
// REQUIRE_ALL counts a failure for any that never happened. It prints the
// TB_RESULT line and ends the simulation.
module tb_esn_driver
  import esn_pkg::*;
#(
  parameter int N_RES       = 100,
  parameter int N_PHYS      = 20,
  parameter int M_IN        = 1,
  parameter int L_OUT       = 1,
  parameter int STEPS       = 10,
  parameter bit REQUIRE_ALL = 1'b0,
  parameter real WO_SCALE   = 1.0
) (
  input  logic        clk,
  output logic        rst,
  output logic        cfg_we,
  output logic [31:0] cfg_addr,
  output logic [31:0] cfg_wdata,
  input  logic        busy,
  input  logic        done,
  input  yword_t      y [L_OUT]
);

  localparam int K     = N_RES + M_IN;
  localparam int ZROWS = (K + 8) / 9;
  localparam int XROWS = (N_RES + 8) / 9;
  localparam int NB    = (N_RES + N_PHYS - 1) / N_PHYS;
  localparam int STEP_CYCLES = NB * (ZROWS + 15) + XROWS + (ZROWS * 11 + 2) + 2;

  int checks = 0, failures = 0;
  int n_ysat = 0, n_batches = 0, n_partial = 0, n_sat = 0, n_neg = 0, n_dropped = 0;

  int  wq   [N_RES][K];        // reservoir + input weights, <16,13> codes
  int  woq  [L_OUT][K];        // output weights, <32,14> codes
  real xr   [N_RES];
  real xn   [N_RES];
  real ur   [M_IN];
  int  uq   [M_IN];
  real max_err = 0.0;

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic int qw(real v);     // to <16,13>, clamped
    int q;
    q = int'($floor(v * 8192.0 + 0.5));
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return q;
  endfunction

  function automatic real urand();       // uniform in [-1, 1)
    return (real'($urandom) / 4294967296.0) * 2.0 - 1.0;
  endfunction

  initial begin
    real a, s, yref, tol, sumabs, err;
    int  cyc;
    rst = 1'b1; cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0;
    a = 1.8 / real'(N_RES);
    for (int i = 0; i < N_RES; i++) begin
      for (int j = 0; j < N_RES; j++)
        wq[i][j] = ($urandom_range(0, 1) == 1) ? qw(urand() * 2.0 * a) : 0;
      for (int m = 0; m < M_IN; m++)
        wq[i][N_RES + m] = (i % 3 == 0) ? qw(3.99) : qw(urand());
    end
    for (int l = 0; l < L_OUT; l++)
      for (int j = 0; j < K; j++) woq[l][j] = int'($floor(urand() * WO_SCALE * 16384.0));
    for (int i = 0; i < N_RES; i++) xr[i] = 0.0;

    repeat (4) @(negedge clk);
    rst = 1'b0;
    // reservoir weights: virtual neuron v = b*P + k runs on physical neuron k
    for (int v = 0; v < N_RES; v++)
      for (int j = 0; j < K; j++)
        wr({4'd0, 8'(v % N_PHYS), 16'((v / N_PHYS) * ZROWS + j / 9), 4'(j % 9)},
           32'(wq[v][j]));
    for (int l = 0; l < L_OUT; l++)
      for (int j = 0; j < K; j++) wr({4'd1, 8'(l), 20'(j)}, 32'(woq[l][j]));

    for (int n = 0; n < STEPS; n++) begin
      for (int m = 0; m < M_IN; m++) begin
        if (n % 4 == 1)      ur[m] = 0.95;
        else if (n % 4 == 3) ur[m] = -0.95;
        else                 ur[m] = urand();
        uq[m] = int'($floor(ur[m] * 524288.0));
        ur[m] = real'(uq[m]) / 524288.0;
        wr({4'd2, 8'd0, 20'(m)}, 32'(uq[m]));
      end
      // start, then try to spoil the inputs while the step runs
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = {4'd3, 28'd0}; cfg_wdata = 32'd1;
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = {4'd2, 8'd0, 20'd0}; cfg_wdata = 32'h0004_0000;
      if (busy) n_dropped++;
      cyc = 1;
      @(negedge clk);
      cfg_we = 1'b0;
      cyc++;
      while (!done && cyc < 100000) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != STEP_CYCLES) begin
        failures++;
        $display("FAIL step %0d took %0d cycles, expected %0d", n, cyc, STEP_CYCLES);
      end
      n_batches += NB;
      if (N_RES % N_PHYS != 0) n_partial++;
      // reference step
      for (int i = 0; i < N_RES; i++) begin
        s = 0.0;
        for (int j = 0; j < N_RES; j++) s += real'(wq[i][j]) / 8192.0 * xr[j];
        for (int m = 0; m < M_IN; m++) s += real'(wq[i][N_RES + m]) / 8192.0 * ur[m];
        if (s >= 8.0 || s <= -8.0) n_sat++;
        if (s < 0.0) n_neg++;
        xn[i] = $tanh(s);
      end
      xr = xn;
      for (int l = 0; l < L_OUT; l++) begin
        yref = 0.0; sumabs = 0.0;
        for (int j = 0; j < K; j++) begin
          real zj, w;
          zj = (j < N_RES) ? xr[j] : ur[j - N_RES];
          w  = real'(woq[l][j]) / 16384.0;
          yref += w * zj;
          sumabs += (w < 0.0) ? -w : w;
        end
        if (yref > 32767.99998) begin yref = 32767.99998; n_ysat++; end
        if (yref < -32768.0)    begin yref = -32768.0;    n_ysat++; end
        tol = 1.0e-4 * sumabs + 2.0 / 65536.0;
        err = real'(y[l]) / 65536.0 - yref;
        if (err < 0.0) err = -err;
        if (err > max_err) max_err = err;
        checks++;
        if (err > tol) begin
          failures++;
          if (failures < 10)
            $display("FAIL step %0d y[%0d]=%f expected %f (tolerance %f)", n, l,
                     real'(y[l]) / 65536.0, yref, tol);
        end
      end
    end
    $display("largest |y - y_ref| = %e", max_err);
    $display("mechanisms: batches %0d, partial last batch %0d, saturated sums %0d, negative sums %0d, dropped writes %0d, saturated outputs %0d",
             n_batches, n_partial, n_sat, n_neg, n_dropped, n_ysat);
    checks++;
    if (n_dropped == 0 || n_neg == 0 || (NB > 1 && n_batches <= STEPS)) begin
      failures++;
      $display("FAIL a basic mechanism never happened");
    end
    if (REQUIRE_ALL) begin
      checks++;
      if (n_sat == 0 || n_partial == 0 || NB < 2) begin
        failures++;
        $display("FAIL saturation, partial batch or batching never happened");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

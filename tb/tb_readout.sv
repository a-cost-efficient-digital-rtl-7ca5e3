// tb_readout: two outputs over a 4-row extended state. The state memory is
// modelled here with its one-clock read latency. y_l must equal
// floor(sum_j Wout[l][j]*z_j / 2^17), clamped to the 32-bit range, computed
// independently (both saturated and in-range results occur), and done must
// come ROWS*11+2 cycles after the start cycle.
module tb_readout;
  import esn_pkg::*;

  localparam int L = 2, ROWS = 4, J = ROWS * 9;
  logic clk = 1'b0, rst = 1'b1;
  logic start, busy, done, wo_we;
  logic [1:0] z_addr;
  state_t z_row [NDSP];
  logic wo_l;
  logic [5:0] wo_j;
  oweight_t wo_data;
  yword_t y [L];
  state_t zmem [ROWS][NDSP];
  oweight_t wmodel [L][J];

  readout #(.L_OUT(L), .ROWS(ROWS)) dut (.clk, .rst, .start, .busy, .done, .z_addr, .z_row,
                                          .wo_we, .wo_l, .wo_j, .wo_data, .y);
  always #5 clk = ~clk;
  always_ff @(posedge clk) for (int k = 0; k < 9; k++) z_row[k] <= zmem[z_addr][k];

  int checks = 0, failures = 0, n_sat = 0;

  initial begin
    #2000000;
    failures++;
    $display("saturated outputs: %0d", n_sat);
    checks++;
    if (n_sat == 0 || n_sat == 2 * 20) begin
      failures++;
      $display("FAIL saturation never or always reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    int cyc;
    start = 0; wo_we = 0; wo_l = 0; wo_j = 0; wo_data = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int trial = 0; trial < 20; trial++) begin
      for (int l = 0; l < L; l++)
        for (int j = 0; j < J; j++) begin
          @(negedge clk);
          wo_we = 1; wo_l = 1'(l); wo_j = 6'(j);
          wo_data = oweight_t'($signed($urandom) >>> ((trial < 5) ? 0 : $urandom_range(14, 22)));
          wmodel[l][j] = wo_data;
        end
      @(negedge clk) wo_we = 0;
      for (int r = 0; r < ROWS; r++) for (int k = 0; k < 9; k++) zmem[r][k] = state_t'($urandom);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done && cyc < 1000) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != ROWS * 11 + 2) begin
        failures++;
        $display("FAIL done after %0d cycles, expected %0d", cyc, ROWS * 11 + 2);
      end
      for (int l = 0; l < L; l++) begin
        acc = 0;
        for (int j = 0; j < J; j++) acc += longint'(wmodel[l][j]) * longint'(zmem[j / 9][j % 9]);
        checks++;
        acc = acc >>> 17;
        if (acc > 64'sd2147483647) acc = 64'sd2147483647;
        if (acc < -64'sd2147483648) acc = -64'sd2147483648;
        if (acc > 64'sd2147483647 - 1 || acc < -64'sd2147483648 + 1) n_sat++;
        if (y[l] !== yword_t'(acc)) begin
          failures++;
          $display("FAIL y[%0d]=%0d expected %0d", l, y[l], acc);
        end
      end
    end
    $display("saturated outputs: %0d", n_sat);
    checks++;
    if (n_sat == 0 || n_sat == 2 * 20) begin
      failures++;
      $display("FAIL saturation never or always reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

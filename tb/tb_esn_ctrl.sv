// tb_esn_ctrl: the sequencer for 23 reservoir neurons on 5 physical ones
// with 2 inputs (ZROWS = 3, XROWS = 3, five batches). A readout stand-in
// raises ro_done 8 cycles after ro_start. Checks the cycle of every phase command
// inside each batch, the weight row addresses, the batch numbers written to
// the cache, the copy rows and masks, and the total step length
//   NB*(ZROWS+15) + XROWS + R + 2 with R = 8 for the stand-in.
module tb_esn_ctrl;
  import esn_pkg::*;

  localparam int N_RES = 23, N_PHYS = 5, M_IN = 2, D = 3, XR = 3, NB = 5;
  logic clk = 1'b0, rst = 1'b1;
  logic start, busy, done, cache_we, copy_en, ro_start, ro_sel, ro_done;
  nctrl_t nctrl;
  logic [1:0] z_addr, copy_addr;
  logic [3:0] w_raddr;
  logic [2:0] batch;
  logic [NDSP-1:0] copy_mask;

  esn_ctrl #(.N_RES(N_RES), .N_PHYS(N_PHYS), .M_IN(M_IN)) dut (
    .clk, .rst, .start, .busy, .done, .nctrl, .z_addr, .w_raddr, .cache_we, .batch,
    .copy_en, .copy_addr, .copy_mask, .ro_start, .ro_sel, .ro_done);

  always #5 clk = ~clk;

  // readout stand-in
  int ro_cnt = -1;
  always_ff @(posedge clk) begin
    ro_done <= 1'b0;
    if (ro_start) ro_cnt <= 6;
    else if (ro_cnt > 0) ro_cnt <= ro_cnt - 1;
    else if (ro_cnt == 0) begin ro_done <= 1'b1; ro_cnt <= -1; end
  end

  int checks = 0, failures = 0;
  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, steps;
    start = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      expect_eq("busy after start", int'(busy), 1);
      steps = 1;
      for (int b = 0; b < NB; b++) begin
        for (t = 0; t <= D + 14; t++) begin
          if (t < D) begin
            expect_eq("z_addr", int'(z_addr), t);
            expect_eq("w_raddr", int'(w_raddr), b * D + t);
          end
          expect_eq("macc", int'(nctrl.macc), int'(t >= 1 && t <= D));
          expect_eq("macc_first", int'(nctrl.macc_first), int'(t == 1));
          expect_eq("cmp1", int'(nctrl.cmp1), int'(t == D + 3));
          expect_eq("cmp2", int'(nctrl.cmp2), int'(t == D + 6));
          expect_eq("lut_rd", int'(nctrl.lut_rd), int'(t == D + 9));
          expect_eq("nl", int'(nctrl.nl), int'(t == D + 10));
          expect_eq("x_cap", int'(nctrl.x_cap), int'(t == D + 13));
          expect_eq("cache_we", int'(cache_we), int'(t == D + 14));
          if (cache_we) expect_eq("batch", int'(batch), b);
          @(negedge clk);
          steps++;
        end
      end
      for (int r = 0; r < XR; r++) begin
        expect_eq("copy_en", int'(copy_en), 1);
        expect_eq("copy_addr", int'(copy_addr), r);
        for (int k = 0; k < 9; k++) expect_eq("copy_mask", int'(copy_mask[k]), int'(r * 9 + k < N_RES));
        @(negedge clk);
        steps++;
      end
      expect_eq("ro_start", int'(ro_start), 1);
      while (!done && steps < 1000) begin
        expect_eq("ro_sel while reading", int'(ro_sel), 1);
        @(negedge clk);
        steps++;
      end
      expect_eq("step length", steps, NB * (D + 15) + XR + 8 + 2);
      @(negedge clk);
      expect_eq("idle after done", int'(busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

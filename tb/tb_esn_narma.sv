// tb_esn_narma: the NARMA10 workload at the three reservoir sizes, each on
// 20 physical neurons, with the training and testing lengths of the
// original experiment (20 neurons: 1000/200, 50: 2000/1000,
// 100: 8000/1000 steps) and ridge factors of 1e-9, 1e-8 and 2e-7. The
// three runs proceed side by side.
module tb_esn_narma;
  import esn_pkg::*;

  localparam int NS = 3;
  localparam int SIZES [NS] = '{20, 50, 100};
  localparam int TRAINS [NS] = '{1000, 2000, 8000};
  localparam int TESTS [NS] = '{200, 1000, 1000};
  localparam real BETAS [NS] = '{1.0e-9, 1.0e-8, 2.0e-7};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NS-1:0] fin;
  int chk [NS], fl [NS];

  for (genvar g = 0; g < NS; g++) begin : g_run
    logic rst, cfg_we, busy, done;
    logic [31:0] cfg_addr, cfg_wdata;
    yword_t y [1];
    esn_top #(.N_RES(SIZES[g]), .N_PHYS(20), .M_IN(1), .L_OUT(1)) dut (
      .clk, .rst, .cfg_we, .cfg_addr, .cfg_wdata, .busy, .done, .y);
    tb_narma_driver #(.N_RES(SIZES[g]), .N_PHYS(20), .TRAIN(TRAINS[g]), .TEST(TESTS[g]),
                    .BETA(BETAS[g])) drv (
      .clk, .rst, .cfg_we, .cfg_addr, .cfg_wdata, .busy, .done, .y,
      .finished(fin[g]), .checks(chk[g]), .failures(fl[g]));
  end

  initial begin
    int c, f;
    fork
      begin
        wait (&fin);
        c = 0; f = 0;
        for (int i = 0; i < NS; i++) begin c += chk[i]; f += fl[i]; end
      end
      begin
        #100ms;
        c = chk[0] + chk[1] + chk[2];
        f = fl[0] + fl[1] + fl[2] + 1;
        $display("FAIL watchdog");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule

// tb_esn_top: end-to-end run of the accelerator at a small size that
// exercises every mechanism: 14 reservoir neurons on 4 physical neurons
// (four batches, the last one half used), four inputs (enough to saturate
// tanh), two outputs, 24 time steps. See tb_esn_driver for the checks.
module tb_esn_top;
  import esn_pkg::*;

  localparam int N_RES = 14, N_PHYS = 4, M_IN = 4, L_OUT = 2;
  logic clk = 1'b0;
  logic rst, cfg_we, busy, done;
  logic [31:0] cfg_addr, cfg_wdata;
  yword_t y [L_OUT];

  always #5 clk = ~clk;

  esn_top #(.N_RES(N_RES), .N_PHYS(N_PHYS), .M_IN(M_IN), .L_OUT(L_OUT)) dut (
    .clk, .rst, .cfg_we, .cfg_addr, .cfg_wdata, .busy, .done, .y);

  tb_esn_driver #(.N_RES(N_RES), .N_PHYS(N_PHYS), .M_IN(M_IN), .L_OUT(L_OUT),
                  .STEPS(24), .REQUIRE_ALL(1'b1)) drv (
    .clk, .rst, .cfg_we, .cfg_addr, .cfg_wdata, .busy, .done, .y);

  initial begin
    #20ms;
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end
endmodule

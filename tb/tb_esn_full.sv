// tb_esn_full: the accelerator at its default size (100 reservoir neurons
// on 20 physical neurons, one input, one output: the largest NARMA10
// build) taken through 10 complete time steps. See tb_esn_driver for the
// checks.
module tb_esn_full;
  import esn_pkg::*;

  logic clk = 1'b0;
  logic rst, cfg_we, busy, done;
  logic [31:0] cfg_addr, cfg_wdata;
  yword_t y [1];

  always #5 clk = ~clk;

  esn_top dut (.clk, .rst, .cfg_we, .cfg_addr, .cfg_wdata, .busy, .done, .y);

  tb_esn_driver #(.N_RES(100), .N_PHYS(20), .M_IN(1), .L_OUT(1), .STEPS(10)) drv (
    .clk, .rst, .cfg_we, .cfg_addr, .cfg_wdata, .busy, .done, .y);

  initial begin
    #50ms;
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end
endmodule

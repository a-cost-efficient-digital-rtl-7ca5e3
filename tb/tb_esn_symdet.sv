// tb_esn_symdet: the accelerator in the configuration of the OFDM
// symbol-detection experiment: 4 inputs (real and imaginary parts of two
// received samples), 16 reservoir neurons, each on its own physical neuron
// (one batch per step), 2 outputs (real and imaginary part of the symbol).
// The received radio data are not available, so random inputs and weights
// are used (see tb_esn_driver). The output weights are scaled to +/-3000,
// large (the trained detector's reach +/-50,000 but cancel one another)
// while some outputs still stay inside the +/-32768 output range; the check
// bound scales with the weights.
module tb_esn_symdet;
  import esn_pkg::*;

  localparam int N_RES = 16, N_PHYS = 16, M_IN = 4, L_OUT = 2;
  logic clk = 1'b0;
  logic rst, cfg_we, busy, done;
  logic [31:0] cfg_addr, cfg_wdata;
  yword_t y [L_OUT];

  always #5 clk = ~clk;

  esn_top #(.N_RES(N_RES), .N_PHYS(N_PHYS), .M_IN(M_IN), .L_OUT(L_OUT)) dut (
    .clk, .rst, .cfg_we, .cfg_addr, .cfg_wdata, .busy, .done, .y);

  tb_esn_driver #(.N_RES(N_RES), .N_PHYS(N_PHYS), .M_IN(M_IN), .L_OUT(L_OUT),
                  .STEPS(40), .WO_SCALE(3000.0)) drv (
    .clk, .rst, .cfg_we, .cfg_addr, .cfg_wdata, .busy, .done, .y);

  initial begin
    #20ms;
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end
endmodule

// esn_regif: register write interface of the ESN accelerator.
//
// A host writes 32-bit words; the address selects the target:
//   [31:28] = 0  reservoir weight: [27:20] physical neuron, [19:4] weight
//                row (batch*ZROWS + j/9), [3:0] bank (j mod 9); data[15:0]
//   [31:28] = 1  output weight Wout[l][j]: [27:20] l, [19:0] j; data[31:0]
//   [31:28] = 2  input u_m: [19:0] m; data[19:0]; stored at z index N+m
//   [31:28] = 3  control: writing data[0] = 1 starts one time step
// Every write is decoded in the cycle it is presented (single-cycle
// strobes out). The address and data fields go to the targets as plain
// wires; the logic here is the decode of the strobes and their gating. Writes of weights and inputs while a step runs (busy) are
// dropped, so a step always sees consistent operands; a start while busy
// is ignored. The document says only that the design has a register
// interface for parameters and configurations; this map is this design's.
module esn_regif
  import esn_pkg::*;
#(
  parameter int unsigned N_RES  = 100,
  parameter int unsigned N_PHYS = 20,
  parameter int unsigned M_IN   = 1,
  parameter int unsigned L_OUT  = 1,
  parameter int unsigned ZROWS  = (N_RES + M_IN + NDSP - 1) / NDSP,
  parameter int unsigned NB     = (N_RES + N_PHYS - 1) / N_PHYS,
  parameter int unsigned WDEPTH = NB * ZROWS,
  parameter int unsigned WAW    = $clog2(WDEPTH),
  parameter int unsigned JW     = $clog2(ZROWS * NDSP),
  parameter int unsigned LW     = (L_OUT > 1) ? $clog2(L_OUT) : 1,
  parameter int unsigned RAW    = (ZROWS > 1) ? $clog2(ZROWS) : 1
) (
  input  logic              busy,
  input  logic              cfg_we,
  input  logic [31:0]       cfg_addr,
  input  logic [31:0]       cfg_wdata,
  // reservoir weights (broadcast address/data, one enable per neuron)
  output logic [N_PHYS-1:0] nw_we,
  output logic [WAW-1:0]    nw_addr,
  output logic [3:0]        nw_bank,
  output weight_t           nw_data,
  // output weights
  output logic              wo_we,
  output logic [LW-1:0]     wo_l,
  output logic [JW-1:0]     wo_j,
  output oweight_t          wo_data,
  // input write into the global state memory
  output logic              u_we,
  output logic [RAW-1:0]    u_row,
  output logic [NDSP-1:0]   u_mask,
  output state_t            u_data,
  // control
  output logic              start
);

  logic [3:0]  region;
  logic [7:0]  sel;
  int unsigned zj;

  assign region = cfg_addr[31:28];
  assign sel    = cfg_addr[27:20];

  always_comb begin
    nw_we   = '0;
    nw_addr = cfg_addr[4 +: WAW];
    nw_bank = cfg_addr[3:0];
    nw_data = cfg_wdata[W_W-1:0];
    wo_we   = 1'b0;
    wo_l    = sel[LW-1:0];
    wo_j    = cfg_addr[JW-1:0];
    wo_data = cfg_wdata;
    u_we    = 1'b0;
    zj      = N_RES + int'(cfg_addr[19:0]);
    u_row   = RAW'(zj / NDSP);
    u_mask  = NDSP'(1) << (zj % NDSP);
    u_data  = cfg_wdata[Z_W-1:0];
    start   = 1'b0;
    if (cfg_we) begin
      unique case (region)
        4'd0: if (!busy && int'(sel) < int'(N_PHYS) && int'(cfg_addr[19:4]) < int'(WDEPTH))
                nw_we = N_PHYS'(1) << sel;
        4'd1: if (!busy && int'(sel) < int'(L_OUT) && int'(cfg_addr[19:0]) < int'(ZROWS * NDSP))
                wo_we = 1'b1;
        4'd2: if (!busy && int'(cfg_addr[19:0]) < int'(M_IN)) u_we = 1'b1;
        4'd3: start = !busy && cfg_wdata[0];
        default: ;
      endcase
    end
  end

endmodule

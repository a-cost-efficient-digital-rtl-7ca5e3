// esn_top: echo state network accelerator built from DSP-slice neurons.
//
// Each time step computes x(n) = tanh(W x(n-1) + Win u(n)) for N reservoir
// neurons and y(n) = Wout {x(n); u(n)} for L outputs. P physical neurons
// (nine DSP slices each, reservoir_neuron) work in lockstep on the nine-word
// rows of the extended state broadcast from the global state memory; when
// N > P they are reused ceil(N/P) times per step, new states collecting in
// the state cache until the whole step is done. Each pair of neurons shares
// one two-port tanh table pair (tanh_lut). The readout computes the outputs
// after the cache has been copied back.
//
// Host side: a 32-bit write-only register interface (see esn_regif for the
// map) loads reservoir and output weights and the inputs u(n), and starts a
// step; busy is high while a step runs and done pulses when y is valid.
// Defaults are the document's largest NARMA10 build: 100 reservoir neurons
// on 20 physical neurons, one input, one output. The symbol-detection build
// is N_RES=16, N_PHYS=16, M_IN=4, L_OUT=2.
module esn_top
  import esn_pkg::*;
#(
  parameter int unsigned N_RES  = 100,
  parameter int unsigned N_PHYS = 20,
  parameter int unsigned M_IN   = 1,
  parameter int unsigned L_OUT  = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cfg_we,
  input  logic [31:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic        busy,
  output logic        done,
  output yword_t      y [L_OUT]
);

  localparam int unsigned ZROWS  = (N_RES + M_IN + NDSP - 1) / NDSP;
  localparam int unsigned XROWS  = (N_RES + NDSP - 1) / NDSP;
  localparam int unsigned NB     = (N_RES + N_PHYS - 1) / N_PHYS;
  localparam int unsigned WDEPTH = NB * ZROWS;
  localparam int unsigned WAW    = $clog2(WDEPTH);
  localparam int unsigned BW     = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned RAW    = (ZROWS > 1) ? $clog2(ZROWS) : 1;
  localparam int unsigned JW     = $clog2(ZROWS * NDSP);
  localparam int unsigned LW     = (L_OUT > 1) ? $clog2(L_OUT) : 1;
  localparam int unsigned NLUT   = (N_PHYS + 1) / 2;

  // ---------------- register interface
  logic [N_PHYS-1:0] nw_we;
  logic [WAW-1:0]    nw_addr;
  logic [3:0]        nw_bank;
  weight_t           nw_data;
  logic              wo_we;
  logic [LW-1:0]     wo_l;
  logic [JW-1:0]     wo_j;
  oweight_t          wo_data;
  logic              u_we;
  logic [RAW-1:0]    u_row;
  logic [NDSP-1:0]   u_mask;
  state_t            u_data;
  logic              start;

  esn_regif #(
    .N_RES(N_RES), .N_PHYS(N_PHYS), .M_IN(M_IN), .L_OUT(L_OUT)
  ) u_regif (
    .busy, .cfg_we, .cfg_addr, .cfg_wdata,
    .nw_we, .nw_addr, .nw_bank, .nw_data,
    .wo_we, .wo_l, .wo_j, .wo_data,
    .u_we, .u_row, .u_mask, .u_data,
    .start
  );

  // ---------------- sequencer
  nctrl_t          nctrl;
  logic [RAW-1:0]  seq_z_addr;
  logic [WAW-1:0]  w_raddr;
  logic            cache_we;
  logic [BW-1:0]   batch;
  logic            copy_en;
  logic [RAW-1:0]  copy_addr;
  logic [NDSP-1:0] copy_mask;
  logic            ro_start, ro_sel, ro_done, ro_busy;

  esn_ctrl #(
    .N_RES(N_RES), .N_PHYS(N_PHYS), .M_IN(M_IN)
  ) u_ctrl (
    .clk, .rst, .start, .busy, .done,
    .nctrl, .z_addr(seq_z_addr), .w_raddr,
    .cache_we, .batch, .copy_en, .copy_addr, .copy_mask,
    .ro_start, .ro_sel, .ro_done
  );

  // ---------------- global state memory
  logic [RAW-1:0] gsm_rd_addr, ro_z_addr;
  state_t         z_row [NDSP];
  state_t         cache_row [NDSP];
  state_t         u_row_data [NDSP];
  logic           gsm_we;
  logic [RAW-1:0] gsm_wr_addr;
  logic [NDSP-1:0] gsm_wr_mask;
  state_t         gsm_wr_row [NDSP];

  always_comb begin
    for (int k = 0; k < int'(NDSP); k++) u_row_data[k] = u_data;
    gsm_rd_addr = ro_sel ? ro_z_addr : seq_z_addr;
    if (copy_en) begin
      gsm_we      = 1'b1;
      gsm_wr_addr = copy_addr;
      gsm_wr_mask = copy_mask;
      gsm_wr_row  = cache_row;
    end else begin
      gsm_we      = u_we;
      gsm_wr_addr = u_row;
      gsm_wr_mask = u_mask;
      gsm_wr_row  = u_row_data;
    end
  end

  global_state_mem #(.ROWS(ZROWS)) u_gsm (
    .clk, .rst,
    .rd_addr(gsm_rd_addr), .rd_row(z_row),
    .wr_en(gsm_we), .wr_addr(gsm_wr_addr), .wr_mask(gsm_wr_mask), .wr_row(gsm_wr_row)
  );

  // ---------------- physical neurons and shared tanh tables
  logic [LUT_AW-1:0]  lut_addr  [NLUT*2];
  logic [SLOPE_W-1:0] lut_slope [NLUT*2];
  logic [ICPT_W-1:0]  lut_icpt  [NLUT*2];
  state_t             x [N_PHYS];
  logic [N_PHYS-1:0]  x_valid;

  for (genvar i = 0; i < int'(N_PHYS); i++) begin : g_neuron
    reservoir_neuron #(.WDEPTH(WDEPTH)) u_neuron (
      .clk, .rst,
      .ctrl     (nctrl),
      .z_row    (z_row),
      .w_raddr  (w_raddr),
      .w_we     (nw_we[i]),
      .w_waddr  (nw_addr),
      .w_wbank  (nw_bank),
      .w_wdata  (nw_data),
      .lut_addr (lut_addr[i]),
      .lut_slope(lut_slope[i]),
      .lut_icpt (lut_icpt[i]),
      .s        (),
      .x        (x[i]),
      .x_valid  (x_valid[i])
    );
  end

  if (N_PHYS % 2 == 1) begin : g_odd
    assign lut_addr[N_PHYS] = '0;
  end

  for (genvar g = 0; g < int'(NLUT); g++) begin : g_lut
    tanh_lut u_lut (
      .clk,
      .a0    (lut_addr[2*g]),
      .a1    (lut_addr[2*g+1]),
      .slope0(lut_slope[2*g]),
      .icpt0 (lut_icpt[2*g]),
      .slope1(lut_slope[2*g+1]),
      .icpt1 (lut_icpt[2*g+1])
    );
  end

  // ---------------- state cache
  state_cache #(.N_RES(N_RES), .N_PHYS(N_PHYS)) u_cache (
    .clk,
    .wr_en   (cache_we),
    .wr_batch(batch),
    .wr_x    (x),
    .rd_addr (copy_addr[$clog2(XROWS > 1 ? XROWS : 2)-1:0]),
    .rd_row  (cache_row)
  );

  // ---------------- readout
  readout #(.L_OUT(L_OUT), .ROWS(ZROWS)) u_readout (
    .clk, .rst,
    .start  (ro_start),
    .busy   (ro_busy),
    .done   (ro_done),
    .z_addr (ro_z_addr),
    .z_row  (z_row),
    .wo_we, .wo_l, .wo_j, .wo_data,
    .y
  );

  // The cache is written in the cycle the neurons present x.
  a_x_before_cache: assert property (@(posedge clk) disable iff (rst)
    cache_we |-> x_valid[0])
    else $error("esn_top: cache written without fresh states");
  a_no_input_write_in_copy: assert property (@(posedge clk) disable iff (rst)
    copy_en |-> !u_we)
    else $error("esn_top: input write collides with state copy");

endmodule

// esn_ctrl: sequencer for one ESN time step.
//
// A step is started once u(n) is in the global state memory. The N
// reservoir neurons are computed NB = ceil(N/P) batches at a time on the P
// physical neurons; for each batch the sequencer
//   reads z rows 0..ZROWS-1 (weights at row batch*ZROWS + r)   t = 0..D-1
//   issues MACC for the arriving rows                          t = 1..D
//   compression I                                              t = D+3
//   compression II                                             t = D+6
//   tanh LUT lookup                                            t = D+9
//   DSP22 slope*delta + intercept                              t = D+10
//   capture x                                                  t = D+13
//   write the P new states into the cache                      t = D+14
// (D = ZROWS; the three-cycle gaps are the DSP pipeline depth). After the
// last batch the cache is copied into the global state memory, one row of
// nine words per cycle, and the readout is started; done pulses when the
// outputs y(n) are valid. done therefore pulses
//   NB*(ZROWS+15) + XROWS + R + 2
// cycles after the cycle in which start was high, R being the readout's
// time from ro_start to ro_done (ZROWS*11+2 for the readout unit).
// The phase order follows the document; the exact schedule is this
// design's choice.
module esn_ctrl
  import esn_pkg::*;
#(
  parameter int unsigned N_RES  = 100,
  parameter int unsigned N_PHYS = 20,
  parameter int unsigned M_IN   = 1,
  parameter int unsigned ZROWS  = (N_RES + M_IN + NDSP - 1) / NDSP,
  parameter int unsigned XROWS  = (N_RES + NDSP - 1) / NDSP,
  parameter int unsigned NB     = (N_RES + N_PHYS - 1) / N_PHYS,
  parameter int unsigned WDEPTH = NB * ZROWS,
  parameter int unsigned WAW    = $clog2(WDEPTH),
  parameter int unsigned BW     = (NB > 1) ? $clog2(NB) : 1,
  parameter int unsigned RAW    = (ZROWS > 1) ? $clog2(ZROWS) : 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  output logic            busy,
  output logic            done,
  // neuron array
  output nctrl_t          nctrl,
  output logic [RAW-1:0]  z_addr,
  output logic [WAW-1:0]  w_raddr,
  // state cache and copy
  output logic            cache_we,
  output logic [BW-1:0]   batch,
  output logic            copy_en,
  output logic [RAW-1:0]  copy_addr,
  output logic [NDSP-1:0] copy_mask,
  // readout
  output logic            ro_start,
  output logic            ro_sel,
  input  logic            ro_done
);

  localparam int unsigned D      = ZROWS;
  localparam int unsigned T_LAST = D + 14;
  localparam int unsigned TW     = $clog2(T_LAST + 1);

  typedef enum logic [2:0] {S_IDLE, S_BATCH, S_COPY, S_READ} st_e;
  st_e st;
  logic [TW-1:0] t;

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      t         <= '0;
      batch     <= '0;
      copy_addr <= '0;
      ro_start  <= 1'b0;
      done      <= 1'b0;
    end else begin
      ro_start <= 1'b0;
      done     <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st    <= S_BATCH;
          t     <= '0;
          batch <= '0;
        end
        S_BATCH: begin
          if (t == TW'(T_LAST)) begin
            t <= '0;
            if (batch == BW'(NB - 1)) begin
              st        <= S_COPY;
              copy_addr <= '0;
            end else begin
              batch <= batch + 1'b1;
            end
          end else begin
            t <= t + 1'b1;
          end
        end
        S_COPY: begin
          if (copy_addr == RAW'(XROWS - 1)) begin
            st       <= S_READ;
            ro_start <= 1'b1;
          end else begin
            copy_addr <= copy_addr + 1'b1;
          end
        end
        S_READ: if (ro_done) begin
          st   <= S_IDLE;
          done <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    nctrl            = '0;
    nctrl.macc       = (st == S_BATCH) && (t >= TW'(1)) && (t <= TW'(D));
    nctrl.macc_first = (st == S_BATCH) && (t == TW'(1));
    nctrl.cmp1       = (st == S_BATCH) && (t == TW'(D + 3));
    nctrl.cmp2       = (st == S_BATCH) && (t == TW'(D + 6));
    nctrl.lut_rd     = (st == S_BATCH) && (t == TW'(D + 9));
    nctrl.nl         = (st == S_BATCH) && (t == TW'(D + 10));
    nctrl.x_cap      = (st == S_BATCH) && (t == TW'(D + 13));
    cache_we         = (st == S_BATCH) && (t == TW'(T_LAST));
    copy_en          = (st == S_COPY);
    z_addr           = (t < TW'(D)) ? RAW'(t) : '0;
    w_raddr          = WAW'(int'(batch) * int'(D) + int'(z_addr));
    for (int k = 0; k < int'(NDSP); k++)
      copy_mask[k] = (int'(copy_addr) * int'(NDSP) + k) < int'(N_RES);
  end

  assign busy   = (st != S_IDLE);
  assign ro_sel = (st == S_READ);

endmodule

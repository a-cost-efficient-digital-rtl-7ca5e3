// reservoir_neuron: one physical reservoir neuron, x_i = tanh(sum_j w_ij z_j).
//
// Nine DSP slices, placed as a 3x3 array DSPrc (r = row, c = column), do all
// the arithmetic in four phases, one after the other:
//   MACC           each cycle a row of nine states z and nine weights w
//                  arrives; DSPrc multiplies word k = 3c+r of the row and
//                  accumulates in its P register (the first row loads P).
//   Compression I  in each column DSP1c adds P0c (through C) and P2c
//                  (through the PCIN cascade) to its own P: P1c = P0c+P1c+P2c.
//                  DSP0c and DSP2c are fed zeros so that their P is kept.
//   Compression II DSP12 adds P10 (through the A:B concatenation) and P11
//                  (through C) to its own P: s = P12 = P10+P11+P12.
//   tanh           |s| is sliced into a LUT address |s|[34:25] (<10,10>,
//                  the piece of [0,8)) and a delta |s|[24:17] (8 bits); the
//                  shared LUT returns slope and intercept one cycle later,
//                  and DSP22, free since compression I, computes
//                  slope*delta + intercept. The >>6 that aligns the product
//                  with the intercept is done by feeding intercept<<6 on C
//                  and taking P[24:6], which gives the same integer result.
//                  |s| >= 8 gives 1-2^-19; for s < 0 the result is negated.
// The local weight memory holds, per bank k (one per DSP), the 16-bit
// weights w_ij with j mod 9 = k at row (batch*rows + j/9); it has one write
// port for configuration and one synchronous read port.
//
// Timing: every phase is commanded by the sequencer through ctrl (all
// neurons run in lockstep). z_row/w data must be on the inputs in the cycle
// ctrl.macc is high, i.e. one cycle after w_raddr was given. The sequencer
// spaces the phases by the three-stage DSP pipeline; x is valid the cycle
// after ctrl.x_cap, with x_valid high for that one cycle. The sum of
// products s (<48,32>, the P register of DSP12) is brought out for
// observation; it is final in the ctrl.lut_rd cycle and until the next
// batch's compression II. Bits 16:0 of |s| fall below the tanh delta and
// are not used.
// The phase structure, the DSP roles and the tanh bit fields follow the
// document; the word-to-DSP mapping, the weight-memory layout and the
// 3-cycle pipeline spacing are this design's choices.
module reservoir_neuron
  import esn_pkg::*;
#(
  parameter int unsigned WDEPTH = 60,           // weight rows = batches * z rows
  parameter int unsigned WAW    = $clog2(WDEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  input  nctrl_t             ctrl,
  input  state_t             z_row [NDSP],
  input  logic [WAW-1:0]     w_raddr,
  input  logic               w_we,
  input  logic [WAW-1:0]     w_waddr,
  input  logic [3:0]         w_wbank,
  input  weight_t            w_wdata,
  output logic [LUT_AW-1:0]  lut_addr,
  input  logic [SLOPE_W-1:0] lut_slope,
  input  logic [ICPT_W-1:0]  lut_icpt,
  output pword_t             s,
  output state_t             x,
  output logic               x_valid
);

  // ---------------- local weight memory: 9 banks x WDEPTH x 16 bit
  weight_t wmem [NDSP][WDEPTH];
  weight_t w_row [NDSP];

  always_ff @(posedge clk) begin
    if (w_we && w_wbank < 4'(NDSP)) wmem[w_wbank][w_waddr] <= w_wdata;
    for (int k = 0; k < int'(NDSP); k++) w_row[k] <= wmem[k][w_raddr];
  end

  // ---------------- DSP array
  logic signed [A_W-1:0] a   [3][3];
  logic signed [B_W-1:0] b   [3][3];
  pword_t                c   [3][3];
  opmode_t               op  [3][3];
  pword_t                p   [3][3];
  pword_t                pco [3][3];

  // tanh operand registers, captured when s is looked up
  logic              s_neg, s_sat;
  logic [DS_W-1:0]   ds_q;
  pword_t            s_abs;

  always_comb begin
    for (int r = 0; r < 3; r++) begin
      for (int cc = 0; cc < 3; cc++) begin
        // default: keep P (zeros into the multiplier, accumulate)
        a[r][cc]  = '0;
        b[r][cc]  = '0;
        c[r][cc]  = '0;
        op[r][cc] = OP_MACC;
        if (ctrl.macc) begin
          a[r][cc]  = A_W'(z_row[3*cc+r]);
          b[r][cc]  = B_W'(w_row[3*cc+r]);
          op[r][cc] = ctrl.macc_first ? OP_MUL : OP_MACC;
        end
      end
    end
    if (ctrl.cmp1) begin
      for (int cc = 0; cc < 3; cc++) begin
        c[1][cc]  = p[0][cc];
        op[1][cc] = OP_CMP1;
      end
    end
    if (ctrl.cmp2) begin
      a[1][2]  = p[1][0][P_W-1:B_W];
      b[1][2]  = p[1][0][B_W-1:0];
      c[1][2]  = p[1][1];
      op[1][2] = OP_CMP2;
    end
    if (ctrl.nl) begin
      a[2][2]  = A_W'(ds_q);
      b[2][2]  = B_W'(lut_slope);
      c[2][2]  = P_W'({lut_icpt, DS_SHIFT'(0)});
      op[2][2] = OP_MULADD;
    end
  end

  for (genvar r = 0; r < 3; r++) begin : g_row
    for (genvar cc = 0; cc < 3; cc++) begin : g_col
      pword_t pcin;
      if (r == 1) begin : g_casc
        assign pcin = pco[2][cc];   // DSP2c PCOUT -> DSP1c PCIN
      end else begin : g_nocasc
        assign pcin = '0;
      end
      dsp_slice u_dsp (
        .clk   (clk),
        .rst   (rst),
        .ce    (1'b1),
        .a     (a[r][cc]),
        .b     (b[r][cc]),
        .c     (c[r][cc]),
        .opmode(op[r][cc]),
        .pcin  (pcin),
        .p     (p[r][cc]),
        .pcout (pco[r][cc])
      );
    end
  end

  // ---------------- tanh front end: |s|, LUT address, delta, flags
  assign s        = p[1][2];
  assign s_abs    = s[P_W-1] ? -s : s;
  assign lut_addr = s_abs[34:25];

  always_ff @(posedge clk) begin
    if (rst) begin
      s_neg <= 1'b0;
      s_sat <= 1'b0;
      ds_q  <= '0;
    end else if (ctrl.lut_rd) begin
      s_neg <= p[1][2][P_W-1];
      s_sat <= |s_abs[P_W-1:35];
      ds_q  <= s_abs[24:17];
    end
  end

  // ---------------- tanh back end: saturate, negate, register x
  logic [ICPT_W-1:0] mag;
  always_comb begin
    if (s_sat || |p[2][2][P_W-1:ICPT_W+DS_SHIFT]) mag = '1;   // 1 - 2^-19
    else                                           mag = p[2][2][ICPT_W+DS_SHIFT-1:DS_SHIFT];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x       <= '0;
      x_valid <= 1'b0;
    end else begin
      x_valid <= ctrl.x_cap;
      if (ctrl.x_cap) x <= s_neg ? -state_t'({1'b0, mag}) : state_t'({1'b0, mag});
    end
  end

  // Phases never overlap.
  a_one_phase: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.macc, ctrl.cmp1, ctrl.cmp2, ctrl.nl}))
    else $error("reservoir_neuron: overlapping phase commands");

endmodule

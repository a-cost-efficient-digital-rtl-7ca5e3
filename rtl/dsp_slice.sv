// dsp_slice: behaviour of the part of a DSP48E1 slice that the ESN neuron uses.
//
// A 25x18 signed multiplier (A[24:0] x B), operand muxes X, Y and Z chosen by
// a 7-bit OPMODE, a three-input adder and the 48-bit P register, which also
// drives PCOUT for the dedicated cascade into the next slice's PCIN.
// X: 0 / M / P / A:B.  Y: 0 / M / all ones / C.  Z: 0 / PCIN / P / C.
// As in the real slice the product occupies X and Y together, so X=M must be
// paired with Y=M (checked by an assertion). The adder only adds: the ALUMODE
// subtract options and the pre-adder D port are not used by the neuron and
// are left out.
//
// Timing: A, B, C and OPMODE are registered together on entry (stage 1), the
// product is registered in M (stage 2) and the sum in P (stage 3); C, A:B and
// OPMODE travel with the product so that one command issued in cycle t is
// reflected in P from cycle t+3. PCIN is used as it is at the adder, in the
// cycle the ALU works. The pipelining of C and OPMODE alongside M is this
// design's choice; the register stages themselves follow the DSP48E1.
module dsp_slice
  import esn_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  ce,
  input  logic signed [A_W-1:0] a,
  input  logic signed [B_W-1:0] b,
  input  logic signed [P_W-1:0] c,
  input  opmode_t               opmode,
  input  logic signed [P_W-1:0] pcin,
  output logic signed [P_W-1:0] p,
  output logic signed [P_W-1:0] pcout
);

  logic signed [A_W-1:0] a1;
  logic signed [B_W-1:0] b1;
  logic signed [P_W-1:0] c1, c2, ab2;
  opmode_t               op1, op2;
  logic signed [P_W-1:0] m2;
  logic signed [P_W-1:0] xv, yv, zv;
  logic signed [24:0]    a_mul;

  assign a_mul = a1[24:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      a1  <= '0;
      b1  <= '0;
      c1  <= '0;
      op1 <= OP_ZERO;
      m2  <= '0;
      ab2 <= '0;
      c2  <= '0;
      op2 <= OP_ZERO;
      p   <= '0;
    end else if (ce) begin
      a1  <= a;
      b1  <= b;
      c1  <= c;
      op1 <= opmode;
      m2  <= P_W'(a_mul * b1);
      ab2 <= {a1, b1};
      c2  <= c1;
      op2 <= op1;
      p   <= xv + yv + zv;
    end
  end

  // The partial-product pair of the real multiplier is one value here: X=M
  // carries the product and Y=M adds nothing more.
  always_comb begin
    unique case (op2[1:0])
      2'b00:   xv = '0;
      2'b01:   xv = m2;
      2'b10:   xv = p;
      default: xv = ab2;
    endcase
    unique case (op2[3:2])
      2'b00:   yv = '0;
      2'b01:   yv = '0;
      2'b10:   yv = '1;
      default: yv = c2;
    endcase
    unique case (op2[6:4])
      3'b000:  zv = '0;
      3'b001:  zv = pcin;
      3'b010:  zv = p;
      3'b011:  zv = c2;
      default: zv = '0;
    endcase
  end

  assign pcout = p;

  // The product uses X and Y together; either alone is not a legal setting.
  property p_mult_pair;
    @(posedge clk) disable iff (rst)
      ce |-> ((op2[1:0] == 2'b01) == (op2[3:2] == 2'b01));
  endproperty
  a_mult_pair: assert property (p_mult_pair)
    else $error("dsp_slice: OPMODE uses M in only one of X and Y");

endmodule

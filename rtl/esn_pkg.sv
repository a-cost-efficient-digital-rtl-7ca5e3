// esn_pkg: number formats, DSP OPMODE codes and control types shared by the
// ESN accelerator.
//
// Fixed-point formats are written <l,f>: l bits in total, f of them
// fractional, two's complement.
//   state / input z   <20,19>  tanh output width of the symbol-detection build
//   reservoir weight  <16,13>  16-bit words as in the local weight memory;
//                              13 fractional bits are this design's choice so
//                              that z*w lands on 32 fractional bits, which is
//                              where the tanh unit slices |s|[34:25]
//   pre-activation s  <48,32>  the full P register; |s| >= 8 saturates tanh
//   slope             <10,10>  unsigned, tanh LUT 1
//   intercept         <19,19>  unsigned, tanh LUT 2
//   readout weight    <32,14>  this design's choice, holds +/-50,000
//   output y          <32,16>  this design's choice
//
// OPMODE follows the 7-bit DSP48E1 layout: [1:0] X mux, [3:2] Y mux,
// [6:4] Z mux. Only the codes the neuron uses are named here.
package esn_pkg;

  localparam int unsigned Z_W      = 20;
  localparam int unsigned Z_FRAC   = 19;
  localparam int unsigned W_W      = 16;
  localparam int unsigned W_FRAC   = 13;
  localparam int unsigned S_FRAC   = 32;
  localparam int unsigned P_W      = 48;
  localparam int unsigned A_W      = 30;
  localparam int unsigned B_W      = 18;
  localparam int unsigned LUT_AW   = 10;
  localparam int unsigned SLOPE_W  = 10;
  localparam int unsigned ICPT_W   = 19;
  localparam int unsigned DS_W     = 8;
  localparam int unsigned DS_SHIFT = 6;
  localparam int unsigned NDSP     = 9;   // DSP slices per neuron, 3x3
  localparam int unsigned WO_W     = 32;
  localparam int unsigned WO_FRAC  = 14;
  localparam int unsigned Y_W      = 32;
  localparam int unsigned Y_FRAC   = 16;

  typedef logic signed [Z_W-1:0]  state_t;
  typedef logic signed [W_W-1:0]  weight_t;
  typedef logic signed [P_W-1:0]  pword_t;
  typedef logic signed [WO_W-1:0] oweight_t;
  typedef logic signed [Y_W-1:0]  yword_t;

  // X mux: 00 zero, 01 M, 10 P, 11 A:B
  // Y mux: 00 zero, 01 M, 10 all ones, 11 C
  // Z mux: 000 zero, 001 PCIN, 010 P, 011 C
  typedef logic [6:0] opmode_t;
  localparam opmode_t OP_ZERO   = 7'b000_00_00; // P = 0
  localparam opmode_t OP_MUL    = 7'b000_01_01; // P = A*B
  localparam opmode_t OP_MACC   = 7'b010_01_01; // P = P + A*B
  localparam opmode_t OP_CMP1   = 7'b001_11_10; // P = PCIN + C + P   (2.8a)
  localparam opmode_t OP_CMP2   = 7'b010_11_11; // P = A:B + C + P    (2.8b)
  localparam opmode_t OP_MULADD = 7'b011_01_01; // P = C + A*B        (2.7)

  // Per-cycle command broadcast from the sequencer to every neuron.
  typedef struct packed {
    logic macc;       // a z/w row is on the bus: multiply (and accumulate)
    logic macc_first; // first row of a batch: start the sums afresh
    logic cmp1;       // compression I: column sums into P1c
    logic cmp2;       // compression II: P10+P11+P12 into P12
    logic lut_rd;     // s is final in P12: look up slope/intercept
    logic nl;         // LUT data valid: DSP22 computes slope*ds + intercept
    logic x_cap;      // DSP22 result valid: register x
  } nctrl_t;

endpackage

// global_state_mem: the extended state z = {x; u} of the reservoir, shared by
// all neurons.
//
// Word j of z (20-bit <20,19>) is kept in bank j mod 9 at row j/9, so that a
// single read returns the nine words one MACC step needs; the row is
// broadcast to every physical neuron (and to the readout). Reservoir states
// x occupy indices 0..N-1 and the inputs u the indices N..N+M-1; unused
// words of the last row stay zero and so add nothing to any sum.
// Reads are synchronous (data the cycle after rd_addr). One write port takes
// a row with a per-word mask: the sequencer uses it to copy new states from
// the cache, the register interface to place inputs. Reset clears z, which
// gives the zero initial state x(0). The nine-bank layout is this design's
// choice; the document gives the memory's role and its 20-bit words.
module global_state_mem
  import esn_pkg::*;
#(
  parameter int unsigned ROWS = 12,
  parameter int unsigned RAW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [RAW-1:0]  rd_addr,
  output state_t          rd_row  [NDSP],
  input  logic            wr_en,
  input  logic [RAW-1:0]  wr_addr,
  input  logic [NDSP-1:0] wr_mask,
  input  state_t          wr_row  [NDSP]
);

  state_t mem [ROWS][NDSP];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < int'(ROWS); r++)
        for (int k = 0; k < int'(NDSP); k++) mem[r][k] <= '0;
      for (int k = 0; k < int'(NDSP); k++) rd_row[k] <= '0;
    end else begin
      if (wr_en)
        for (int k = 0; k < int'(NDSP); k++)
          if (wr_mask[k]) mem[wr_addr][k] <= wr_row[k];
      for (int k = 0; k < int'(NDSP); k++) rd_row[k] <= mem[rd_addr][k];
    end
  end

endmodule

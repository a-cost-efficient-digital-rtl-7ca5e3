// state_cache: holds the new reservoir states of one time step while the
// physical neurons work through the virtual ones batch by batch.
//
// When N reservoir neurons run on P physical ones, batch b produces
// x_{bP} .. x_{bP+P-1} in one cycle; they are written here (indices >= N are
// dropped) because later batches must still read the old x(n-1) from the
// global state memory. Once all batches are done the sequencer copies the
// cache row by row (nine words per row, the global memory's layout) into
// the global state memory. Writes take effect at the clock edge; the row
// read is combinational so a copy takes one cycle per row.
// The cache follows the document; its organisation is this design's choice.
module state_cache
  import esn_pkg::*;
#(
  parameter int unsigned N_RES  = 100,
  parameter int unsigned N_PHYS = 20,
  parameter int unsigned ROWS   = (N_RES + NDSP - 1) / NDSP,
  parameter int unsigned NB     = (N_RES + N_PHYS - 1) / N_PHYS,
  parameter int unsigned BW     = (NB > 1) ? $clog2(NB) : 1,
  parameter int unsigned RAW    = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic           clk,
  input  logic           wr_en,
  input  logic [BW-1:0]  wr_batch,
  input  state_t         wr_x   [N_PHYS],
  input  logic [RAW-1:0] rd_addr,
  output state_t         rd_row [NDSP]
);

  state_t mem [ROWS*NDSP];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int k = 0; k < int'(N_PHYS); k++)
        if (int'(wr_batch) * int'(N_PHYS) + k < int'(N_RES))
          mem[int'(wr_batch) * int'(N_PHYS) + k] <= wr_x[k];
  end

  always_comb
    for (int k = 0; k < int'(NDSP); k++) rd_row[k] = mem[int'(rd_addr) * int'(NDSP) + k];

endmodule

// readout: the linear output layer y = Wout z(n), z(n) = {x(n); u(n)}.
//
// One multiply-accumulate per output node and cycle. On start the unit
// walks the rows of the global state memory: it asks for row r, latches the
// nine words one cycle later, and then spends nine cycles multiplying word
// k with Wout[l][9r+k] for every output l in parallel. Words beyond N+M are
// zero in the state memory and add nothing.
// Formats: Wout <32,14>, z <20,19>, 64-bit accumulator, y <32,16> taken by
// an arithmetic shift (truncating) and saturated to +/-32768. Output weights are
// written through wo_we/wo_l/wo_j/wo_data at any time the unit is idle.
// Timing: each row costs two fetch cycles and nine MAC cycles; y is loaded
// and done pulses ROWS*11+2 cycles after the start cycle. y holds its value
// until the next result.
// The document gives only the function (a linear readout of the extended
// state with 1 or 2 outputs); the serial structure and the formats are
// this design's choices.
module readout
  import esn_pkg::*;
#(
  parameter int unsigned L_OUT = 1,
  parameter int unsigned ROWS  = 12,
  parameter int unsigned JW    = $clog2(ROWS * NDSP),
  parameter int unsigned LW    = (L_OUT > 1) ? $clog2(L_OUT) : 1,
  parameter int unsigned RAW   = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [RAW-1:0] z_addr,
  input  state_t         z_row [NDSP],
  input  logic           wo_we,
  input  logic [LW-1:0]  wo_l,
  input  logic [JW-1:0]  wo_j,
  input  oweight_t       wo_data,
  output yword_t         y [L_OUT]
);

  localparam int unsigned SHIFT = Z_FRAC + WO_FRAC - Y_FRAC;

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_MAC, S_OUT} st_e;
  st_e st;

  oweight_t wo [L_OUT][ROWS*NDSP];
  state_t   row_q [NDSP];
  logic [3:0]  k;
  logic signed [63:0] acc [L_OUT];
  logic     fetch_wait;

  // y = acc >>> SHIFT, clamped to the <32,16> range
  function automatic yword_t sat_y(logic signed [63:0] a);
    logic signed [63:0] sh;
    sh = a >>> SHIFT;
    if (sh > 64'(yword_t'({1'b0, {(Y_W-1){1'b1}}})))       return {1'b0, {(Y_W-1){1'b1}}};
    else if (sh < -64'sd1 <<< (Y_W - 1))                      return {1'b1, {(Y_W-1){1'b0}}};
    else                                                      return yword_t'(sh);
  endfunction

  always_ff @(posedge clk) begin
    if (wo_we) wo[wo_l][wo_j] <= wo_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S_IDLE;
      z_addr     <= '0;
      k          <= '0;
      done       <= 1'b0;
      fetch_wait <= 1'b0;
      for (int l = 0; l < int'(L_OUT); l++) begin
        acc[l] <= '0;
        y[l]   <= '0;
      end
      for (int i = 0; i < int'(NDSP); i++) row_q[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st         <= S_FETCH;
          z_addr     <= '0;
          fetch_wait <= 1'b1;
          for (int l = 0; l < int'(L_OUT); l++) acc[l] <= '0;
        end
        S_FETCH: begin
          // the address was presented last cycle; the row is now on z_row
          fetch_wait <= 1'b0;
          if (!fetch_wait) begin
            row_q <= z_row;
            k     <= '0;
            st    <= S_MAC;
          end
        end
        S_MAC: begin
          for (int l = 0; l < int'(L_OUT); l++)
            acc[l] <= acc[l] + 64'(wo[l][int'(z_addr) * int'(NDSP) + int'(k)])
                                * 64'(row_q[k]);
          if (k == 4'(NDSP - 1)) begin
            if (z_addr == RAW'(ROWS - 1)) begin
              st <= S_OUT;
            end else begin
              z_addr     <= z_addr + 1'b1;
              fetch_wait <= 1'b1;
              st         <= S_FETCH;
            end
          end else begin
            k <= k + 1'b1;
          end
        end
        S_OUT: begin
          for (int l = 0; l < int'(L_OUT); l++) y[l] <= sat_y(acc[l]);
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

endmodule

// tanh_lut: slope and intercept tables of the piece-wise linear tanh, with
// two synchronous read ports so that one table pair serves two neurons.
//
// The interval [0,8) of |s| is cut into 2^AW equal pieces; entry i starts at
// s_i = 8*i/2^AW. The tables hold, for each piece,
//   intercept_i  <19,19>  tanh(s_i) lifted by the centre of the local error
//                         band (the "improved" table), so that the error of
//                         the line swings evenly around zero
//   slope_i      <10,10>  (tanh(s_{i+1}) - tanh(s_i)) / (8*2^-AW)
// The tables are not stored as data files: a constant function evaluates
// each entry with $tanh at elaboration time (one call per entry, which keeps
// every call short), and the entries form a ROM that synthesis infers.
// The offset of the improved table is found exactly as the hardware will use
// the entry: for each of the 2^DS_W values d of the next input bits,
//   f_hat = intercept_i + (slope_i*d >> 6)   (units of 2^-19)
// is compared with tanh(s_i + d*2^-(AW+DS_W-3)) and the intercept moves by
// half the sum of the largest and smallest error.
//
// Ports: a0/a1 read addresses; slope0/icpt0 and slope1/icpt1 are valid one
// clock after the address (block-RAM read register). Table sizes, formats
// and the improvement rule follow the document's most precise setting
// (10-bit address, 19-bit intercept, 10-bit slope, 8-bit delta).
module tanh_lut
  import esn_pkg::*;
#(
  parameter int unsigned AW = LUT_AW
) (
  input  logic               clk,
  input  logic [AW-1:0]      a0,
  input  logic [AW-1:0]      a1,
  output logic [SLOPE_W-1:0] slope0,
  output logic [ICPT_W-1:0]  icpt0,
  output logic [SLOPE_W-1:0] slope1,
  output logic [ICPT_W-1:0]  icpt1
);

  localparam int unsigned DEPTH = 1 << AW;

  // One table entry: {slope, intercept}, evaluated at elaboration time.
  localparam int unsigned EW = SLOPE_W + ICPT_W;
  typedef logic [EW-1:0] entry_t;

  function automatic int unsigned quant(real v, int unsigned maxv);
    real r;
    r = v + 0.5;
    if (r < 0.0) return 0;
    if (r >= real'(maxv)) return maxv;
    return int'($floor(r));
  endfunction

  function automatic entry_t build_entry(int i);
    real step, ds_lsb, one_y, t0, t1, err, emax, emin, fhat;
    int unsigned ic, sl;
    step   = 8.0 / real'(DEPTH);
    ds_lsb = step / real'(1 << DS_W);
    one_y  = real'(1 << ICPT_W);
    t0 = $tanh(step * real'(i));
    t1 = $tanh(step * real'(i + 1));
    ic = quant(t0 * one_y, (1 << ICPT_W) - 1);
    sl = quant((t1 - t0) / step * real'(1 << SLOPE_W), (1 << SLOPE_W) - 1);
    emax = -1.0e9;
    emin = 1.0e9;
    for (int d = 0; d < (1 << DS_W); d++) begin
      fhat = real'(ic + ((sl * d) >> DS_SHIFT));
      err  = $tanh(step * real'(i) + ds_lsb * real'(d)) * one_y - fhat;
      if (err > emax) emax = err;
      if (err < emin) emin = err;
    end
    ic = quant(real'(ic) + 0.5 * (emax + emin), (1 << ICPT_W) - 1);
    return {SLOPE_W'(sl), ICPT_W'(ic)};
  endfunction

  // The table: one elaboration-time constant per entry.
  entry_t rom [DEPTH];
  for (genvar i = 0; i < int'(DEPTH); i++) begin : g_entry
    localparam entry_t E = build_entry(i);
    assign rom[i] = E;
  end

  logic [EW-1:0] rd0, rd1;
  assign {slope0, icpt0} = rd0;
  assign {slope1, icpt1} = rd1;

  always_ff @(posedge clk) begin
    rd0 <= rom[a0];
    rd1 <= rom[a1];
  end

endmodule

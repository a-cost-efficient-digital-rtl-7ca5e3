// tb_dsp_slice: random commands through the DSP slice, checked against a
// cycle model written here from the slice's definition: the ALU at a clock
// edge uses the command sampled two edges earlier and PCIN as it is at that
// edge, so a command issued in cycle t shows in P from cycle t+3.
module tb_dsp_slice;
  import esn_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [A_W-1:0] a;
  logic signed [B_W-1:0] b;
  logic signed [P_W-1:0] c, pcin, p, pcout;
  opmode_t opmode;

  dsp_slice dut (.clk, .rst, .ce(1'b1), .a, .b, .c, .opmode, .pcin, .p, .pcout);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_op [6];

  typedef struct {
    logic signed [A_W-1:0] a;
    logic signed [B_W-1:0] b;
    logic signed [P_W-1:0] c;
    opmode_t op;
  } cmd_t;

  cmd_t qa, qb;
  logic signed [P_W-1:0] p_exp;
  int lat_seen;

  function automatic logic signed [P_W-1:0] alu(cmd_t q, logic signed [P_W-1:0] pc,
                                                logic signed [P_W-1:0] pold);
    logic signed [P_W-1:0] prod;
    logic signed [24:0] am;
    am   = q.a[24:0];
    prod = P_W'(am) * P_W'(q.b);
    case (q.op)
      OP_ZERO:   return '0;
      OP_MUL:    return prod;
      OP_MACC:   return pold + prod;
      OP_CMP1:   return pc + q.c + pold;
      OP_CMP2:   return P_W'({q.a, q.b}) + q.c + pold;
      OP_MULADD: return q.c + prod;
      default:   return 'x;
    endcase
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opmode_t ops [6] = '{OP_ZERO, OP_MUL, OP_MACC, OP_CMP1, OP_CMP2, OP_MULADD};
    int sel;
    a = '0; b = '0; c = '0; pcin = '0; opmode = OP_ZERO;
    qa = '{a: '0, b: '0, c: '0, op: OP_ZERO};
    qb = qa;
    p_exp = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // Latency: one multiply after zeros appears exactly three edges later.
    a = 30'sd1234; b = -18'sd77; opmode = OP_MUL;
    @(negedge clk) begin a = '0; b = '0; opmode = OP_ZERO; end
    lat_seen = 0;
    for (int e = 1; e <= 4; e++) begin
      @(negedge clk);
      if (p == P_W'(1234 * -77) && lat_seen == 0) lat_seen = e + 1;
    end
    checks++;
    if (lat_seen != 3) begin
      failures++;
      $display("FAIL latency: product seen after %0d edges, expected 3", lat_seen);
    end
    repeat (3) @(negedge clk);

    // Random stream, compared every cycle with the model.
    qa = '{a: '0, b: '0, c: '0, op: OP_ZERO};
    qb = qa;
    p_exp = p;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      sel    = $urandom_range(0, 5);
      opmode = ops[sel];
      n_op[sel]++;
      a      = A_W'($urandom);
      b      = B_W'($urandom);
      c      = {$urandom, $urandom} >>> $urandom_range(0, 30);
      pcin   = {$urandom, $urandom} >>> $urandom_range(0, 30);
      if (i % 50 == 0) begin
        // an exact value to test the A:B split at bit 18
        a = 30'h2AAAAAAA; b = 18'h15555;
      end
    end
    @(negedge clk) opmode = OP_ZERO;
    repeat (4) @(negedge clk);
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (n_op[k] == 0) begin
        failures++;
        $display("FAIL opmode %0d never issued", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle model
  always @(posedge clk) begin
    if (!rst) begin
      p_exp = alu(qb, pcin, p_exp);
      qb = qa;
      qa = '{a: a, b: b, c: c, op: opmode};
    end
  end

  always @(negedge clk) begin
    if (!rst && lat_seen != 0) begin
      checks++;
      if (p !== p_exp || pcout !== p) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0t p=%h expected %h", $time, p, p_exp);
      end
    end
  end
endmodule

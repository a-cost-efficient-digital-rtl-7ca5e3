// tb_esn_regif: every region of the address map, with the decoded strobes
// compared with values worked out here (N=100, P=20, M=2, L=2: inputs go to
// z indices 100 and 101, i.e. row 11 words 1 and 2). Writes while busy and
// out-of-range selectors must produce no strobe.
module tb_esn_regif;
  import esn_pkg::*;

  logic busy, cfg_we;
  logic [31:0] cfg_addr, cfg_wdata;
  logic [19:0] nw_we;
  logic [5:0] nw_addr;
  logic [3:0] nw_bank;
  weight_t nw_data;
  logic wo_we, wo_l, start, u_we;
  logic [6:0] wo_j;
  oweight_t wo_data;
  logic [3:0] u_row;
  logic [NDSP-1:0] u_mask;
  state_t u_data;

  esn_regif #(.N_RES(100), .N_PHYS(20), .M_IN(2), .L_OUT(2)) dut (
    .busy, .cfg_we, .cfg_addr, .cfg_wdata, .nw_we, .nw_addr, .nw_bank, .nw_data,
    .wo_we, .wo_l, .wo_j, .wo_data, .u_we, .u_row, .u_mask, .u_data, .start);

  int checks = 0, failures = 0;
  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, r, k;
    busy = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    #1;
    expect_eq("idle: no strobe", {nw_we, wo_we, u_we, start}, 0);
    for (int i = 0; i < 200; i++) begin
      n = $urandom_range(0, 19); r = $urandom_range(0, 59); k = $urandom_range(0, 8);
      cfg_we = 1; cfg_addr = {4'd0, 8'(n), 16'(r), 4'(k)}; cfg_wdata = $urandom;
      #1;
      expect_eq("neuron we", nw_we, 20'(1) << n);
      expect_eq("neuron row", nw_addr, r);
      expect_eq("neuron bank", nw_bank, k);
      expect_eq("neuron data", nw_data, weight_t'(cfg_wdata[15:0]));
      expect_eq("no other strobe", {wo_we, u_we, start}, 0);
    end
    cfg_addr = {4'd0, 8'd20, 16'd0, 4'd0}; #1;
    expect_eq("neuron beyond P", nw_we, 0);
    for (int i = 0; i < 50; i++) begin
      n = $urandom_range(0, 1); r = $urandom_range(0, 107);
      cfg_addr = {4'd1, 8'(n), 20'(r)}; cfg_wdata = $urandom; #1;
      expect_eq("wo we", wo_we, 1);
      expect_eq("wo l", wo_l, n);
      expect_eq("wo j", wo_j, r);
      expect_eq("wo data", longint'($unsigned(wo_data)), longint'(cfg_wdata));
    end
    cfg_addr = {4'd2, 8'd0, 20'd0}; cfg_wdata = 32'h000ABCDE; #1;
    expect_eq("u0 we", u_we, 1);
    expect_eq("u0 row", u_row, 11);
    expect_eq("u0 mask", u_mask, 9'b000000010);
    expect_eq("u0 data", longint'($unsigned(u_data)), 20'hABCDE);
    cfg_addr = {4'd2, 8'd0, 20'd1}; #1;
    expect_eq("u1 row", u_row, 11);
    expect_eq("u1 mask", u_mask, 9'b000000100);
    cfg_addr = {4'd2, 8'd0, 20'd2}; #1;
    expect_eq("u beyond M", u_we, 0);
    cfg_addr = {4'd3, 28'd0}; cfg_wdata = 1; #1;
    expect_eq("start", start, 1);
    cfg_wdata = 0; #1;
    expect_eq("no start for 0", start, 0);
    // busy drops every write
    busy = 1;
    cfg_wdata = 1; #1;
    expect_eq("start while busy", start, 0);
    cfg_addr = {4'd2, 8'd0, 20'd0}; #1;
    expect_eq("u while busy", u_we, 0);
    cfg_addr = {4'd0, 8'd3, 16'd1, 4'd1}; #1;
    expect_eq("weight while busy", nw_we, 0);
    cfg_addr = {4'd1, 8'd0, 20'd1}; #1;
    expect_eq("wo while busy", wo_we, 0);
    busy = 0; cfg_we = 0; #1;
    expect_eq("no write no strobe", {nw_we, wo_we, u_we, start}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

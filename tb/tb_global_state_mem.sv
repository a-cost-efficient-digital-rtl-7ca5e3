// tb_global_state_mem: masked row writes against a model array, synchronous
// reads (data one clock after the address) and clearing by reset.
module tb_global_state_mem;
  import esn_pkg::*;

  localparam int ROWS = 5;
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] rd_addr, wr_addr;
  state_t rd_row [NDSP], wr_row [NDSP];
  logic wr_en;
  logic [NDSP-1:0] wr_mask;
  state_t model [ROWS][NDSP];

  global_state_mem #(.ROWS(ROWS)) dut (.clk, .rst, .rd_addr, .rd_row, .wr_en, .wr_addr,
                                       .wr_mask, .wr_row);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row(input int r);
    @(negedge clk) rd_addr = 3'(r);
    @(posedge clk) #1;
    for (int k = 0; k < int'(NDSP); k++) begin
      checks++;
      if (rd_row[k] !== model[r][k]) begin
        failures++;
        $display("FAIL row %0d word %0d = %h expected %h", r, k, rd_row[k], model[r][k]);
      end
    end
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; wr_mask = 0; rd_addr = 0;
    for (int k = 0; k < int'(NDSP); k++) wr_row[k] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < ROWS; r++) for (int k = 0; k < int'(NDSP); k++) model[r][k] = '0;
    for (int r = 0; r < ROWS; r++) check_row(r);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      wr_en   = ($urandom_range(0, 3) != 0);
      wr_addr = 3'($urandom_range(0, ROWS - 1));
      wr_mask = NDSP'($urandom);
      for (int k = 0; k < int'(NDSP); k++) wr_row[k] = state_t'($urandom);
      if (wr_en)
        for (int k = 0; k < int'(NDSP); k++) if (wr_mask[k]) model[wr_addr][k] = wr_row[k];
      @(negedge clk) wr_en = 0;
      check_row($urandom_range(0, ROWS - 1));
    end
    for (int r = 0; r < ROWS; r++) check_row(r);
    // reset clears everything
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    for (int r = 0; r < ROWS; r++) for (int k = 0; k < int'(NDSP); k++) model[r][k] = '0;
    for (int r = 0; r < ROWS; r++) check_row(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

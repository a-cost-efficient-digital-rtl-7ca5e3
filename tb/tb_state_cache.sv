// tb_state_cache: 23 states on 5 physical neurons (five batches, the last
// one partial). Each batch writes five words; the rows read back must hold
// x_{5b+k} at index 5b+k, and words of the last batch beyond index 22 must
// not disturb anything.
module tb_state_cache;
  import esn_pkg::*;

  localparam int N_RES = 23, N_PHYS = 5, NB = 5, ROWS = 3;
  logic clk = 1'b0;
  logic wr_en;
  logic [2:0] wr_batch;
  state_t wr_x [N_PHYS];
  logic [1:0] rd_addr;
  state_t rd_row [NDSP];
  state_t model [ROWS*NDSP];

  state_cache #(.N_RES(N_RES), .N_PHYS(N_PHYS)) dut (.clk, .wr_en, .wr_batch, .wr_x,
                                                    .rd_addr, .rd_row);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_batch = 0; rd_addr = 0;
    for (int k = 0; k < N_PHYS; k++) wr_x[k] = '0;
    for (int rep = 0; rep < 10; rep++) begin
      for (int b = NB - 1; b >= 0; b--) begin
        @(negedge clk);
        wr_en = 1; wr_batch = 3'(b);
        for (int k = 0; k < N_PHYS; k++) begin
          wr_x[k] = state_t'($urandom);
          if (b * N_PHYS + k < N_RES) model[b * N_PHYS + k] = wr_x[k];
        end
      end
      @(negedge clk) wr_en = 0;
      // a write with wr_en low changes nothing
      wr_batch = 0;
      for (int k = 0; k < N_PHYS; k++) wr_x[k] = state_t'($urandom);
      @(negedge clk);
      for (int r = 0; r < ROWS; r++) begin
        rd_addr = 2'(r);
        #1;
        for (int k = 0; k < int'(NDSP); k++)
          if (r * int'(NDSP) + k < N_RES) begin
            checks++;
            if (rd_row[k] !== model[r * int'(NDSP) + k]) begin
              failures++;
              $display("FAIL index %0d = %h expected %h", r * int'(NDSP) + k, rd_row[k],
                       model[r * int'(NDSP) + k]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

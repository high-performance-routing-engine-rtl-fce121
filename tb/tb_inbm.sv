// tb_inbm: checks the data buffer memory against an array model.
// Random writes and reads over a small buffer (8 cells of 8 rows): read data
// must be the last value written, one cycle after rd_en, and a read in the
// same cycle as a write to that row must return the old contents.
// Runs reduced (8 cells of 8 rows) at the published 72-bit width; the 1W1R synchronous
// port structure checked is this design's own choice.
// A watchdog stops the run after 100000 time units (clock period 10).
module tb_inbm;
  localparam int NC = 8, CR = 8, W = 72, D = NC * CR, AW = $clog2(D);
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  inbm #(.N_CELLS(NC), .CELL_ROWS(CR), .ROW_W(W)) dut (.*);

  logic [W-1:0] model [D];
  logic [W-1:0] expect_q;
  bit pend = 0;
  int checks = 0, failures = 0;

  initial begin
    // fill every row first so reads return known data
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i); wr_data = {$urandom, $urandom, 8'(i)};
      model[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          $display("FAIL read %h vs %h", rd_data, expect_q);
        end
      end
      wr_en = $urandom_range(1);
      wr_addr = AW'($urandom);
      wr_data = {$urandom, $urandom, 8'($urandom)};
      rd_en = $urandom_range(3) != 0;
      rd_addr = (t % 7 == 0) ? wr_addr : AW'($urandom);
      pend = rd_en;
      expect_q = model[rd_addr];        // old value even if written now
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

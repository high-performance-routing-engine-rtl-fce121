// tb_inpm: checks the pointer memory against an array model.
// Random writes with random bit masks and random reads over 16 entries: a
// read returns, one cycle later, the entry with only the masked bits of
// each earlier write changed.
// Runs reduced (16 entries) at the published 36-bit width. The dual-port memory follows
// the published design; the bit write mask is this design's own.
// A watchdog stops the run after 100000 time units (clock period 10).
module tb_inpm;
  localparam int NC = 16, W = 36, AW = $clog2(NC);
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, wr_mask = '0, rd_data;
  inpm #(.N_CELLS(NC), .PTR_W(W)) dut (.*);

  logic [W-1:0] model [NC];
  logic [W-1:0] expect_q;
  bit pend = 0;
  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < NC; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i); wr_data = W'({$urandom, $urandom}); wr_mask = '1;
      model[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 3000; t++) begin
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
      wr_data = W'({$urandom, $urandom});
      wr_mask = W'({$urandom, $urandom});
      rd_en = $urandom_range(1);
      rd_addr = AW'($urandom);
      pend = rd_en;
      expect_q = model[rd_addr];
      if (wr_en) model[wr_addr] = (model[wr_addr] & ~wr_mask) | (wr_data & wr_mask);
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

// tb_bpc: checks the backpressure controller.
// Random arrival and stitch vectors with no common bit and random free
// counts against random thresholds; one cycle later inc_vec must be their
// OR and backpressure must say whether the free count was below the
// threshold.
// Sizes are the published 16 ports and 128 cells. That the BPC passes on arrival and
// stitch events follows the published design; the threshold rule for the flag is this design's own.
// A watchdog stops the run after 100000 time units (clock period 10).
module tb_bpc;
  localparam int NP = 16, NC = 128, CW = $clog2(NC + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NP-1:0] arr_vec = '0, stch_vec = '0, inc_vec;
  logic [CW-1:0] free_cells = '0, bp_thresh = '0;
  logic backpressure;
  bpc #(.N_PORTS(NP), .N_CELLS(NC)) dut (.*);

  int checks = 0, failures = 0, n_bp = 0;
  logic [NP-1:0] exp_inc;
  bit exp_bp;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      arr_vec = NP'(1) << $urandom_range(NP - 1);
      if ($urandom_range(1)) arr_vec = '0;
      stch_vec = NP'(1) << $urandom_range(NP - 1);
      if ($urandom_range(1) || stch_vec == arr_vec) stch_vec = '0;
      free_cells = CW'($urandom_range(NC));
      bp_thresh = CW'($urandom_range(64));
      exp_inc = arr_vec | stch_vec;
      exp_bp = free_cells < bp_thresh;
      @(negedge clk);
      checks += 2;
      if (inc_vec != exp_inc) begin failures++; $display("FAIL inc %h vs %h", inc_vec, exp_inc); end
      if (backpressure != exp_bp) begin failures++; $display("FAIL bp"); end
      if (exp_bp) n_bp++;
    end
    checks++;
    if (n_bp == 0) failures++;
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

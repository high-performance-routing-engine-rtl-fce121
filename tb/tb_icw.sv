// tb_icw: checks the incoming cell writer.
// A free-running 12-phase slot counter; a random cell (or none) in each
// slot, admitted at random with a random cell address given from phase 1.
// In phase 0 the header mask must be shown; in every odd phase 2k+1 of an
// admitted cell, row k = {half word 2k, half word 2k+1} must be written at
// address*6 + k; nothing may be written for a refused cell.
// Sizes are the published ones (16 ports, 128 cells, 72-bit rows). The row layout and
// write phases checked are this design's own choice.
// A watchdog stops the run after 200000 time units (clock period 10).
module tb_icw;
  localparam int NP = 16, NC = 128, CR = 6, HW = 36, AW = 7, BAW = $clog2(NC * CR), PHW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [PHW-1:0] phase = '0;
  logic in_valid = 0, hdr_valid, cell_valid = 0, wr_en;
  logic [HW-1:0] in_data = '0;
  logic [NP-1:0] hdr_mask;
  logic [AW-1:0] cell_addr = '0;
  logic [BAW-1:0] wr_addr;
  logic [2*HW-1:0] wr_data;
  icw #(.N_PORTS(NP), .N_CELLS(NC), .CELL_ROWS(CR), .HALF_W(HW)) dut (.*);

  int checks = 0, failures = 0, n_rows = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  initial begin
    logic [HW-1:0] words [2*CR];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 400; s++) begin
      bit present, adm;
      logic [AW-1:0] ad;
      present = $urandom_range(3) != 0;
      adm = present && $urandom_range(3) != 0;
      ad = AW'($urandom);
      for (int k = 0; k < 2 * CR; k++) words[k] = HW'({$urandom, $urandom});
      for (int p = 0; p < 2 * CR; p++) begin
        phase = PHW'(p);
        in_valid = present;
        in_data = words[p];
        if (p == 1) begin cell_valid = adm; cell_addr = ad; end
        #1;
        if (p == 0) begin
          chk(hdr_valid == present, "header valid in phase 0");
          chk(hdr_mask == words[0][NP-1:0], "header mask");
        end else chk(!hdr_valid, "header only in phase 0");
        if (p % 2 == 1) begin
          chk(wr_en == adm, "row write enable");
          if (adm) begin
            chk(int'(wr_addr) == int'(ad) * CR + p / 2, "row address");
            chk(wr_data == {words[p-1], words[p]}, "row = left half, right half");
            n_rows++;
          end
        end else chk(!wr_en, "no write in even phases");
        @(negedge clk);
      end
      cell_valid = 0;
    end
    chk(n_rows > 0, "rows written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

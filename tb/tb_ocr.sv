// tb_ocr: checks the outgoing cell reader with a behavioural data buffer.
// Back-to-back 12-cycle slots: a grant pulse in cycle 1 (not every slot),
// read start with a random cell address in cycle 3, grant release in cycle
// 5. The grant must be held from cycle 2 to 5; a granted cell must come out
// as 12 half words starting the cycle after start (left half of row 0
// first), marked by out_sop and with the granted port; nothing may come
// out for a slot without a grant.
// Runs with 16 cells at the published port count. The grant path through the OCR follows
// the published design; the 4-cycle start and half-word output stream are this design's own.
// A watchdog stops the run after 200000 time units (clock period 10).
module tb_ocr;
  localparam int NP = 16, NC = 16, CR = 6, HW = 36, AW = 4, BAW = $clog2(NC * CR), PW = 4, SL = 2 * CR;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic gnt_valid = 0, gnt_valid_q, gnt_done = 0, start = 0, rd_en;
  logic [PW-1:0] gnt_port = '0, gnt_port_q, out_port;
  logic [AW-1:0] cell_addr = '0;
  logic [BAW-1:0] rd_addr;
  logic [2*HW-1:0] rd_data;
  logic out_valid, out_sop;
  logic [HW-1:0] out_data;
  ocr #(.N_PORTS(NP), .N_CELLS(NC), .CELL_ROWS(CR), .HALF_W(HW)) dut (.*);

  logic [2*HW-1:0] mem [NC * CR];
  always @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  // expected output stream, one entry per cycle
  int exp_v[$];
  logic [HW-1:0] exp_d[$];
  int exp_p[$];
  int checks = 0, failures = 0, n_cells = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  initial begin
    for (int i = 0; i < NC * CR; i++) mem[i] = {$urandom, $urandom, 8'(i)};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // nothing expected for the first cycles
    for (int i = 0; i < 4; i++) begin exp_v.push_back(0); exp_d.push_back('0); exp_p.push_back(0); end
    for (int s = 0; s < 300; s++) begin
      bit g;
      int port;
      logic [AW-1:0] ad;
      g = $urandom_range(3) != 0;
      port = $urandom_range(NP - 1);
      ad = AW'($urandom);
      for (int c = 0; c < SL; c++) begin
        gnt_valid = (c == 1) && g;
        gnt_port = PW'(port);
        start = (c == 3);
        cell_addr = (c == 3) ? ad : AW'($urandom);
        gnt_done = (c == 5);
        #1;
        if (c >= 2 && c <= 5) chk(gnt_valid_q == g && (!g || int'(gnt_port_q) == port), "grant held");
        if (c == 6 || c == 0) chk(!gnt_valid_q, "grant released");
        // compare with the expected stream
        if (exp_v.size() > 0) begin
          int v, p;
          logic [HW-1:0] d;
          v = exp_v.pop_front(); d = exp_d.pop_front(); p = exp_p.pop_front();
          chk(out_valid == (v != 0), $sformatf("out_valid %b vs %0d", out_valid, v));
          if (v != 0) begin
            chk(out_sop == (v == 2), "sop");
            chk(out_data == d, "out data");
            chk(int'(out_port) == p, "out port");
          end
        end
        if (c == 3) begin
          // this slot's expected output begins at c = 4
          for (int k = 0; k < SL; k++) begin
            logic [2*HW-1:0] row;
            row = mem[int'(ad) * CR + k / 2];
            exp_v.push_back(g ? (k == 0 ? 2 : 1) : 0);
            exp_d.push_back(k % 2 == 0 ? row[2*HW-1:HW] : row[HW-1:0]);
            exp_p.push_back(port);
          end
          if (g) n_cells++;
        end
        @(negedge clk);
      end
    end
    chk(n_cells > 0, "cells read");
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

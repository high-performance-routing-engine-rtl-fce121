// tb_wpm: checks the write pointer manager's memory writes and queue append.
// Each 4-cycle slot: header tick with a random admit, destination mask and
// idle address; leaf-field write in the next cycle; link and append in the
// one after, against random queue tails and non-empty flags. Expected
// values (first destination = lowest set bit, leaves = the rest) are worked
// out here.
// Sizes are the published 16 ports and 128 cells. Appending at the destination queue
// follows the published design; the leaf field write is this design's own.
// A watchdog stops the run after 100000 time units (clock period 10).
module tb_wpm;
  localparam int NP = 16, NC = 128, W = 36, AW = 7, PW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hdr_tick = 0, rd_tick = 0, link_tick = 0, admit = 0;
  logic [NP-1:0] hdr_mask = '0, nonempty = '0;
  logic [AW-1:0] iar = '0, cell_addr, app_addr, wr_addr;
  logic cell_valid, app_en, arr_en, wr_en;
  logic [NP-1:0][AW-1:0] otr = '0;
  logic [PW-1:0] app_q, arr_q;
  logic [W-1:0] wr_data, wr_mask;
  wpm #(.N_PORTS(NP), .N_CELLS(NC), .PTR_W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 1000; s++) begin
      logic a;
      logic [NP-1:0] m, rest;
      logic [AW-1:0] ad;
      int first;
      a = $urandom_range(3) != 0;
      m = (s % 3 == 0) ? NP'($urandom) : NP'(1) << $urandom_range(NP - 1);
      if (m == '0) m = 16'h8000;
      ad = AW'($urandom);
      first = -1;
      for (int i = NP - 1; i >= 0; i--) if (m[i]) first = i;
      rest = m; rest[first] = 1'b0;
      // header
      @(negedge clk);
      hdr_tick = 1; admit = a; hdr_mask = m; iar = ad;
      chk(!wr_en && !app_en, "idle outside ticks");
      @(negedge clk);
      hdr_tick = 0; admit = 0; hdr_mask = '0; iar = '0;
      rd_tick = 1;
      for (int i = 0; i < NP; i++) otr[i] = AW'($urandom);
      nonempty = NP'($urandom);
      #1;
      chk(cell_valid == a && (!a || cell_addr == ad), "latched cell");
      chk(wr_en == a, "leaf write enable");
      if (a) begin
        chk(wr_addr == ad, "leaf write address");
        chk(wr_mask == 36'h0_0000_FFFF, "leaf write mask");
        chk(wr_data[15:0] == rest, $sformatf("leaves %h vs %h", wr_data[15:0], rest));
      end
      chk(!app_en, "no append in rd tick");
      @(negedge clk);
      rd_tick = 0; link_tick = 1;
      #1;
      chk(app_en == a && arr_en == a, "append enable");
      if (a) begin
        chk(int'(app_q) == first && int'(arr_q) == first, "append queue");
        chk(app_addr == ad, "append address");
        chk(wr_en == nonempty[first], "link write only for a non-empty queue");
        if (nonempty[first]) begin
          chk(wr_addr == otr[first], "link write at the tail");
          chk(wr_mask == 36'h0_007F_0000 && wr_data[22:16] == ad, "next pointer field");
        end
      end else chk(!wr_en, "no write for a dropped cell");
      @(negedge clk);
      link_tick = 0;
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

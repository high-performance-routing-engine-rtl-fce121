// tb_rpm: checks the read pointer manager with a behavioural pointer memory.
// Each slot: a grant for a random non-empty queue; the read tick must read
// the head's entry and show its address; the pop tick must pop with the
// stored next pointer and, for a cell with leaves left, rewrite the leaf
// field without the lowest leaf; the link tick must stitch the cell to that
// leaf's queue (linking at the tail if non-empty) or else free it.
// Sizes are the published 16 ports and 128 cells. Pop and multicast stitching follow the
// published design; the phase split and leaf order are this design's own.
// A watchdog stops the run after 100000 time units (clock period 10).
module tb_rpm;
  localparam int NP = 16, NC = 128, W = 36, AW = 7, PW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_tick = 0, pop_tick = 0, link_tick = 0, gnt_valid = 0;
  logic [PW-1:0] gnt_port = '0, pop_q, app_q, stch_q;
  logic [AW-1:0] cell_addr, pop_next, app_addr, free_addr, rd_addr, wr_addr;
  logic [NP-1:0][AW-1:0] ohr = '0, otr = '0;
  logic [NP-1:0] nonempty = '0;
  logic pop_en, app_en, stch_en, free_en, rd_en, wr_en;
  logic [W-1:0] rd_data, wr_data, wr_mask;
  rpm #(.N_PORTS(NP), .N_CELLS(NC), .PTR_W(W)) dut (.*);

  logic [W-1:0] mem [NC];
  always @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  int checks = 0, failures = 0;
  int n_stitch = 0, n_free = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 1000; s++) begin
      int g, nl;
      logic [AW-1:0] h, nx;
      logic [NP-1:0] lv;
      g = $urandom_range(NP - 1);
      h = AW'($urandom);
      nx = AW'($urandom);
      lv = ($urandom_range(1) != 0) ? NP'($urandom) & ~(NP'(1) << g) : '0;
      mem[h] = {13'h0, nx, lv};
      for (int i = 0; i < NP; i++) begin ohr[i] = AW'($urandom); otr[i] = AW'($urandom); end
      ohr[g] = h;
      nonempty = NP'($urandom);
      nonempty[g] = 1'b1;
      nl = -1;
      for (int i = NP - 1; i >= 0; i--) if (lv[i]) nl = i;
      @(negedge clk);
      gnt_valid = 1; gnt_port = PW'(g); rd_tick = 1;
      #1;
      chk(rd_en && rd_addr == h && cell_addr == h, "head read");
      @(negedge clk);
      rd_tick = 0; pop_tick = 1;
      #1;
      chk(pop_en && int'(pop_q) == g && pop_next == nx, "pop with next pointer");
      chk(wr_en == (lv != '0), "leaf rewrite enable");
      if (lv != '0) begin
        logic [NP-1:0] rest;
        rest = lv; rest[nl] = 1'b0;
        chk(wr_addr == h && wr_mask == 36'h0_0000_FFFF && wr_data[15:0] == rest, "leaf rewrite");
      end
      @(negedge clk);
      pop_tick = 0; link_tick = 1;
      #1;
      if (lv != '0) begin
        n_stitch++;
        chk(app_en && stch_en && !free_en, "stitch, not free");
        chk(int'(app_q) == nl && int'(stch_q) == nl && app_addr == h, "stitch queue and address");
        chk(wr_en == nonempty[nl], "tail link only if non-empty");
        if (nonempty[nl]) chk(wr_addr == otr[nl] && wr_data[22:16] == h && wr_mask == 36'h0_007F_0000, "tail link");
      end else begin
        n_free++;
        chk(free_en && !app_en && free_addr == h && !wr_en, "free");
      end
      @(negedge clk);
      link_tick = 0; gnt_valid = 0;
      #1;
      chk(!pop_en && !app_en && !free_en && !rd_en, "quiet without ticks");
    end
    chk(n_stitch > 0 && n_free > 0, "both outcomes seen");
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

// tb_idq: checks the idle queue with a behavioural pointer memory.
// Eight cell addresses. After reset init_done must rise after 7 cycles.
// Then slots of 8 cycles are run: refill read in cycle 1, refill load in
// cycle 2 (with a random take of the prefetched address), a random free of
// a held address in cycle 5. The model is the list of free addresses in the
// order they must be handed out (first 0..7, then in the order freed): each
// taken IAR must be its front, iar_valid must say whether it was non-empty
// at the refill, and free_cells must equal its length.
// Runs reduced (4 ports, 8 cells) so the idle queue empties and refills often. The
// IHR/ITR/IAR registers follow the published design; the init fill and prefetch are this design's own.
// A watchdog stops the run after 100000 time units (clock period 10).
module tb_idq;
  localparam int NP = 4, NC = 8, W = 36, AW = $clog2(NC), CW = $clog2(NC + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init_done, refill_rd = 0, refill_ld = 0, take = 0, free_en = 0;
  logic [AW-1:0] free_addr = '0, iar, rd_addr, wr_addr;
  logic iar_valid, rd_en, wr_en;
  logic [CW-1:0] free_cells;
  logic [W-1:0] rd_data, wr_data, wr_mask;
  idq #(.N_PORTS(NP), .N_CELLS(NC), .PTR_W(W)) dut (.*);

  // behavioural pointer memory
  logic [W-1:0] mem [NC];
  always @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= (mem[wr_addr] & ~wr_mask) | (wr_data & wr_mask);
    if (rd_en) rd_data <= mem[rd_addr];
  end

  int freeq[$];
  int held[$];
  int checks = 0, failures = 0;
  bit exp_valid;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  initial begin
    int c;
    for (int i = 0; i < NC; i++) freeq.push_back(i);
    repeat (2) @(negedge clk);
    rst_n = 1;
    c = 0;
    while (!init_done) begin @(negedge clk); c++; end
    chk(c == NC - 1, $sformatf("init took %0d cycles", c));
    for (int s = 0; s < 600; s++) begin
      for (int ph = 0; ph < 8; ph++) begin
        refill_rd = (ph == 1);
        refill_ld = (ph == 2);
        free_en = 0;
        if (ph == 1) take = iar_valid && ($urandom_range(99) < (s % 100 < 50 ? 70 : 30));
        if (ph == 2 && take) begin
          chk(iar == AW'(freeq[0]), $sformatf("taken %0d vs %0d", iar, freeq[0]));
          held.push_back(freeq.pop_front());
        end
        if (ph == 2) exp_valid = freeq.size() > 0;
        if (ph == 3) begin
          chk(iar_valid == exp_valid, "iar_valid");
          if (iar_valid) chk(iar == AW'(freeq[0]), "iar is the list front");
          chk(free_cells == CW'(freeq.size()), $sformatf("free_cells %0d vs %0d", free_cells, freeq.size()));
        end
        if (ph == 5 && held.size() > 0 && $urandom_range(99) < 50) begin
          int k, a;
          k = $urandom_range(held.size() - 1);
          a = held[k];
          held.delete(k);
          free_en = 1; free_addr = AW'(a);
          freeq.push_back(a);
        end
        @(negedge clk);
      end
      take = 0;
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

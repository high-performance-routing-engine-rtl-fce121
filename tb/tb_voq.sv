// tb_voq: checks the VOQ head/tail registers against model queues.
// Addresses come from a pool so that each is in at most one queue. Each
// cycle the testbench may append a free address to a random queue and pop
// a random non-empty queue (giving the model's next address as pop_next),
// including append and pop of the same queue in one cycle. After every
// cycle head, tail and non-empty flag of every queue must match the model.
// Runs reduced (4 ports, 16 cells). The OHR/OTR registers follow the published design;
// the non-empty flag is this design's own.
// A watchdog stops the run after 100000 time units (clock period 10).
module tb_voq;
  localparam int NP = 4, NC = 16, AW = $clog2(NC), PW = $clog2(NP);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic app_en = 0, pop_en = 0;
  logic [PW-1:0] app_q = '0, pop_q = '0;
  logic [AW-1:0] app_addr = '0, pop_next = '0;
  logic [NP-1:0][AW-1:0] ohr, otr;
  logic [NP-1:0] nonempty;
  voq #(.N_PORTS(NP), .N_CELLS(NC)) dut (.*);

  int q[NP][$];
  int pool[$];
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int i = 0; i < NC; i++) pool.push_back(i);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int pq, aq, pa;
      @(negedge clk);
      // compare state left by the previous cycle
      for (int i = 0; i < NP; i++) begin
        chk(nonempty[i] == (q[i].size() > 0), $sformatf("nonempty %0d", i));
        if (q[i].size() > 0) begin
          chk(ohr[i] == AW'(q[i][0]), $sformatf("head %0d", i));
          chk(otr[i] == AW'(q[i][$]), $sformatf("tail %0d", i));
        end
      end
      pop_en = 0; app_en = 0;
      pq = $urandom_range(NP - 1);
      if (q[pq].size() > 0 && $urandom_range(2) != 0) begin
        pop_en = 1; pop_q = PW'(pq);
        pop_next = q[pq].size() > 1 ? AW'(q[pq][1]) : AW'($urandom);
      end
      aq = (t % 5 == 0) ? pq : $urandom_range(NP - 1);
      if (pool.size() > 0 && $urandom_range(1) != 0) begin
        pa = pool.pop_front();
        app_en = 1; app_q = PW'(aq); app_addr = AW'(pa);
      end
      if (pop_en) pool.push_back(q[pq].pop_front());
      if (app_en) q[aq].push_back(pa);
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

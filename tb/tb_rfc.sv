// tb_rfc: checks the request FIFO controller against a model of the
// request-shifting rule.
// Slots of 4 cycles: grant tick in cycle 0 (a random grant, sometimes for a
// VOQ with no request), cell increments in cycles 1 and 2, request tick in
// cycle 3. The model keeps, per VOQ, the FIFO bits (entry at index 0, head
// at index RF_LEN-1) and the count of cells not yet requested: a grant
// clears the oldest valid bit; the request tick shifts towards the head and
// stores a new request only while the head bit is clear. req_vec, the FIFO
// bits, the counts, the forwarded grant and the bad-grant count must match.
// The test also checks that a full FIFO stalls a VOQ with cells waiting.
// Runs reduced (4 ports, 16 cells) at the published request FIFO length of 2. The shift,
// store and delete-oldest rules follow the published design; gating on the head element is this
// design's reading of it.
// A watchdog stops the run after 200000 time units (clock period 10).
module tb_rfc;
  localparam int NP = 4, NC = 16, L = 2, PW = 2, CW = $clog2(NC + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NP-1:0] inc_vec = '0, req_vec;
  logic req_tick = 0, grant_tick = 0, grant_valid = 0, gnt_valid;
  logic [PW-1:0] grant_port = '0, gnt_port;
  logic [NP-1:0][L-1:0] rf;
  logic [NP-1:0][CW-1:0] rfc_len;
  logic [31:0] bad_grants;
  rfc #(.N_PORTS(NP), .N_CELLS(NC), .RF_LEN(L)) dut (.*);

  bit f[NP][L];
  int cnt[NP];
  bit exp_req[NP];
  int bad = 0, checks = 0, failures = 0, n_stall = 0, n_full = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  initial begin
    foreach (cnt[i]) begin
      cnt[i] = 0; exp_req[i] = 0;
      for (int j = 0; j < L; j++) f[i][j] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 1500; s++) begin
      // cycle 0: grant
      @(negedge clk);
      grant_tick = 1;
      grant_valid = $urandom_range(2) != 0;
      grant_port = PW'($urandom);
      begin
        int g, o;
        bit ok;
        g = int'(grant_port);
        o = -1;
        for (int j = 0; j < L; j++) if (f[g][j]) o = j;
        ok = grant_valid && o >= 0;
        if (grant_valid && !ok) bad++;
        if (ok) f[g][o] = 0;
        @(negedge clk);
        grant_tick = 0; grant_valid = 0;
        chk(gnt_valid == ok && (!ok || int'(gnt_port) == g), "forwarded grant");
      end
      // cycles 1, 2: increments
      inc_vec = (s % 300 < 200) ? NP'($urandom) & NP'($urandom) : '0;
      for (int i = 0; i < NP; i++) begin
        if (cnt[i] >= NC - L) inc_vec[i] = 1'b0;   // a VOQ holds at most NC cells
        cnt[i] += int'(inc_vec[i]);
      end
      @(negedge clk);
      chk(gnt_valid == 0, "grant lasts one cycle");
      inc_vec = '0;
      // cycle 3: request tick
      req_tick = 1;
      for (int i = 0; i < NP; i++) begin
        if (!f[i][L-1]) begin
          exp_req[i] = cnt[i] > 0;
          for (int j = L - 1; j > 0; j--) f[i][j] = f[i][j-1];
          f[i][0] = exp_req[i];
          if (exp_req[i]) cnt[i]--;
        end else begin
          exp_req[i] = 0;
          if (cnt[i] > 0) n_stall++;
        end
      end
      @(negedge clk);
      req_tick = 0;
      for (int i = 0; i < NP; i++) begin
        int nv;
        nv = 0;
        chk(req_vec[i] == exp_req[i], $sformatf("req %0d", i));
        for (int j = 0; j < L; j++) begin
          chk(rf[i][j] == f[i][j], $sformatf("rf %0d %0d", i, j));
          nv += int'(f[i][j]);
        end
        if (nv == L) n_full++;
        chk(int'(rfc_len[i]) == cnt[i], $sformatf("rfc_len %0d: %0d vs %0d", i, rfc_len[i], cnt[i]));
      end
      chk(bad_grants == 32'(bad), "bad grants");
    end
    chk(n_stall > 0 && n_full > 0 && bad > 0, "stall, full FIFO and bad grant seen");
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

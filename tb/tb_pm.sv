// tb_pm: checks the policing module against a model of the queue lengths.
// Random arrival, stitch and departure events (never taking a length below
// zero) and random headers with random limits; admit must follow the rule
// (free address ready, non-empty mask, every destination below the limit),
// lengths and the drop count must match, and the event vectors must be the
// one-hot form of the events.
// Runs reduced (4 ports, 16 cells). That the PM keeps the VOQ lengths follows the
// published design; the admission rule checked is this design's own.
// A watchdog stops the run after 100000 time units (clock period 10).
module tb_pm;
  localparam int NP = 4, NC = 16, PW = 2, CW = $clog2(NC + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hdr_valid = 0, iar_valid = 0, admit, arr_en = 0, stch_en = 0, dep_en = 0;
  logic [NP-1:0] hdr_mask = '0, arr_vec, stch_vec;
  logic [CW-1:0] voq_limit = '0;
  logic [PW-1:0] arr_q = '0, stch_q = '0, dep_q = '0;
  logic [NP-1:0][CW-1:0] voq_len;
  logic [31:0] drop_count;
  pm #(.N_PORTS(NP), .N_CELLS(NC)) dut (.*);

  int len[NP];
  int drops = 0, checks = 0, failures = 0, n_admit = 0, n_limit = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  initial begin
    foreach (len[i]) len[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      bit exp_admit, room;
      @(negedge clk);
      for (int i = 0; i < NP; i++) chk(int'(voq_len[i]) == len[i], $sformatf("len %0d", i));
      chk(drop_count == 32'(drops), "drop count");
      hdr_valid = $urandom_range(1);
      hdr_mask = NP'($urandom);
      iar_valid = $urandom_range(7) != 0;
      voq_limit = CW'($urandom_range(1, 8));
      arr_en = $urandom_range(1); arr_q = PW'($urandom);
      stch_en = $urandom_range(1); stch_q = PW'($urandom);
      if (stch_en && stch_q == arr_q) stch_en = 0;
      dep_q = PW'($urandom);
      dep_en = $urandom_range(1) && len[dep_q] > 0;
      if (t % 200 > 150) begin arr_en = 0; stch_en = 0; end   // let queues drain
      if (len[arr_q] >= NC - 2) arr_en = 0;
      if (len[stch_q] >= NC - 2) stch_en = 0;
      room = 1;
      for (int i = 0; i < NP; i++) if (hdr_mask[i] && len[i] >= int'(voq_limit)) room = 0;
      exp_admit = hdr_valid && iar_valid && hdr_mask != '0 && room;
      #1;
      chk(admit == exp_admit, "admit");
      chk(arr_vec == (arr_en ? NP'(1) << arr_q : '0), "arrival vector");
      chk(stch_vec == (stch_en ? NP'(1) << stch_q : '0), "stitch vector");
      if (exp_admit) n_admit++;
      if (hdr_valid && iar_valid && hdr_mask != '0 && !room) n_limit++;
      if (hdr_valid && !exp_admit) drops++;
      if (arr_en) len[arr_q]++;
      if (stch_en) len[stch_q]++;
      if (dep_en) len[dep_q]--;
    end
    chk(n_admit > 0 && n_limit > 0, "admits and limit drops seen");
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

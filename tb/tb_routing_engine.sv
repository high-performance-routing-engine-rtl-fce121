// tb_routing_engine: end-to-end test of the routing engine at its default
// size (16 ports, 128 cells, 2-element request FIFOs).
//
// The testbench plays the cell source and the central arbiter. The arbiter
// model takes the request vector of each slot, delivers it after REQ_LAT
// slots into per-port pending counts (its own request FIFO), grants one
// pending port per slot in round-robin order with a set probability, and
// delivers the grant after GNT_LAT slots. Now and then it sends a grant the
// engine never asked for.
// A reference model, written independently of the RTL, keeps the expected
// contents of every VOQ (cell numbers), the expected free-address count and
// the policing decision, and is updated when a grant is delivered. Each
// cell sent out is compared word by word with the expected one, and the
// drop, bad-grant and backpressure outputs with the model. The grant to
// first output word latency is checked against 4 cycles.
// Traffic runs in four stages: moderate load; overload with few grants
// (buffer full, backpressure); a low per-queue limit with traffic aimed at
// one port; and a drain. Each mechanism is counted and must occur.
// The one-request-per-slot arbiter model, the stage mix and the 4-cycle figure (which
// comes from this design's phase plan) are this testbench's own. A watchdog stops the run
// after 3000 slots (clock period CLK_T = 10).
module tb_routing_engine;
  import re_pkg::*;

  localparam int N  = N_PORTS;
  localparam int NC = N_CELLS;
  localparam int L  = RF_LEN;
  localparam int SL = SLOT_CYCLES;
  localparam int REQ_LAT = 1;
  localparam int GNT_LAT = 1;
  localparam int CW = $clog2(NC + 1);

  localparam time CLK_T = 10;
  logic clk = 0, rst_n = 0;
  always #(CLK_T / 2) clk = ~clk;

  logic ready, slot_start, in_valid, grant_valid, out_valid, out_sop, backpressure;
  logic [35:0] in_data, out_data;
  logic [CW-1:0] voq_limit, bp_thresh, free_cells;
  logic [N-1:0] req_vec;
  logic [3:0] grant_port, out_port;
  logic [31:0] drop_count, bad_grants;
  logic [N-1:0][CW-1:0] voq_len;

  routing_engine dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- cell contents ----------------
  function automatic logic [35:0] cell_word(int id, int k, logic [N-1:0] mask);
    if (k == 0) return {id[19:0], mask};
    return {id[19:0], 4'(k), 12'(id * 7 + k * 13)};
  endfunction

  // ---------------- reference model ----------------
  int unsigned mq[N][$];          // expected VOQ contents (cell ids)
  logic [N-1:0] leaves_left[int]; // id -> leaves still to visit
  logic [N-1:0] cell_mask[int];   // id -> full destination mask
  int exp_out_id[$];              // expected outgoing cells, in order
  int exp_out_port[$];
  int free_total;                 // free addresses incl. the prefetched one
  bit iar_ok;                     // model of the prefetched-address flag
  int exp_drops = 0, exp_bad = 0;
  int sent_req[N], got_gnt[N];    // requests seen, grants delivered
  int arb_pend[N];
  int req_dly[REQ_LAT][N];        // requests on their way to the arbiter
  int gnt_dly[GNT_LAT];           // grants on their way back, -1 = none
  int rr = 0;
  int next_id = 1;

  // mechanism counters
  int n_unicast = 0, n_mcast_stitch = 0, n_drop_full = 0, n_drop_limit = 0;
  int n_bp = 0, n_two_outstanding = 0, n_bad_grant = 0, n_idle_empty = 0;
  int n_cells_out = 0;

  // stage control
  int load_pct, grant_pct, hot_port;
  bit drain;

  function automatic int lowest(logic [N-1:0] m);
    for (int i = 0; i < N; i++) if (m[i]) return i;
    return -1;
  endfunction

  // ---------------- per-slot driver ----------------
  int   cur_id;
  logic [N-1:0] cur_mask;
  bit   cur_valid = 0;
  int   slot_no = 0;
  int   gnt_now = -1;
  logic [CW-1:0] len_model [N];

  initial begin
    voq_limit = CW'(NC);
    bp_thresh = CW'(8);
    in_valid = 0; in_data = '0; grant_valid = 0; grant_port = '0;
    for (int i = 0; i < N; i++) begin
      sent_req[i] = 0; got_gnt[i] = 0; arb_pend[i] = 0;
    end
    for (int i = 0; i < GNT_LAT; i++) gnt_dly[i] = -1;
    for (int i = 0; i < REQ_LAT; i++)
      for (int j = 0; j < N; j++) req_dly[i][j] = 0;
    free_total = NC;
    iar_ok = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initial fill of the idle queue takes NC-1 cycles
    repeat (NC - 1) @(posedge clk);
    #1 check(ready, "ready after idle-queue fill");
  end

  // Drive at the falling edge so the DUT samples stable values: the word
  // of the current phase, then, in the last phase, the next cell and grant.
  always @(negedge clk) if (rst_n && ready) begin
    int ph;
    ph = int'(dut.phase);
    in_valid <= 1'b0;
    if (cur_valid) begin
      in_valid <= 1'b1;
      in_data  <= cell_word(cur_id, ph, cur_mask);
    end
    if (ph == 0) begin
      grant_valid <= (gnt_now >= 0);
      grant_port  <= 4'(gnt_now < 0 ? 0 : gnt_now);
    end else begin
      grant_valid <= 1'b0;
    end
    if (ph == SL - 1) begin
      logic [N-1:0] m;
      cur_valid = !drain && ($urandom_range(99) < load_pct);
      if (cur_valid) begin
        if (hot_port >= 0 && $urandom_range(3) != 0) m = N'(1) << hot_port;
        else if ($urandom_range(4) == 0)
          m = (N'($urandom) & N'($urandom)) | (N'(1) << $urandom_range(N - 1));
        else m = N'(1) << $urandom_range(N - 1);
        cur_mask = m;
        cur_id = next_id++;
      end
      gnt_now = gnt_dly[0];
    end
  end

  // Slot-level model, evaluated in the header cycle (phase 0).
  always @(posedge clk) if (rst_n && ready && dut.phase == 4'd0) begin
    bit admit, room, was_iar_ok;
    int freed;
    int z[N];
    slot_no++;
    // ---- requests of this slot to the arbiter ----
    foreach (z[j]) z[j] = int'(req_vec[j]);
    for (int i = 0; i < N; i++) begin
      sent_req[i] += z[i];
      check(sent_req[i] - got_gnt[i] <= L, "no more requests in flight than the FIFO holds");
    end
    freed = 0;
    for (int i = 0; i < N; i++) arb_pend[i] += req_dly[0][i];
    for (int k = 0; k < REQ_LAT - 1; k++) req_dly[k] = req_dly[k + 1];
    req_dly[REQ_LAT - 1] = z;
    // ---- policing of the cell in this slot (before this slot's pop and stitch) ----
    if (in_valid) begin
      room = 1;
      for (int i = 0; i < N; i++)
        if (cur_mask[i] && mq[i].size() >= int'(voq_limit)) room = 0;
      was_iar_ok = iar_ok;
      admit = iar_ok && room;
      if (!admit) begin
        exp_drops++;
        if (!iar_ok) n_drop_full++;
        else n_drop_limit++;
      end else begin
        int f;
        f = lowest(cur_mask);
        leaves_left[cur_id] = cur_mask & ~(N'(1) << f);
        cell_mask[cur_id] = cur_mask;
        mq[f].push_back(cur_id);
      end
    end else admit = 0;
    // ---- grant delivered in this slot ----
    if (grant_valid) begin
      int g;
      g = int'(grant_port);
      if (sent_req[g] - got_gnt[g] == 0) begin
        exp_bad++;
        n_bad_grant++;
      end else begin
        int id;
        got_gnt[g]++;
        t_grant_q.push_back($time);
        check(mq[g].size() > 0, "grant only for a non-empty queue");
        if (mq[g].size() > 0) begin
          id = mq[g].pop_front();
          exp_out_id.push_back(id);
          exp_out_port.push_back(g);
          if (leaves_left[id] != '0) begin
            int nl;
            nl = lowest(leaves_left[id]);
            leaves_left[id][nl] = 1'b0;
            mq[nl].push_back(id);
            n_mcast_stitch++;
          end else begin
            freed = 1;
            if (cell_mask[id] == (cell_mask[id] & -cell_mask[id])) n_unicast++;
          end
        end
      end
    end
    // ---- free-address model ----
    // The address for the next slot is prefetched in phase 2, before the
    // address freed in phase 5 of this slot is back in the list.
    free_total -= int'(admit);
    iar_ok = free_total > 0;
    if (!iar_ok) n_idle_empty++;
    free_total += freed;
    // ---- arbiter decision for a later slot ----
    begin
      int pick;
      pick = -1;
      if ($urandom_range(99) < grant_pct) begin
        for (int k = 0; k < N; k++) begin
          int p;
          p = (rr + k) % N;
          if (pick < 0 && arb_pend[p] > 0) pick = p;
        end
        if (pick >= 0) begin
          arb_pend[pick]--;
          rr = (pick + 1) % N;
        end else if ($urandom_range(9) == 0) begin
          // unrequested grant
          int p;
          p = $urandom_range(N - 1);
          if (sent_req[p] - got_gnt[p] == 0) pick = p;
        end
      end
      for (int k = 0; k < GNT_LAT - 1; k++) gnt_dly[k] = gnt_dly[k + 1];
      gnt_dly[GNT_LAT - 1] = pick;
    end
    for (int i = 0; i < N; i++)
      if (sent_req[i] - got_gnt[i] == L) n_two_outstanding++;
  end

  // Compare status outputs one cycle into the slot (after the header edge).
  always @(posedge clk) if (rst_n && ready && dut.phase == 4'd2) begin
    check(drop_count == 32'(exp_drops), $sformatf("drop count %0d vs %0d", drop_count, exp_drops));
    check(bad_grants == 32'(exp_bad), $sformatf("bad grants %0d vs %0d", bad_grants, exp_bad));
  end

  // Backpressure follows the free count with one register.
  logic [CW-1:0] free_q;
  always @(posedge clk) begin
    if (rst_n && ready) begin
      check(backpressure == (free_q < bp_thresh), "backpressure vs free cells");
      if (backpressure) n_bp++;
    end
    free_q <= free_cells;
  end

  // ---------------- output checker ----------------
  int rx_k = -1, rx_id, rx_port;
  logic [N-1:0] rx_mask;
  time t_grant, t_grant_q[$];
  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_sop) begin
      check(rx_k < 0 || rx_k == 2 * CELL_ROWS, "previous cell complete");
      check(exp_out_id.size() > 0, "an outgoing cell was expected");
      if (exp_out_id.size() > 0) begin
        rx_id = exp_out_id.pop_front();
        rx_port = exp_out_port.pop_front();
        rx_mask = cell_mask[rx_id];
        check(out_port == 4'(rx_port), $sformatf("out port %0d vs %0d", out_port, rx_port));
        n_cells_out++;
      end
      if (t_grant_q.size() > 0) begin
        t_grant = t_grant_q.pop_front();
        check(($time - t_grant) == 4 * CLK_T, $sformatf("grant to first word %0t", $time - t_grant));
      end
      rx_k = 0;
    end
    if (rx_k >= 0 && rx_k < 2 * CELL_ROWS) begin
      check(out_data == cell_word(rx_id, rx_k, rx_mask),
            $sformatf("cell %0d word %0d: %h vs %h", rx_id, rx_k, out_data, cell_word(rx_id, rx_k, rx_mask)));
      rx_k++;
    end
  end

  // ---------------- stages ----------------
  initial begin
    load_pct = 0; grant_pct = 100; hot_port = -1; drain = 0;
    wait (ready);
    @(posedge clk);
    load_pct = 80; grant_pct = 95;
    repeat (600 * SL) @(posedge clk);
    load_pct = 100; grant_pct = 30;
    repeat (600 * SL) @(posedge clk);
    load_pct = 100; grant_pct = 90; voq_limit = CW'(4); hot_port = 3;
    repeat (600 * SL) @(posedge clk);
    drain = 1; grant_pct = 100; hot_port = -1;
    repeat (400 * SL) @(posedge clk);
    // drained: every queue empty, every address free
    for (int i = 0; i < N; i++) begin
      check(voq_len[i] == '0, $sformatf("queue %0d empty at the end", i));
      check(mq[i].size() == 0, "model queue empty");
    end
    check(free_cells == CW'(NC), $sformatf("all cells free at the end (%0d)", free_cells));
    check(exp_out_id.size() == 0, "all expected cells came out");
    // every mechanism must have happened
    check(n_unicast > 0, "unicast delivery");
    check(n_mcast_stitch > 0, "multicast stitching");
    check(n_drop_full > 0, "drop on full buffer");
    check(n_drop_limit > 0, "drop on queue limit");
    check(n_bp > 0, "backpressure");
    check(n_two_outstanding > 0, "request FIFO full of requests in flight");
    check(n_bad_grant > 0, "unrequested grant");
    check(n_idle_empty > 0, "idle queue empty");
    $display("mechanisms: unicast=%0d stitch=%0d drop_full=%0d drop_limit=%0d bp_cycles=%0d rf_full=%0d bad_grant=%0d idle_empty=%0d cells_out=%0d",
             n_unicast, n_mcast_stitch, n_drop_full, n_drop_limit, n_bp, n_two_outstanding,
             n_bad_grant, n_idle_empty, n_cells_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (3000 * SL + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

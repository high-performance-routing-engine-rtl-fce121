// tb_switch_fabric: end-to-end test of the 16x16 switch (16 routing engines,
// the central arbiter and the crossbar) at its default size, and a
// throughput measurement under uniform random traffic.
//
// Traffic: in every slot each input gets a cell with probability LOAD.
// Unicast cells go to a uniformly chosen output (Bernoulli arrivals, the
// slotted form of Poisson arrivals). In the multicast stage a quarter of
// the cells go to 2 to 4 random outputs. Each cell carries its input,
// a sequence number and its destination mask, so the checker can tell it
// apart at any output.
// Checks, at every output: each cell arrives intact, word by word; it was
// meant for that output and has not arrived there before; unicast cells
// of one input/output pair keep their order. At the end, after a drain,
// every admitted cell has reached every one of its outputs and every
// buffer is empty again. In the unicast stages the carried load must
// reach MIN_PCT percent of the offered load. The arbiter's mechanisms are
// counted and each must occur: matches made in a later iSLIP iteration,
// requests left over for a later slot, and a pair whose count reaches the
// request FIFO length.
// Stages: load 0.90, 0.98 and 1.00 (unicast, WARM slots of warm-up, then
// MEAS measured slots each; at 1.00 the buffers fill and cells are dropped,
// and the carried load is the saturation throughput); load 0.60 with
// multicast; a drain.
// Sizes and the one-slot request and grant latencies follow the published
// throughput evaluation; the traffic generator, the stage mix and the pass
// thresholds are this testbench's own. A watchdog stops the run after
// about twice the expected number of slots (clock period 10).
module tb_switch_fabric;
  import re_pkg::*;
  localparam int N  = N_PORTS;
  localparam int SL = SLOT_CYCLES;
  localparam int CW = $clog2(N_CELLS + 1);
  localparam int WARM = 300, MEAS = 2000, MC_SLOTS = 600, DRAIN = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ready, slot_start;
  logic [N-1:0] in_valid, out_valid, out_sop, bp;
  logic [N-1:0][35:0] in_data, out_data;
  logic [N-1:0][31:0] drop_count, bad_grants;
  logic [N-1:0][N-1:0][CW-1:0] voq_len;
  logic [N-1:0][CW-1:0] free_cells;
  logic [CW-1:0] voq_limit = CW'(N_CELLS), bp_thresh = CW'(8);

  switch_fabric dut (
    .clk, .rst_n, .ready, .slot_start, .in_valid, .in_data, .voq_limit, .bp_thresh,
    .out_valid, .out_sop, .out_data, .backpressure(bp), .drop_count, .bad_grants,
    .voq_len, .free_cells);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic logic [35:0] cell_word(int id, int k, logic [15:0] mask);
    if (k == 0) return {id[19:0], mask};
    return {id[19:0], 4'(k), 12'(id * 5 + k * 11)};
  endfunction

  // ---------------- traffic ----------------
  int load_pct, mc_pct;
  bit cur_v[N];
  int cur_id[N];
  logic [15:0] cur_mask[N];
  int seq[N];
  int offered = 0, carried = 0;
  bit measuring = 0;
  logic [15:0] todo[int];           // outputs a cell has still to reach
  int last_drops[N];
  int pending_id[N];                // cell of the current slot, per input
  int next_seq_in[N][N];            // unicast order per input/output pair

  initial begin
    for (int i = 0; i < N; i++) begin
      seq[i] = 0; cur_v[i] = 0; last_drops[i] = 0; pending_id[i] = -1;
      for (int j = 0; j < N; j++) next_seq_in[i][j] = 0;
    end
    in_valid = '0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // drive the cells at the falling edge, one half word per cycle
  always @(negedge clk) if (rst_n && ready) begin
    int ph;
    ph = int'(dut.g_in[0].u_re.phase);
    for (int i = 0; i < N; i++) begin
      in_valid[i] <= cur_v[i];
      in_data[i]  <= cur_v[i] ? cell_word(cur_id[i], ph, cur_mask[i]) : '0;
    end
    if (ph == SL - 1) begin
      for (int i = 0; i < N; i++) begin
        // the cell of the slot now ending was admitted unless drop_count moved
        if (pending_id[i] >= 0 && int'(drop_count[i]) != last_drops[i])
          todo.delete(pending_id[i]);
        last_drops[i] = int'(drop_count[i]);
        pending_id[i] = -1;
        cur_v[i] = $urandom_range(999) < load_pct;
        if (cur_v[i]) begin
          if ($urandom_range(99) < mc_pct) begin
            int n;
            n = 2 + $urandom_range(2);
            cur_mask[i] = '0;
            while ($countones(cur_mask[i]) < n) cur_mask[i][$urandom_range(N - 1)] = 1'b1;
          end else
            cur_mask[i] = 16'(1 << $urandom_range(N - 1));
          cur_id[i] = (i << 16) | (seq[i] & 16'hffff);
          seq[i]++;
          todo[cur_id[i]] = cur_mask[i];
          pending_id[i] = cur_id[i];
          if (measuring) offered++;
        end
      end
    end
  end

  // ---------------- output checker ----------------
  int rx_k[N], rx_id[N];
  logic [15:0] rx_mask[N];
  initial foreach (rx_k[o]) rx_k[o] = -1;
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < N; o++) if (out_valid[o]) begin
      if (out_sop[o]) begin
        int id, src;
        id = int'(out_data[o][35:16]);
        src = id >> 16;
        rx_id[o] = id;
        rx_mask[o] = out_data[o][15:0];
        check(rx_mask[o][o], "cell reached an output in its mask");
        check(todo.exists(id) && todo[id][o], $sformatf("cell %0h expected at output %0d", id, o));
        if (todo.exists(id)) begin
          todo[id][o] = 1'b0;
          if (todo[id] == '0) todo.delete(id);
        end
        if ($countones(rx_mask[o]) == 1) begin
          check((id & 16'hffff) >= next_seq_in[src][o], $sformatf("order in %0d out %0d", src, o));
          next_seq_in[src][o] = (id & 16'hffff) + 1;
        end
        rx_k[o] = 0;
        if (measuring) carried++;
      end
      if (rx_k[o] >= 0 && rx_k[o] < SL) begin
        check(out_data[o] == cell_word(rx_id[o], rx_k[o], rx_mask[o]), "cell word");
        rx_k[o]++;
      end
    end
  end

  // ---------------- arbiter mechanisms ----------------
  int n_late_iter = 0, n_residual = 0, n_pend_full = 0, n_bp = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_arb.busy && dut.u_arb.it != 0 && dut.u_arb.it < 3 && dut.u_arb.acc_v != 0)
      n_late_iter++;
    if (slot_start) begin
      bit res, full;
      res = 0; full = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          if (dut.u_arb.pend[i][j] != 0) res = 1;
          if (dut.u_arb.pend[i][j] == RF_LEN) full = 1;
        end
      if (res) n_residual++;
      if (full) n_pend_full++;
    end
    if (bp != 0) n_bp++;
  end

  task automatic run_load(int pct, int min_pct);
    int drops0, drops1;
    load_pct = pct; mc_pct = 0;
    repeat (WARM * SL) @(posedge clk);
    drops0 = 0;
    for (int i = 0; i < N; i++) drops0 += int'(drop_count[i]);
    offered = 0; carried = 0; measuring = 1;
    repeat (MEAS * SL) @(posedge clk);
    measuring = 0;
    drops1 = 0;
    for (int i = 0; i < N; i++) drops1 += int'(drop_count[i]);
    $display("load %0d.%03d: offered %0d cells, carried %0d, throughput %0d.%03d, dropped %0d",
             pct / 1000, pct % 1000, offered, carried,
             carried / (N * MEAS), (carried * 1000 / (N * MEAS)) % 1000, drops1 - drops0);
    check(carried * 100 >= offered * min_pct, "carried load");
  endtask

  initial begin
    load_pct = 0; mc_pct = 0;
    wait (rst_n && ready);
    run_load(900, 99);
    run_load(980, 97);
    run_load(1000, 95);
    load_pct = 600; mc_pct = 25;
    repeat (MC_SLOTS * SL) @(posedge clk);
    load_pct = 0;
    repeat (DRAIN * SL) @(posedge clk);
    check(todo.num() == 0, $sformatf("%0d cells never reached all their outputs", todo.num()));
    for (int i = 0; i < N; i++) begin
      check(bad_grants[i] == 0, "no grant without a request");
      check(free_cells[i] == CW'(N_CELLS), "buffer empty after the drain");
    end
    $display("mechanisms: later_iteration_matches=%0d residual_slots=%0d pend_full_slots=%0d bp_cycles=%0d",
             n_late_iter, n_residual, n_pend_full, n_bp);
    check(n_late_iter > 0, "a match in a later iSLIP iteration");
    check(n_residual > 0, "requests left for a later slot");
    check(n_pend_full > 0, "a request count at the FIFO length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(10 * (2 * (3 * (WARM + MEAS) + MC_SLOTS + DRAIN) * SL + 5000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

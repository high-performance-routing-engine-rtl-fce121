// central_arbiter: switch-wide arbiter with a request FIFO of residual
// requests and a pipelined iSLIP matching.
//
// Each input buffer sends one request vector per slot (bit o = one more
// cell for output o). The arbiter adds the vector to a small count per
// input/output pair, pend[i][o]. This count is its request FIFO: a request
// that is not served stays there and is considered again in later slots,
// so the inputs never have to repeat a request. Each slot the arbiter
// matches inputs to outputs with ITER iterations of iSLIP, one iteration
// per clock cycle:
//   grant:  every unmatched output o picks, round robin from gptr[o], an
//           unmatched input with pend[i][o] > 0;
//   accept: every unmatched input i picks, round robin from aptr[i], one of
//           the outputs that granted it;
//   pointers move one past the accepted partner, in the first iteration
//   only.
// The accepted pairs become grants, one per input at most, and their
// counts go down by one.
//
// Timing (phases of the slot, slot_tick = phase 0):
//   phase 0         req_vec of every input is added to pend;
//   phases 1..ITER  one iteration each;
//   phase ITER+1    grant_valid/grant_port are registered and held for one
//                   slot, so the inputs sample them at the next phase 0.
// A request sent at the end of slot k is thus arbitrated in slot k+1 and
// granted at the start of slot k+2: one slot of request and one slot of
// grant latency.
//
// The request FIFO of residual requests at the arbiter, 3-iteration iSLIP
// and the request FIFO length of 2 follow the published design. The
// insides (a count per pair, one iteration per cycle, the phase plan) are
// this design's own. pend never exceeds RF_LEN, because an input has at
// most RF_LEN requests outstanding per queue; an assertion checks this.
module central_arbiter #(
  parameter int N_PORTS     = re_pkg::N_PORTS,
  parameter int RF_LEN      = re_pkg::RF_LEN,
  parameter int ITER        = 3,
  parameter int SLOT_CYCLES = re_pkg::SLOT_CYCLES,
  localparam int PW         = $clog2(N_PORTS),
  localparam int QW         = $clog2(RF_LEN + 1),
  localparam int IW         = $clog2(ITER + 2)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              slot_tick,   // phase 0 of a slot
  input  logic [N_PORTS-1:0][N_PORTS-1:0]   req_vec,     // [input][output]
  output logic [N_PORTS-1:0]                grant_valid, // per input
  output logic [N_PORTS-1:0][PW-1:0]        grant_port
);

  logic [N_PORTS-1:0][N_PORTS-1:0][QW-1:0] pend;
  logic [N_PORTS-1:0][PW-1:0]              gptr, aptr;
  logic [N_PORTS-1:0]                      in_m, out_m;
  logic [N_PORTS-1:0][PW-1:0]              match;
  logic                                    busy;
  logic [IW-1:0]                           it;

  // First set bit of vec at or after position ptr, cyclically.
  function automatic logic [PW:0] rr_pick(logic [N_PORTS-1:0] vec, logic [PW-1:0] ptr);
    logic [PW:0] r;
    r = '0;
    for (int k = N_PORTS - 1; k >= 0; k--) begin
      logic [PW-1:0] idx;
      idx = ptr + PW'(k);
      if (vec[idx]) r = {1'b1, idx};
    end
    return r;
  endfunction

  // One iSLIP iteration on the current state.
  logic [N_PORTS-1:0]          acc_v;
  logic [N_PORTS-1:0][PW-1:0]  acc_o;
  always_comb begin
    logic [N_PORTS-1:0][N_PORTS-1:0] gnt;   // [output][input]
    logic [N_PORTS-1:0][N_PORTS-1:0] gto;   // [input][output]
    gnt = '0;
    for (int o = 0; o < N_PORTS; o++) begin
      logic [N_PORTS-1:0] cand;
      logic [PW:0]        p;
      for (int i = 0; i < N_PORTS; i++)
        cand[i] = !in_m[i] && !out_m[o] && (pend[i][o] != '0);
      p = rr_pick(cand, gptr[o]);
      if (p[PW]) gnt[o][p[PW-1:0]] = 1'b1;
    end
    for (int i = 0; i < N_PORTS; i++)
      for (int o = 0; o < N_PORTS; o++) gto[i][o] = gnt[o][i];
    for (int i = 0; i < N_PORTS; i++) begin
      logic [PW:0] p;
      p = rr_pick(gto[i], aptr[i]);
      acc_v[i] = p[PW];
      acc_o[i] = p[PW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend        <= '0;
      gptr        <= '0;
      aptr        <= '0;
      in_m        <= '0;
      out_m       <= '0;
      match       <= '0;
      busy        <= 1'b0;
      it          <= '0;
      grant_valid <= '0;
      grant_port  <= '0;
    end else if (slot_tick) begin
      // new requests join the residual ones
      for (int i = 0; i < N_PORTS; i++)
        for (int o = 0; o < N_PORTS; o++)
          if (req_vec[i][o]) pend[i][o] <= pend[i][o] + QW'(1);
      in_m  <= '0;
      out_m <= '0;
      busy  <= 1'b1;
      it    <= '0;
    end else if (busy && it < IW'(ITER)) begin
      for (int i = 0; i < N_PORTS; i++)
        if (acc_v[i]) begin
          in_m[i]         <= 1'b1;
          out_m[acc_o[i]] <= 1'b1;
          match[i]        <= acc_o[i];
          if (it == '0) begin
            gptr[acc_o[i]] <= PW'(i) + PW'(1);
            aptr[i]        <= acc_o[i] + PW'(1);
          end
        end
      it <= it + IW'(1);
    end else if (busy) begin
      // matching done: issue the grants, remove the served requests
      for (int i = 0; i < N_PORTS; i++) begin
        grant_valid[i] <= in_m[i];
        grant_port[i]  <= match[i];
        if (in_m[i]) pend[i][match[i]] <= pend[i][match[i]] - QW'(1);
      end
      busy <= 1'b0;
    end
  end

  // The matching must end before the next slot begins.
  initial assert (ITER + 2 <= SLOT_CYCLES && N_PORTS == 2 ** PW)
    else $error("central_arbiter: ITER too large for the slot, or N_PORTS not a power of 2");

  // An input never has more than RF_LEN requests outstanding per queue.
  for (genvar i = 0; i < N_PORTS; i++) begin : g_chk
    for (genvar o = 0; o < N_PORTS; o++) begin : g_o
      a_pend_bound: assert property (@(posedge clk) disable iff (!rst_n)
        !(slot_tick && req_vec[i][o] && pend[i][o] == QW'(RF_LEN)));
    end
  end

endmodule

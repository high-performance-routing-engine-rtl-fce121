// switch_fabric: N x N input-queued cell switch built from N routing
// engines, the central arbiter and a crossbar.
//
// Each input port has a routing engine: its cell buffer, its virtual output
// queues and its request FIFOs. Every slot, each engine sends its request
// vector to the central arbiter. The arbiter keeps the requests it has not
// yet served, matches inputs to outputs (3-iteration iSLIP) and returns at
// most one grant per input. The granted engine reads the cell out, tagged
// with its output port, and the crossbar steers it to that output.
//
// Interface: per input port, a 36-bit half-word cell stream (in_valid,
// in_data, 12 half words per cell, starting at slot_start); per output port,
// the switched stream (out_valid, out_sop, out_data). Status per input:
// backpressure, drop and bad-grant counters, VOQ lengths and free cells.
// voq_limit and bp_thresh are common to all inputs.
//
// Timing: all engines leave reset together and run the same slot phases;
// ready and slot_start are taken from them (an assertion checks they agree).
// A request formed at the end of slot k is arbitrated in slot k+1; its
// grant is sampled by the engine at the start of slot k+2. That is one slot
// each of request and grant latency, the case of the published throughput
// evaluation. The first half word of a granted cell leaves the engine
// 4 cycles after the grant is sampled, and the crossbar adds one cycle.
//
// The structure (input buffers with request FIFOs, a central arbiter with
// its own request FIFO, an N x N crossbar) follows the published switch.
// Wiring the links directly, so that each takes exactly one slot, is this
// design's own choice; the serial links themselves are not modelled.
module switch_fabric #(
  parameter int N_PORTS   = re_pkg::N_PORTS,
  parameter int N_CELLS   = re_pkg::N_CELLS,
  parameter int RF_LEN    = re_pkg::RF_LEN,
  parameter int CELL_ROWS = re_pkg::CELL_ROWS,
  parameter int ITER      = 3,
  localparam int HALF_W   = re_pkg::HALF_W,
  localparam int PW       = $clog2(N_PORTS),
  localparam int CW       = $clog2(N_CELLS + 1)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  output logic                                ready,
  output logic                                slot_start,
  input  logic [N_PORTS-1:0]                  in_valid,
  input  logic [N_PORTS-1:0][HALF_W-1:0]      in_data,
  input  logic [CW-1:0]                       voq_limit,
  input  logic [CW-1:0]                       bp_thresh,
  output logic [N_PORTS-1:0]                  out_valid,
  output logic [N_PORTS-1:0]                  out_sop,
  output logic [N_PORTS-1:0][HALF_W-1:0]      out_data,
  output logic [N_PORTS-1:0]                  backpressure,
  output logic [N_PORTS-1:0][31:0]            drop_count,
  output logic [N_PORTS-1:0][31:0]            bad_grants,
  output logic [N_PORTS-1:0][N_PORTS-1:0][CW-1:0] voq_len,
  output logic [N_PORTS-1:0][CW-1:0]          free_cells
);

  logic [N_PORTS-1:0]                 e_ready, e_slot;
  logic [N_PORTS-1:0][N_PORTS-1:0]    req_vec;
  logic [N_PORTS-1:0]                 grant_valid;
  logic [N_PORTS-1:0][PW-1:0]         grant_port;
  logic [N_PORTS-1:0]                 x_valid, x_sop;
  logic [N_PORTS-1:0][HALF_W-1:0]     x_data;
  logic [N_PORTS-1:0][PW-1:0]         x_port;

  for (genvar i = 0; i < N_PORTS; i++) begin : g_in
    routing_engine #(
      .N_PORTS(N_PORTS), .N_CELLS(N_CELLS), .RF_LEN(RF_LEN), .CELL_ROWS(CELL_ROWS)
    ) u_re (
      .clk, .rst_n,
      .ready(e_ready[i]), .slot_start(e_slot[i]),
      .in_valid(in_valid[i]), .in_data(in_data[i]),
      .voq_limit, .bp_thresh,
      .req_vec(req_vec[i]),
      .grant_valid(grant_valid[i]), .grant_port(grant_port[i]),
      .out_valid(x_valid[i]), .out_sop(x_sop[i]), .out_data(x_data[i]), .out_port(x_port[i]),
      .backpressure(backpressure[i]), .drop_count(drop_count[i]),
      .bad_grants(bad_grants[i]), .voq_len(voq_len[i]), .free_cells(free_cells[i]));
  end

  assign ready      = e_ready[0];
  assign slot_start = e_slot[0];

  central_arbiter #(
    .N_PORTS(N_PORTS), .RF_LEN(RF_LEN), .ITER(ITER), .SLOT_CYCLES(2 * CELL_ROWS)
  ) u_arb (
    .clk, .rst_n, .slot_tick(e_slot[0]), .req_vec, .grant_valid, .grant_port);

  crossbar #(.N_PORTS(N_PORTS)) u_xbar (
    .clk, .rst_n,
    .in_valid(x_valid), .in_sop(x_sop), .in_data(x_data), .in_port(x_port),
    .out_valid, .out_sop, .out_data);

  // All engines run the same slot phases.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (e_ready == '0 || e_ready == '1) && (e_slot == '0 || e_slot == '1));

endmodule

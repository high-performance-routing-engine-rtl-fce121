// routing_engine: pipelined virtual-output-queue routing engine for one
// input port of an input-queued cell switch.
//
// Cells arriving on the input link are stored once in the ingress buffer
// memory (INBM) and linked into one queue per output port (VOQ). All VOQs
// and the list of free cell addresses (idle queue, IDQ) are linked lists in
// one shared pointer memory (INPM), so queue space is allocated per cell as
// needed. For every VOQ the request FIFO controller (RFC) keeps up to RF_LEN
// requests in flight to the central arbiter, so requests and grants that
// take whole slots to travel do not stall the port. A granted cell is read
// out (OCR), its VOQ head advanced (RPM), and a multicast cell is linked
// into the queue of its next leaf rather than copied.
//
// Timing. After reset the idle queue is built (N_CELLS-1 cycles, ready low).
// Then the engine runs in slots of SLOT_CYCLES cycles; slot_start marks
// phase 0. In each slot:
//   phase 0   header half word of an arriving cell on in_data (in_valid
//             high for the 2*CELL_ROWS half words of the cell); policing
//             decides; grant_valid/grant_port from the arbiter are sampled.
//   phase 1-2 WPM links the new cell; IDQ prefetches the next free address.
//   phase 3-5 RPM reads, pops and stitches or frees the granted cell; the
//             OCR starts sending it at phase 4 on out_* (2*CELL_ROWS
//             half words, one per cycle).
//   last      RFC shifts its request FIFOs; req_vec changes at the next
//             slot_start and holds for one slot.
// The block structure, the shared pointer memory, the request shifting and
// the multicast stitching follow the published design. The slot phase plan,
// cell format, header layout, policing rule and backpressure threshold are
// this design's choices.
module routing_engine #(
  parameter int N_PORTS   = re_pkg::N_PORTS,
  parameter int N_CELLS   = re_pkg::N_CELLS,
  parameter int RF_LEN    = re_pkg::RF_LEN,
  parameter int CELL_ROWS = re_pkg::CELL_ROWS,
  localparam int HALF_W   = re_pkg::HALF_W,
  localparam int PTR_W    = re_pkg::PTR_W,
  localparam int AW       = $clog2(N_CELLS),
  localparam int BAW      = $clog2(N_CELLS * CELL_ROWS),
  localparam int PW       = $clog2(N_PORTS),
  localparam int CW       = $clog2(N_CELLS + 1),
  localparam int PHW      = $clog2(2 * CELL_ROWS)
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                ready,
  output logic                slot_start,
  // input link (from the cell framer)
  input  logic                in_valid,
  input  logic [HALF_W-1:0]   in_data,
  // configuration (from the processor interface)
  input  logic [CW-1:0]       voq_limit,
  input  logic [CW-1:0]       bp_thresh,
  // central arbiter
  output logic [N_PORTS-1:0]  req_vec,
  input  logic                grant_valid,
  input  logic [PW-1:0]       grant_port,
  // output link (to the crossbar)
  output logic                out_valid,
  output logic                out_sop,
  output logic [HALF_W-1:0]   out_data,
  output logic [PW-1:0]       out_port,
  // status
  output logic                backpressure,
  output logic [31:0]         drop_count,
  output logic [31:0]         bad_grants,
  output logic [N_PORTS-1:0][CW-1:0] voq_len,
  output logic [CW-1:0]       free_cells
);

  localparam int SLOT = 2 * CELL_ROWS;

  // ---------------- slot timer ----------------
  logic [PHW-1:0] phase;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      phase <= '0;
    else if (ready)  phase <= (phase == PHW'(SLOT - 1)) ? '0 : phase + PHW'(1);
  end
  logic ph_hdr, ph_wrd, ph_wlk, ph_rrd, ph_pop, ph_rlk, ph_req;
  assign ph_hdr = ready && phase == PHW'(re_pkg::PH_HDR);
  assign ph_wrd = ready && phase == PHW'(re_pkg::PH_WPM_RD);
  assign ph_wlk = ready && phase == PHW'(re_pkg::PH_WPM_LINK);
  assign ph_rrd = ready && phase == PHW'(re_pkg::PH_RPM_RD);
  assign ph_pop = ready && phase == PHW'(re_pkg::PH_RPM_POP);
  assign ph_rlk = ready && phase == PHW'(re_pkg::PH_RPM_LINK);
  assign ph_req = ready && phase == PHW'(re_pkg::PH_REQ);
  assign slot_start = ph_hdr;

  // ---------------- wires ----------------
  logic [N_PORTS-1:0][AW-1:0] ohr, otr;
  logic [N_PORTS-1:0]         nonempty;
  logic                       hdr_valid, admit, cell_valid, iar_valid;
  logic [N_PORTS-1:0]         hdr_mask;
  logic [AW-1:0]              iar, w_cell_addr, r_cell_addr;
  logic                       w_app_en, r_app_en, pop_en, arr_en, stch_en, free_en;
  logic [PW-1:0]              w_app_q, r_app_q, pop_q, arr_q, stch_q;
  logic [AW-1:0]              w_app_addr, r_app_addr, pop_next, free_addr;
  logic [N_PORTS-1:0]         arr_vec, stch_vec, inc_vec;
  logic                       rfc_gnt_valid, gnt_valid_q;
  logic [PW-1:0]              rfc_gnt_port, gnt_port_q;
  logic [N_PORTS-1:0][RF_LEN-1:0] rf;
  logic [N_PORTS-1:0][CW-1:0] rfc_len;

  // pointer memory ports and their requesters
  logic             pm_rd_en, pm_wr_en;
  logic [AW-1:0]    pm_rd_addr, pm_wr_addr;
  logic [PTR_W-1:0] pm_rd_data, pm_wr_data, pm_wr_mask;
  logic             i_rd_en, r_rd_en, i_wr_en, w_wr_en, r_wr_en;
  logic [AW-1:0]    i_rd_addr, r_rd_addr, i_wr_addr, w_wr_addr, r_wr_addr;
  logic [PTR_W-1:0] i_wr_data, w_wr_data, r_wr_data, i_wr_mask, w_wr_mask, r_wr_mask;

  // data buffer ports
  logic                 bm_wr_en, bm_rd_en;
  logic [BAW-1:0]       bm_wr_addr, bm_rd_addr;
  logic [2*HALF_W-1:0]  bm_wr_data, bm_rd_data;

  // ---------------- memories ----------------
  inbm #(.N_CELLS(N_CELLS), .CELL_ROWS(CELL_ROWS), .ROW_W(2*HALF_W)) u_inbm (
    .clk, .wr_en(bm_wr_en), .wr_addr(bm_wr_addr), .wr_data(bm_wr_data),
    .rd_en(bm_rd_en), .rd_addr(bm_rd_addr), .rd_data(bm_rd_data));

  inpm #(.N_CELLS(N_CELLS), .PTR_W(PTR_W)) u_inpm (
    .clk, .wr_en(pm_wr_en), .wr_addr(pm_wr_addr), .wr_data(pm_wr_data),
    .wr_mask(pm_wr_mask), .rd_en(pm_rd_en), .rd_addr(pm_rd_addr),
    .rd_data(pm_rd_data));

  // The requesters use the pointer memory in different slot phases, so the
  // ports are shared by a plain OR of the gated requests.
  assign pm_rd_en   = i_rd_en | r_rd_en;
  assign pm_rd_addr = r_rd_en ? r_rd_addr : i_rd_addr;
  assign pm_wr_en   = i_wr_en | w_wr_en | r_wr_en;
  always_comb begin
    pm_wr_addr = i_wr_addr;
    pm_wr_data = i_wr_data;
    pm_wr_mask = i_wr_mask;
    if (w_wr_en) begin
      pm_wr_addr = w_wr_addr; pm_wr_data = w_wr_data; pm_wr_mask = w_wr_mask;
    end else if (r_wr_en) begin
      pm_wr_addr = r_wr_addr; pm_wr_data = r_wr_data; pm_wr_mask = r_wr_mask;
    end
  end

  // ---------------- queue registers ----------------
  idq #(.N_PORTS(N_PORTS), .N_CELLS(N_CELLS), .PTR_W(PTR_W)) u_idq (
    .clk, .rst_n, .init_done(ready),
    .refill_rd(ph_wrd), .refill_ld(ph_wlk), .take(cell_valid),
    .free_en, .free_addr,
    .iar, .iar_valid, .free_cells,
    .rd_en(i_rd_en), .rd_addr(i_rd_addr), .rd_data(pm_rd_data),
    .wr_en(i_wr_en), .wr_addr(i_wr_addr), .wr_data(i_wr_data), .wr_mask(i_wr_mask));

  voq #(.N_PORTS(N_PORTS), .N_CELLS(N_CELLS)) u_voq (
    .clk, .rst_n,
    .app_en(w_app_en | r_app_en),
    .app_q(w_app_en ? w_app_q : r_app_q),
    .app_addr(w_app_en ? w_app_addr : r_app_addr),
    .pop_en, .pop_q, .pop_next,
    .ohr, .otr, .nonempty);

  // ---------------- write side ----------------
  icw #(.N_PORTS(N_PORTS), .N_CELLS(N_CELLS), .CELL_ROWS(CELL_ROWS), .HALF_W(HALF_W)) u_icw (
    .clk, .rst_n, .phase, .in_valid(in_valid && ready), .in_data,
    .hdr_valid, .hdr_mask,
    .cell_valid, .cell_addr(w_cell_addr),
    .wr_en(bm_wr_en), .wr_addr(bm_wr_addr), .wr_data(bm_wr_data));

  pm #(.N_PORTS(N_PORTS), .N_CELLS(N_CELLS)) u_pm (
    .clk, .rst_n, .hdr_valid, .hdr_mask, .iar_valid, .voq_limit, .admit,
    .arr_en, .arr_q, .stch_en, .stch_q,
    .dep_en(ph_pop && gnt_valid_q), .dep_q(gnt_port_q),
    .voq_len, .arr_vec, .stch_vec, .drop_count);

  wpm #(.N_PORTS(N_PORTS), .N_CELLS(N_CELLS), .PTR_W(PTR_W)) u_wpm (
    .clk, .rst_n, .hdr_tick(ph_hdr), .rd_tick(ph_wrd), .link_tick(ph_wlk),
    .admit, .hdr_mask, .iar,
    .cell_valid, .cell_addr(w_cell_addr),
    .otr, .nonempty,
    .app_en(w_app_en), .app_q(w_app_q), .app_addr(w_app_addr),
    .arr_en, .arr_q,
    .wr_en(w_wr_en), .wr_addr(w_wr_addr), .wr_data(w_wr_data), .wr_mask(w_wr_mask));

  bpc #(.N_PORTS(N_PORTS), .N_CELLS(N_CELLS)) u_bpc (
    .clk, .rst_n, .arr_vec, .stch_vec, .free_cells, .bp_thresh,
    .inc_vec, .backpressure);

  // ---------------- request control ----------------
  rfc #(.N_PORTS(N_PORTS), .N_CELLS(N_CELLS), .RF_LEN(RF_LEN)) u_rfc (
    .clk, .rst_n, .inc_vec, .req_tick(ph_req), .req_vec,
    .grant_tick(ph_hdr), .grant_valid, .grant_port,
    .gnt_valid(rfc_gnt_valid), .gnt_port(rfc_gnt_port),
    .rf, .rfc_len, .bad_grants);

  // ---------------- read side ----------------
  ocr #(.N_PORTS(N_PORTS), .N_CELLS(N_CELLS), .CELL_ROWS(CELL_ROWS), .HALF_W(HALF_W)) u_ocr (
    .clk, .rst_n, .gnt_valid(rfc_gnt_valid), .gnt_port(rfc_gnt_port),
    .gnt_valid_q, .gnt_port_q, .gnt_done(ph_rlk),
    .start(ph_rrd), .cell_addr(r_cell_addr),
    .rd_en(bm_rd_en), .rd_addr(bm_rd_addr), .rd_data(bm_rd_data),
    .out_valid, .out_sop, .out_data, .out_port);

  rpm #(.N_PORTS(N_PORTS), .N_CELLS(N_CELLS), .PTR_W(PTR_W)) u_rpm (
    .clk, .rst_n, .rd_tick(ph_rrd), .pop_tick(ph_pop), .link_tick(ph_rlk),
    .gnt_valid(gnt_valid_q), .gnt_port(gnt_port_q),
    .cell_addr(r_cell_addr), .ohr, .otr, .nonempty,
    .pop_en, .pop_q, .pop_next,
    .app_en(r_app_en), .app_q(r_app_q), .app_addr(r_app_addr),
    .stch_en, .stch_q, .free_en, .free_addr,
    .rd_en(r_rd_en), .rd_addr(r_rd_addr), .rd_data(pm_rd_data),
    .wr_en(r_wr_en), .wr_addr(r_wr_addr), .wr_data(r_wr_data), .wr_mask(r_wr_mask));

  // ---------------- rules of the phase plan ----------------
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({i_wr_en, w_wr_en, r_wr_en}));
  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({i_rd_en, r_rd_en}));
  a_one_append: assert property (@(posedge clk) disable iff (!rst_n)
    !(w_app_en && r_app_en));
  // The RFC's count of unrequested cells is the PM's VOQ length less the
  // valid requests in the FIFO; all updates of a slot have settled by the
  // request phase.
  for (genvar q = 0; q < N_PORTS; q++) begin : g_len
    a_len_split: assert property (@(posedge clk) disable iff (!rst_n)
      ph_req |-> voq_len[q] == rfc_len[q] + CW'($countones(rf[q])));
  end

endmodule

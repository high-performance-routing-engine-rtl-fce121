// wpm: write pointer manager.
//
// Takes the address in the idle address register for the cell arriving in
// this slot, gives it to the incoming cell writer, and links it at the tail
// of the cell's first destination queue.
//   hdr_tick (header cycle): latch admit, the destination mask and iar as
//            cell_valid, cell_mask and cell_addr, held for the slot.
//   rd_tick:  write the entry's leaf field with the destinations left after
//             the first one (zero for a unicast cell).
//   link_tick: if the first destination queue is non-empty, write the next
//             pointer of its tail entry; append the address to that queue;
//             report the arrival (arr_en, arr_q) to the policing module.
// The three ticks must be different cycles. Pointer-memory writes are
// issued combinationally in the tick cycle.
// What the block does follows the published design; the storage of the
// remaining multicast leaves in the pointer entry and the lowest-port-first
// order of the leaves are this design's choices.
module wpm #(
  parameter int N_PORTS = re_pkg::N_PORTS,
  parameter int N_CELLS = re_pkg::N_CELLS,
  parameter int PTR_W   = re_pkg::PTR_W,
  localparam int AW     = $clog2(N_CELLS),
  localparam int PW     = $clog2(N_PORTS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       hdr_tick,
  input  logic                       rd_tick,
  input  logic                       link_tick,
  input  logic                       admit,
  input  logic [N_PORTS-1:0]         hdr_mask,
  input  logic [AW-1:0]              iar,
  output logic                       cell_valid,
  output logic [AW-1:0]              cell_addr,   // current writing cell (CWC)
  input  logic [N_PORTS-1:0][AW-1:0] otr,
  input  logic [N_PORTS-1:0]         nonempty,
  output logic                       app_en,
  output logic [PW-1:0]              app_q,
  output logic [AW-1:0]              app_addr,
  output logic                       arr_en,
  output logic [PW-1:0]              arr_q,
  output logic                       wr_en,
  output logic [AW-1:0]              wr_addr,
  output logic [PTR_W-1:0]           wr_data,
  output logic [PTR_W-1:0]           wr_mask
);

  localparam int NEXT_LSB = N_PORTS;

  logic [N_PORTS-1:0] cell_mask;
  logic [PW-1:0]      first_q;
  assign first_q = PW'(re_pkg::lowest_port(N_PORTS'(cell_mask)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cell_valid <= 1'b0;
      cell_mask  <= '0;
      cell_addr  <= '0;
    end else if (hdr_tick) begin
      cell_valid <= admit;
      cell_mask  <= hdr_mask;
      cell_addr  <= iar;
    end
  end

  assign app_en   = link_tick && cell_valid;
  assign app_q    = first_q;
  assign app_addr = cell_addr;
  assign arr_en   = app_en;
  assign arr_q    = first_q;

  always_comb begin
    wr_en   = 1'b0;
    wr_addr = cell_addr;
    wr_data = '0;
    wr_mask = '0;
    if (rd_tick && cell_valid) begin
      wr_en   = 1'b1;
      wr_addr = cell_addr;
      wr_data[N_PORTS-1:0] = cell_mask & ~(N_PORTS'(1) << first_q);
      wr_mask[N_PORTS-1:0] = '1;
    end else if (link_tick && cell_valid && nonempty[first_q]) begin
      wr_en   = 1'b1;
      wr_addr = otr[first_q];
      wr_data[NEXT_LSB +: AW] = cell_addr;
      wr_mask[NEXT_LSB +: AW] = '1;
    end
  end

endmodule

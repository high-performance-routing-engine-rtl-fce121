// rpm: read pointer manager.
//
// For the port granted in this slot, hands the head address of its VOQ to
// the outgoing cell reader, advances the queue head to the next cell, and
// then either stitches the cell into the queue of its next multicast leaf
// or returns the address to the idle queue.
//   rd_tick:   read the pointer entry of the head address ohr[gnt_port];
//              cell_addr shows that address in this cycle.
//   pop_tick:  pop the VOQ with the next pointer read back. If leaves
//              remain, pick the lowest one and write the entry's leaf
//              field without it.
//   link_tick: for a multicast cell with leaves left, link the address at
//              the tail of the next leaf queue (writing the tail's next
//              pointer if that queue is non-empty) and report the stitch;
//              otherwise free the address to the idle queue.
// gnt_valid and gnt_port must be held through the three ticks, which must
// be different cycles.
// Popping the head with the next pointer and stitching multicast cells into
// the next leaf queue follow the published design; the order of leaves and
// the field layout are this design's choices.
module rpm #(
  parameter int N_PORTS = re_pkg::N_PORTS,
  parameter int N_CELLS = re_pkg::N_CELLS,
  parameter int PTR_W   = re_pkg::PTR_W,
  localparam int AW     = $clog2(N_CELLS),
  localparam int PW     = $clog2(N_PORTS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       rd_tick,
  input  logic                       pop_tick,
  input  logic                       link_tick,
  input  logic                       gnt_valid,
  input  logic [PW-1:0]              gnt_port,
  output logic [AW-1:0]              cell_addr,
  input  logic [N_PORTS-1:0][AW-1:0] ohr,
  input  logic [N_PORTS-1:0][AW-1:0] otr,
  input  logic [N_PORTS-1:0]         nonempty,
  output logic                       pop_en,
  output logic [PW-1:0]              pop_q,
  output logic [AW-1:0]              pop_next,
  output logic                       app_en,
  output logic [PW-1:0]              app_q,
  output logic [AW-1:0]              app_addr,
  output logic                       stch_en,
  output logic [PW-1:0]              stch_q,
  output logic                       free_en,
  output logic [AW-1:0]              free_addr,
  output logic                       rd_en,
  output logic [AW-1:0]              rd_addr,
  input  logic [PTR_W-1:0]           rd_data,
  output logic                       wr_en,
  output logic [AW-1:0]              wr_addr,
  output logic [PTR_W-1:0]           wr_data,
  output logic [PTR_W-1:0]           wr_mask
);

  localparam int NEXT_LSB = N_PORTS;

  logic [AW-1:0]      cur_addr;
  logic               stitch;
  logic [PW-1:0]      next_leaf;
  logic [N_PORTS-1:0] leaves;
  logic [PW-1:0]      leaf_pick;

  assign leaves    = rd_data[N_PORTS-1:0];
  assign leaf_pick = PW'(re_pkg::lowest_port(leaves));

  assign cell_addr = rd_tick ? ohr[gnt_port] : cur_addr;
  assign rd_en     = rd_tick && gnt_valid;
  assign rd_addr   = ohr[gnt_port];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_addr  <= '0;
      stitch    <= 1'b0;
      next_leaf <= '0;
    end else begin
      if (rd_tick && gnt_valid) cur_addr <= ohr[gnt_port];
      if (pop_tick) begin
        stitch    <= gnt_valid && (leaves != '0);
        next_leaf <= leaf_pick;
      end
    end
  end

  assign pop_en   = pop_tick && gnt_valid;
  assign pop_q    = gnt_port;
  assign pop_next = rd_data[NEXT_LSB +: AW];

  assign app_en    = link_tick && gnt_valid && stitch;
  assign app_q     = next_leaf;
  assign app_addr  = cur_addr;
  assign stch_en   = app_en;
  assign stch_q    = next_leaf;
  assign free_en   = link_tick && gnt_valid && !stitch;
  assign free_addr = cur_addr;

  always_comb begin
    wr_en   = 1'b0;
    wr_addr = cur_addr;
    wr_data = '0;
    wr_mask = '0;
    if (pop_en && leaves != '0) begin
      wr_en   = 1'b1;
      wr_addr = cur_addr;
      wr_data[N_PORTS-1:0] = leaves & ~(N_PORTS'(1) << leaf_pick);
      wr_mask[N_PORTS-1:0] = '1;
    end else if (app_en && nonempty[next_leaf]) begin
      wr_en   = 1'b1;
      wr_addr = otr[next_leaf];
      wr_data[NEXT_LSB +: AW] = cur_addr;
      wr_mask[NEXT_LSB +: AW] = '1;
    end
  end

  a_grant_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_tick && gnt_valid) |-> nonempty[gnt_port]);

endmodule

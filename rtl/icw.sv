// icw: incoming cell writer.
//
// Receives a cell from the input link as 2*CELL_ROWS half words of 36 bits,
// one per cycle, the first in phase 0 of a slot. It pairs them into 72-bit
// rows, the even half word as the left half (LHC, bits 71:36) and the odd
// one as the right half (RHC, bits 35:0), and writes row k of the current
// writing cell to the data buffer at cell_addr*CELL_ROWS + k in phase 2k+1.
// The first half word is the routing header: its low N_PORTS bits are the
// destination port mask (one bit for unicast, several for multicast),
// shown on hdr_valid/hdr_mask in phase 0 for the policing decision. The
// cell is written only if cell_valid (the admitted cell's address is in
// cell_addr, from the write pointer manager, from phase 1 on).
// Writing half cells into a 72-bit buffer follows the published data path;
// the cell length, the header layout and the slot alignment are this
// design's choices.
module icw #(
  parameter int N_PORTS   = re_pkg::N_PORTS,
  parameter int N_CELLS   = re_pkg::N_CELLS,
  parameter int CELL_ROWS = re_pkg::CELL_ROWS,
  parameter int HALF_W    = re_pkg::HALF_W,
  localparam int AW       = $clog2(N_CELLS),
  localparam int BAW      = $clog2(N_CELLS * CELL_ROWS),
  localparam int PHW      = $clog2(2 * CELL_ROWS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PHW-1:0]       phase,
  input  logic                 in_valid,
  input  logic [HALF_W-1:0]    in_data,
  output logic                 hdr_valid,
  output logic [N_PORTS-1:0]   hdr_mask,
  input  logic                 cell_valid,
  input  logic [AW-1:0]        cell_addr,
  output logic                 wr_en,
  output logic [BAW-1:0]       wr_addr,
  output logic [2*HALF_W-1:0]  wr_data
);

  logic [HALF_W-1:0] lhc;

  assign hdr_valid = in_valid && phase == '0;
  assign hdr_mask  = in_data[N_PORTS-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           lhc <= '0;
    else if (!phase[0])   lhc <= in_data;
  end

  assign wr_en   = phase[0] && cell_valid;
  assign wr_addr = BAW'(cell_addr) * BAW'(CELL_ROWS) + BAW'(phase[PHW-1:1]);
  assign wr_data = {lhc, in_data};

endmodule

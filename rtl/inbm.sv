// inbm: ingress buffer memory, the user cell data buffer.
//
// A simple dual-port synchronous RAM, one write port and one read port, both
// on the engine clock. Each row is 72 bits wide and holds a left half
// (bits 71:36) and a right half (bits 35:0) of cell data. A cell takes
// CELL_ROWS consecutive rows: row k of cell c is at c*CELL_ROWS + k.
// Read data appears one cycle after rd_en. Reading a row in the same cycle
// as it is written returns the old contents.
// The row width and the two halves come from the published data path; the
// row count per cell is this design's choice.
module inbm #(
  parameter int N_CELLS   = re_pkg::N_CELLS,
  parameter int CELL_ROWS = re_pkg::CELL_ROWS,
  parameter int ROW_W     = re_pkg::ROW_W,
  localparam int DEPTH    = N_CELLS * CELL_ROWS,
  localparam int AW       = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [ROW_W-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [ROW_W-1:0] rd_data
);

  logic [ROW_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule

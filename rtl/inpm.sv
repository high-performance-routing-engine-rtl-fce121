// inpm: ingress pointer memory, the linked-list pointer buffer.
//
// One entry per cell address. All the VOQ linked lists and the idle-address
// list share it: an address is in exactly one list at a time, and its entry
// holds the address of the next cell in that list. The entry also keeps the
// multicast leaves the cell still has to visit.
// A simple dual-port synchronous RAM: one read port, one write port with a
// bit write mask, so that the next pointer and the leaf field of an entry
// can be written separately. Read data appears one cycle after rd_en; a read
// of an entry written in an earlier cycle sees the new value.
// The single dual-port synchronous memory of 36-bit words follows the
// published design; the field layout and the bit mask are this design's.
module inpm #(
  parameter int N_CELLS = re_pkg::N_CELLS,
  parameter int PTR_W   = re_pkg::PTR_W,
  localparam int AW     = $clog2(N_CELLS)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [PTR_W-1:0] wr_data,
  input  logic [PTR_W-1:0] wr_mask,   // 1 = write this bit
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [PTR_W-1:0] rd_data
);

  logic [PTR_W-1:0] mem [N_CELLS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= (mem[wr_addr] & ~wr_mask) | (wr_data & wr_mask);
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule

// bpc: backpressure controller.
//
// Collects, from the policing module, the events that put a cell into a
// queue (a new arrival or a multicast stitch) and hands them to the request
// FIFO controller as one registered vector with a bit per VOQ, one cycle
// later. It also raises backpressure towards the cell source while fewer
// than bp_thresh cell addresses are free, registered as well.
// That the request controller gets arrival and stitch events through this
// block follows the published design; the one-cycle register and the
// free-address threshold are this design's choices.
module bpc #(
  parameter int N_PORTS = re_pkg::N_PORTS,
  parameter int N_CELLS = re_pkg::N_CELLS,
  localparam int CW     = $clog2(N_CELLS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_PORTS-1:0] arr_vec,
  input  logic [N_PORTS-1:0] stch_vec,
  input  logic [CW-1:0]      free_cells,
  input  logic [CW-1:0]      bp_thresh,
  output logic [N_PORTS-1:0] inc_vec,
  output logic               backpressure
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc_vec      <= '0;
      backpressure <= 1'b0;
    end else begin
      inc_vec      <= arr_vec | stch_vec;
      backpressure <= free_cells < bp_thresh;
    end
  end

  // Arrival and stitching never hit the same queue in one cycle.
  a_no_merge: assert property (@(posedge clk) disable iff (!rst_n)
    (arr_vec & stch_vec) == '0);

endmodule

// pm: policing module.
//
// Keeps the length of every VOQ in cells, decides whether an incoming cell
// may enter the buffer, and passes the events that make a cell newly
// available in a queue (arrival, multicast stitching) on to the
// backpressure controller.
// Admission (combinational, for the header cycle): a cell is admitted when a
// free cell address is ready (iar_valid), its destination mask is not empty,
// and every destination queue holds fewer than voq_limit cells. A refused
// cell is counted in drop_count and never touches the buffer.
// Length updates: +1 on arrival (arr_en, arr_q) and on stitching
// (stch_en, stch_q), -1 when a granted cell leaves its queue (dep_en, dep_q).
// Events may come in the same cycle; each is applied once.
// The published design names this block and the lengths it keeps; the
// admission rule and the programmable limit are this design's choices.
module pm #(
  parameter int N_PORTS = re_pkg::N_PORTS,
  parameter int N_CELLS = re_pkg::N_CELLS,
  localparam int PW     = $clog2(N_PORTS),
  localparam int CW     = $clog2(N_CELLS + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       hdr_valid,
  input  logic [N_PORTS-1:0]         hdr_mask,
  input  logic                       iar_valid,
  input  logic [CW-1:0]              voq_limit,
  output logic                       admit,
  input  logic                       arr_en,
  input  logic [PW-1:0]              arr_q,
  input  logic                       stch_en,
  input  logic [PW-1:0]              stch_q,
  input  logic                       dep_en,
  input  logic [PW-1:0]              dep_q,
  output logic [N_PORTS-1:0][CW-1:0] voq_len,
  output logic [N_PORTS-1:0]         arr_vec,    // one-hot arrival event
  output logic [N_PORTS-1:0]         stch_vec,   // one-hot stitching event
  output logic [31:0]                drop_count
);

  logic room;
  always_comb begin
    room = 1'b1;
    for (int i = 0; i < N_PORTS; i++) begin
      if (hdr_mask[i] && voq_len[i] >= voq_limit) room = 1'b0;
    end
  end

  assign admit    = hdr_valid && iar_valid && (hdr_mask != '0) && room;
  assign arr_vec  = arr_en  ? (N_PORTS'(1) << arr_q)  : '0;
  assign stch_vec = stch_en ? (N_PORTS'(1) << stch_q) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      voq_len    <= '0;
      drop_count <= '0;
    end else begin
      for (int i = 0; i < N_PORTS; i++) begin
        voq_len[i] <= voq_len[i] + CW'(arr_vec[i]) + CW'(stch_vec[i])
                      - CW'(dep_en && dep_q == PW'(i));
      end
      if (hdr_valid && !admit) drop_count <= drop_count + 32'd1;
    end
  end

endmodule

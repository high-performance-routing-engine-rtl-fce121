// voq: the virtual output queue registers.
//
// Holds, for every output port, the output queue head register (OHR) and the
// output queue tail register (OTR) of that port's linked list of cell
// addresses, plus a flag telling whether the list is non-empty. The links
// themselves live in the pointer memory; this block only keeps the ends.
// Two update ports, used in different phases of the cell slot:
//   append: put an address at the tail of queue app_q. If the queue is
//           empty the address becomes head and tail.
//   pop:    remove the head of queue pop_q; pop_next is the next pointer
//           read from the pointer memory. If head equals tail the queue
//           becomes empty (an address is never in two lists at once).
// Updates take effect at the next clock edge. The head, tail and flag of
// every queue are outputs, read combinationally by the pointer managers.
// Sixteen head and tail registers follow the published data path; the
// non-empty flags are this design's way of marking an empty list.
module voq #(
  parameter int N_PORTS = re_pkg::N_PORTS,
  parameter int N_CELLS = re_pkg::N_CELLS,
  localparam int AW     = $clog2(N_CELLS),
  localparam int PW     = $clog2(N_PORTS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       app_en,
  input  logic [PW-1:0]              app_q,
  input  logic [AW-1:0]              app_addr,
  input  logic                       pop_en,
  input  logic [PW-1:0]              pop_q,
  input  logic [AW-1:0]              pop_next,
  output logic [N_PORTS-1:0][AW-1:0] ohr,
  output logic [N_PORTS-1:0][AW-1:0] otr,
  output logic [N_PORTS-1:0]         nonempty
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ohr      <= '0;
      otr      <= '0;
      nonempty <= '0;
    end else begin
      if (pop_en) begin
        if (ohr[pop_q] == otr[pop_q]) nonempty[pop_q] <= 1'b0;
        else                          ohr[pop_q]      <= pop_next;
      end
      if (app_en) begin
        otr[app_q]      <= app_addr;
        nonempty[app_q] <= 1'b1;
        // An empty queue, or one emptied by the pop of this same cycle,
        // gets the new address as its head.
        if (!nonempty[app_q] ||
            (pop_en && pop_q == app_q && ohr[app_q] == otr[app_q]))
          ohr[app_q] <= app_addr;
      end
    end
  end

  // Popping an empty queue is a protocol error of the caller.
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    pop_en |-> nonempty[pop_q]);

endmodule

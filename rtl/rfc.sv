// rfc: request FIFO controller with request shifting.
//
// Requests and grants between this input buffer and the central arbiter
// take one or more cell slots to travel. To keep requesting while earlier
// requests are still in flight, every VOQ i has a request FIFO of RF_LEN
// bits, F[i][0] (entry, newest) to F[i][RF_LEN-1] (head, oldest), and a
// count rfc_len[i] of its cells not yet requested. rfc_len[i] is the VOQ
// length minus the valid requests held in F[i].
// Once per slot (req_tick), for every VOQ whose head element is not holding
// a valid request, the FIFO is shifted one place towards the head and a new
// element is stored at the entry: a valid request if rfc_len[i] > 0 (which
// then drops by one), an invalid one otherwise. A VOQ whose head element is
// valid is left alone and sends no new request. req_vec carries the new
// requests of the slot to the arbiter, held until the next req_tick.
// Once per slot (grant_tick) a grant (grant_valid, grant_port) deletes the
// oldest valid request of the granted VOQ and is passed on, registered, as
// gnt_valid/gnt_port for one cycle. A grant for a VOQ with no valid request
// is dropped and counted in bad_grants.
// inc_vec adds newly queued cells (arrivals and multicast stitches).
// The shift-and-store rule, the deletion of the oldest request on a grant,
// and the two counts follow the published method; "first element" of the
// FIFO is read here as the head end. The once-per-slot ticks and the
// handling of unexpected grants are this design's choices. RF_LEN must be
// at least 2.
module rfc #(
  parameter int N_PORTS = re_pkg::N_PORTS,
  parameter int N_CELLS = re_pkg::N_CELLS,
  parameter int RF_LEN  = re_pkg::RF_LEN,
  localparam int PW     = $clog2(N_PORTS),
  localparam int CW     = $clog2(N_CELLS + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_PORTS-1:0]         inc_vec,
  input  logic                       req_tick,
  output logic [N_PORTS-1:0]         req_vec,
  input  logic                       grant_tick,
  input  logic                       grant_valid,
  input  logic [PW-1:0]              grant_port,
  output logic                       gnt_valid,
  output logic [PW-1:0]              gnt_port,
  output logic [N_PORTS-1:0][RF_LEN-1:0] rf,
  output logic [N_PORTS-1:0][CW-1:0] rfc_len,
  output logic [31:0]                bad_grants
);

  // Oldest valid element of the granted FIFO (one-hot), empty if none.
  logic [RF_LEN-1:0] del_sel;
  always_comb begin
    del_sel = '0;
    for (int j = 0; j < RF_LEN; j++) begin
      if (rf[grant_port][j]) del_sel = RF_LEN'(1) << j;
    end
  end

  logic grant_ok;
  assign grant_ok = grant_tick && grant_valid && (del_sel != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf         <= '0;
      rfc_len    <= '0;
      req_vec    <= '0;
      gnt_valid  <= 1'b0;
      gnt_port   <= '0;
      bad_grants <= '0;
    end else begin
      gnt_valid <= grant_ok;
      if (grant_ok) gnt_port <= grant_port;
      if (grant_tick && grant_valid && !grant_ok) bad_grants <= bad_grants + 32'd1;

      for (int i = 0; i < N_PORTS; i++) begin
        logic [RF_LEN-1:0] f;
        logic [CW-1:0]     n;
        logic              new_req;
        f = rf[i];
        n = rfc_len[i] + CW'(inc_vec[i]);
        new_req = 1'b0;
        if (grant_ok && grant_port == PW'(i)) f = f & ~del_sel;
        if (req_tick) begin
          if (!f[RF_LEN-1]) begin
            new_req = rfc_len[i] != '0;
            f = {f[RF_LEN-2:0], new_req};
            if (new_req) n = n - CW'(1);
          end
          req_vec[i] <= new_req;
        end
        rf[i]      <= f;
        rfc_len[i] <= n;
      end
    end
  end

  // grant_tick comes once per slot, so a forwarded grant lasts one cycle.
  a_grant_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    gnt_valid |=> !gnt_valid);

endmodule

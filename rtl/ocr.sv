// ocr: outgoing cell reader.
//
// Takes the grant passed on by the request FIFO controller, holds the
// granted port until gnt_done (gnt_valid_q/gnt_port_q, seen by the read
// pointer manager and the policing module), and reads the granted cell from
// the data buffer. In the cycle start is high, cell_addr (from the read
// pointer manager) is the current reading cell; the reader then reads one
// 72-bit row every two cycles and sends the cell out as 2*CELL_ROWS half
// words of 36 bits, left half first, one per cycle, starting the cycle after
// start. out_sop marks the first half word and out_port is the granted
// output port for the crossbar.
// Passing the grant to the pointer manager and reading the buffer with its
// address follow the published design; the output format and timing are
// this design's choices.
module ocr #(
  parameter int N_PORTS   = re_pkg::N_PORTS,
  parameter int N_CELLS   = re_pkg::N_CELLS,
  parameter int CELL_ROWS = re_pkg::CELL_ROWS,
  parameter int HALF_W    = re_pkg::HALF_W,
  localparam int AW       = $clog2(N_CELLS),
  localparam int BAW      = $clog2(N_CELLS * CELL_ROWS),
  localparam int PW       = $clog2(N_PORTS),
  localparam int CC       = $clog2(2 * CELL_ROWS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                gnt_valid,    // one-cycle grant from the RFC
  input  logic [PW-1:0]       gnt_port,
  output logic                gnt_valid_q,
  output logic [PW-1:0]       gnt_port_q,
  input  logic                gnt_done,
  input  logic                start,
  input  logic [AW-1:0]       cell_addr,
  output logic                rd_en,
  output logic [BAW-1:0]      rd_addr,
  input  logic [2*HALF_W-1:0] rd_data,
  output logic                out_valid,
  output logic                out_sop,
  output logic [HALF_W-1:0]   out_data,
  output logic [PW-1:0]       out_port
);

  logic          busy;
  logic [CC-1:0] cnt;
  logic [AW-1:0] crc;      // current reading cell (CRC)
  logic          right_q;

  // Grant hold: set by the grant, cleared by gnt_done once the pointer
  // managers are done with it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt_valid_q <= 1'b0;
      gnt_port_q  <= '0;
    end else if (gnt_valid) begin
      gnt_valid_q <= 1'b1;
      gnt_port_q  <= gnt_port;
    end else if (gnt_done) begin
      gnt_valid_q <= 1'b0;
    end
  end

  logic go;
  assign go = start && gnt_valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      crc    <= '0;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      right_q   <= 1'b0;
      out_port  <= '0;
    end else begin
      if (go) begin
        busy   <= 1'b1;
        cnt    <= CC'(1);
        crc <= cell_addr;
      end else if (busy) begin
        cnt <= cnt + CC'(1);
        if (cnt == CC'(2 * CELL_ROWS - 1)) busy <= 1'b0;
      end
      out_valid <= go || busy;
      out_sop   <= go;
      right_q   <= go ? 1'b0 : cnt[0];
      if (go) out_port <= gnt_port_q;
    end
  end

  assign rd_en    = go || (busy && !cnt[0]);
  assign rd_addr  = go ? BAW'(cell_addr) * BAW'(CELL_ROWS)
                      : BAW'(crc) * BAW'(CELL_ROWS) + BAW'(cnt[CC-1:1]);
  assign out_data = right_q ? rd_data[HALF_W-1:0] : rd_data[2*HALF_W-1:HALF_W];

endmodule

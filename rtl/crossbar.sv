// crossbar: N x N cell crossbar between the input buffers and the outputs.
//
// Every input buffer sends its granted cell as a stream of half words
// (in_valid, in_sop, in_data) together with the output it is bound for
// (in_port). Each output takes the stream of the input whose in_port names
// it. The arbiter grants each output to at most one input per slot, so at
// most one input drives each output; an assertion checks this. The outputs
// are registered: a half word leaves the crossbar one clock cycle after it
// enters.
//
// The crossbar itself is only a box in the published switch (a serial
// crossbar, configured by the arbiter), with no detail given. This one is a
// parallel multiplexer per output, steered by the port number that travels
// with the cell rather than by a configuration word from the arbiter, which
// keeps the setting aligned with the cell. Its structure and timing are this
// design's own choice.
module crossbar #(
  parameter int N_PORTS = re_pkg::N_PORTS,
  localparam int HALF_W = re_pkg::HALF_W,
  localparam int PW     = $clog2(N_PORTS)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [N_PORTS-1:0]              in_valid,
  input  logic [N_PORTS-1:0]              in_sop,
  input  logic [N_PORTS-1:0][HALF_W-1:0]  in_data,
  input  logic [N_PORTS-1:0][PW-1:0]      in_port,
  output logic [N_PORTS-1:0]              out_valid,
  output logic [N_PORTS-1:0]              out_sop,
  output logic [N_PORTS-1:0][HALF_W-1:0]  out_data
);

  // sel[o][i]: input i drives output o in this cycle
  logic [N_PORTS-1:0][N_PORTS-1:0] sel;
  always_comb
    for (int o = 0; o < N_PORTS; o++)
      for (int i = 0; i < N_PORTS; i++)
        sel[o][i] = in_valid[i] && (in_port[i] == PW'(o));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_sop   <= '0;
      out_data  <= '0;
    end else begin
      for (int o = 0; o < N_PORTS; o++) begin
        logic              v, s;
        logic [HALF_W-1:0] d;
        v = 1'b0; s = 1'b0; d = '0;
        for (int i = 0; i < N_PORTS; i++)
          if (sel[o][i]) begin
            v = 1'b1;
            s = s | in_sop[i];
            d = d | in_data[i];
          end
        out_valid[o] <= v;
        out_sop[o]   <= s;
        out_data[o]  <= d;
      end
    end
  end

  for (genvar o = 0; o < N_PORTS; o++) begin : g_chk
    a_one_source: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel[o]));
  end

endmodule

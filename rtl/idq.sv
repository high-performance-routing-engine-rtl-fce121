// idq: the idle queue of free cell addresses.
//
// Free cell addresses form one more linked list in the shared pointer
// memory. This block keeps its ends and the address handed to the next
// incoming cell:
//   IHR  idle queue head register: first free address in the list
//   ITR  idle queue tail register: last free address in the list
//   IAR  idle address register: the address already taken from the list
//        for the next incoming cell (iar_valid says whether it holds one)
// After reset the block fills the pointer memory so that address i points
// to i+1, taking N_CELLS-1 cycles with init_done low; address 0 starts in
// IAR. Then, once per slot:
//   refill  in the cycle refill_rd is high, if IAR is empty or is being
//           used up by this slot's cell (take), and the list is not empty,
//           the entry of IHR is read; in the cycle refill_ld is high IAR
//           takes IHR and IHR takes the next pointer read back.
//   free    free_en appends free_addr at the tail: the tail's next pointer
//           is written through the pointer-memory write port, or, if the
//           list is empty, the address becomes head and tail.
// refill_rd, refill_ld and free_en must fall in three different cycles.
// Register names follow the published data path; the prefetch into IAR and
// the initial fill are this design's choices.
module idq #(
  parameter int N_PORTS = re_pkg::N_PORTS,
  parameter int N_CELLS = re_pkg::N_CELLS,
  parameter int PTR_W   = re_pkg::PTR_W,
  localparam int AW     = $clog2(N_CELLS),
  localparam int CW     = $clog2(N_CELLS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             init_done,
  input  logic             refill_rd,
  input  logic             refill_ld,
  input  logic             take,
  input  logic             free_en,
  input  logic [AW-1:0]    free_addr,
  output logic [AW-1:0]    iar,
  output logic             iar_valid,
  output logic [CW-1:0]    free_cells,   // addresses in the list plus IAR
  // pointer memory access
  output logic             rd_en,
  output logic [AW-1:0]    rd_addr,
  input  logic [PTR_W-1:0] rd_data,
  output logic             wr_en,
  output logic [AW-1:0]    wr_addr,
  output logic [PTR_W-1:0] wr_data,
  output logic [PTR_W-1:0] wr_mask
);

  localparam int NEXT_LSB = N_PORTS;

  logic [AW-1:0] ihr, itr, init_ptr;
  logic [CW-1:0] list_cnt;
  logic          refill_pend;

  logic need_refill;
  assign need_refill = init_done && (!iar_valid || take) && (list_cnt != '0);

  assign rd_en   = refill_rd && need_refill;
  assign rd_addr = ihr;

  always_comb begin
    wr_en   = 1'b0;
    wr_addr = itr;
    wr_data = '0;
    wr_mask = '0;
    if (!init_done) begin
      // Entry i links to i+1; the leaf field starts clear.
      wr_en   = 1'b1;
      wr_addr = init_ptr;
      wr_data[NEXT_LSB +: AW] = init_ptr + AW'(1);
      wr_mask = '1;
    end else if (free_en && list_cnt != '0) begin
      wr_en   = 1'b1;
      wr_addr = itr;
      wr_data[NEXT_LSB +: AW] = free_addr;
      wr_mask[NEXT_LSB +: AW] = '1;
    end
  end

  assign free_cells = list_cnt + CW'(iar_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done   <= 1'b0;
      init_ptr    <= '0;
      ihr         <= AW'(1);
      itr         <= AW'(N_CELLS - 1);
      iar         <= '0;
      iar_valid   <= 1'b1;
      list_cnt    <= CW'(N_CELLS - 1);
      refill_pend <= 1'b0;
    end else if (!init_done) begin
      init_ptr <= init_ptr + AW'(1);
      if (init_ptr == AW'(N_CELLS - 2)) init_done <= 1'b1;
    end else begin
      if (refill_rd) refill_pend <= need_refill;
      if (refill_ld) begin
        refill_pend <= 1'b0;
        if (refill_pend) begin
          iar       <= ihr;
          iar_valid <= 1'b1;
          ihr       <= rd_data[NEXT_LSB +: AW];
          list_cnt  <= list_cnt - CW'(1);
        end else if (take) begin
          iar_valid <= 1'b0;
        end
      end
      if (free_en) begin
        itr      <= free_addr;
        list_cnt <= list_cnt + CW'(1);
        if (list_cnt == '0) ihr <= free_addr;
      end
    end
  end

  a_phases_apart: assert property (@(posedge clk) disable iff (!rst_n)
    !(free_en && (refill_rd || refill_ld)));

endmodule

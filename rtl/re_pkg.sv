// re_pkg: constants shared by the blocks of the VOQ routing engine.
//
// The engine works in cell slots. One slot is SLOT_CYCLES clock cycles. In
// one slot the engine takes in one cell and sends out one cell. Each
// pointer operation runs in a fixed phase of the slot, so the
// operations never contend for the pointer memory or for a queue register.
// The switch size (16 ports), the 128-cell buffer, the 2-bit request FIFO,
// the 72-bit data buffer and the 36-bit pointer memory follow the published
// design. The phase plan, the cell length and the header layout are this
// design's own choices.
package re_pkg;

  // Published sizes
  localparam int N_PORTS   = 16;   // 16x16 switch
  localparam int N_CELLS   = 128;  // input buffer size in cells
  localparam int RF_LEN    = 2;    // request FIFO length (bits per VOQ)
  localparam int ROW_W     = 72;   // data buffer row: left half + right half
  localparam int HALF_W    = 36;   // one half cell word (LHC or RHC)
  localparam int PTR_W     = 36;   // pointer memory word

  // Own choices
  localparam int CELL_ROWS   = 6;             // 72-bit rows per cell (at least 3)
  localparam int SLOT_CYCLES = 2 * CELL_ROWS; // one half word per cycle

  // Phases of the cell slot (own choice). Phase 0 is the first cycle.
  localparam int PH_HDR      = 0;  // header half word on the input bus, grant sampled
  localparam int PH_WPM_RD   = 1;  // idle-head read, leaf mask write
  localparam int PH_WPM_LINK = 2;  // link new cell into its first VOQ
  localparam int PH_RPM_RD   = 3;  // read the pointer entry of the granted head cell
  localparam int PH_RPM_POP  = 4;  // advance the granted VOQ head, write remaining leaves
  localparam int PH_RPM_LINK = 5;  // stitch to the next leaf queue or free the address
  localparam int PH_REQ      = SLOT_CYCLES - 1; // request generation (shifter)

  // Index of the lowest set bit of a port mask (0 when the mask is empty).
  function automatic int unsigned lowest_port(input logic [N_PORTS-1:0] m);
    int unsigned r;
    r = 0;
    for (int i = N_PORTS - 1; i >= 0; i--) begin
      if (m[i]) r = i;
    end
    return r;
  endfunction

endpackage

# Input-queued cell switch with a pipelined VOQ routing engine and request shifting

This is a 16x16 input-queued cell switch, 2.5 Gb/s per port. It has three parts: one routing
engine per input port, a central arbiter and a crossbar. Most of the design is in the routing
engine, the input buffer of one port. It keeps one virtual output queue (VOQ) per output
port, so a cell waiting for a busy output never blocks cells behind it that are bound for
other outputs.

The central arbiter decides, slot by slot, which input may send to which output. In a switch
of this size the input buffers and the arbiter sit apart, and requests and grants take whole
cell slots to travel; in this RTL they take one slot each. If an input buffer could only
request again after its last grant came back, it would waste those slots. The engine
therefore keeps a short **request FIFO** per VOQ. Several requests can then be in flight at
once, and each slot the FIFO is shifted one place. This is called *request shifting*.

The rest of the engine is a cell buffer that all queues share dynamically. Every cell is stored
once. All 16 VOQs, plus the list of free cell addresses, are linked lists in one pointer memory.
A multicast cell is not copied: after it leaves for one output, its address is linked into the
queue of its next output.

The central arbiter keeps the requests it has not served yet, and matches inputs to outputs
once per slot with 3-iteration iSLIP. The crossbar carries each granted cell to its output.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It lints clean of structural
warnings in Verilator, and each block has a self-checking testbench.

## Blocks

| block | file | role |
|---|---|---|
| switch (top) | `rtl/switch_fabric.sv` | 16 routing engines, the central arbiter and the crossbar |
| central arbiter | `rtl/central_arbiter.sv` | residual request counts, 3-iteration iSLIP, one grant per input per slot |
| crossbar | `rtl/crossbar.sv` | steers each engine's outgoing cell to its output port |
| routing engine | `rtl/routing_engine.sv` | one input port: slot timer, wiring, sharing of the pointer-memory ports |
| request FIFO controller (RFC) | `rtl/rfc.sv` | per-VOQ request FIFOs, request generation, grant matching |
| VOQ registers | `rtl/voq.sv` | head (OHR) and tail (OTR) register of each output queue |
| idle queue (IDQ) | `rtl/idq.sv` | free-address list: head IHR, tail ITR, prefetched address IAR |
| write pointer manager (WPM) | `rtl/wpm.sv` | links a new cell into its VOQ |
| read pointer manager (RPM) | `rtl/rpm.sv` | advances the granted VOQ; stitches multicast cells or frees their address |
| policing module (PM) | `rtl/pm.sv` | VOQ lengths and admission of incoming cells |
| backpressure controller (BPC) | `rtl/bpc.sv` | passes "cell queued" events to the RFC; raises backpressure |
| incoming cell writer (ICW) | `rtl/icw.sv` | writes an arriving cell into the data buffer |
| outgoing cell reader (OCR) | `rtl/ocr.sv` | reads a granted cell and sends it to the crossbar |
| ingress buffer memory (INBM) | `rtl/inbm.sv` | cell data, 72-bit rows, one write and one read port |
| ingress pointer memory (INPM) | `rtl/inpm.sv` | one 36-bit entry per cell address: next pointer and multicast leaves |
| shared constants | `rtl/re_pkg.sv` | sizes, slot phases, a lowest-set-bit helper |

The cell framer, the serial link interface and the processor interface are not in the RTL.
The top's ports stand where they would connect.

## The cell slot

Everything runs in cell slots of `SLOT_CYCLES = 2*CELL_ROWS = 12` clock cycles. The slot
counter starts once the idle queue is built after reset, which takes `N_CELLS-1` cycles with
`ready` low. `slot_start` marks phase 0. In each slot one cell can come in and one can go out.
Every pointer operation has a fixed phase, so the pointer memory never has two readers or two
writers in one cycle. Appends to the VOQ registers never collide either. Assertions in the top
check this.

| phase | what happens |
|---|---|
| 0 | First half word (routing tag) of the arriving cell is on `in_data`; PM decides admission; WPM latches IAR as the cell's address. RFC samples `grant_valid/grant_port`. |
| 1 | WPM writes the cell's remaining multicast leaves into its INPM entry. IDQ reads INPM[IHR] if IAR needs refilling. The RFC's forwarded grant reaches the OCR. |
| 2 | WPM links the address at the tail of the first destination VOQ (INPM write of the old tail's next pointer) and reports the arrival. IDQ loads IAR from IHR. |
| 3 | RPM reads the INPM entry of the granted VOQ's head; the OCR starts reading that cell. |
| 4 | RPM pops the VOQ head (next pointer from INPM); PM lowers the length; for a multicast cell the leaf field is rewritten without the next leaf. The first outgoing half word appears. |
| 5 | RPM links the cell into the next leaf's VOQ (stitch), or returns the address to the idle queue. |
| 1,3,5,...,11 | ICW writes row k of the arriving cell in phase 2k+1. |
| 11 | RFC shifts every request FIFO and forms `req_vec`, valid from the next phase 0 for one slot. |

Latencies that follow from the plan:
- grant sampled at phase 0, first output half word 4 cycles later;
- a cell arriving in slot k can be requested at the end of slot k;
- a cell is never read before all of it has been written.

An address freed in phase 5 can be handed out again in phase 2 of the next slot at the
earliest. It is overwritten one slot after that, and by then the reader has finished the old
cell.

## Request shifting (RFC)

For each VOQ i the RFC holds:
- `F[i][0..RF_LEN-1]`: the request FIFO, default `RF_LEN = 2`. `F[i][0]` is the entry end,
  where new requests go. `F[i][RF_LEN-1]` is the head end, the oldest position.
- `rfc_len[i]`: the cells of the VOQ that have not been requested yet. It equals the VOQ length
  in the PM minus the valid bits in `F[i]`. An assertion in the engine checks
  this in every request phase.

Once per slot (phase 11), for every VOQ:
- If the head element `F[i][RF_LEN-1]` is **not** a valid request, the FIFO shifts one place
  towards the head. A new element is stored at the entry: a valid request if `rfc_len[i] > 0`,
  and `rfc_len[i]` then drops by one; otherwise an invalid (empty) request. `req_vec[i]` sends
  the new request to the arbiter.
- If the head element is valid, the VOQ does nothing and sends nothing. It already has
  `RF_LEN` slots' worth of requests outstanding, and shifting would lose the oldest one.

When a grant for port g arrives (phase 0), the oldest valid request of `F[g]` is cleared and
the grant goes on to the OCR and RPM. A grant that matches no request is dropped and counted in
`bad_grants`.

In effect, a VOQ with cells can send one new request per slot until `RF_LEN` requests are
unanswered. With the default of 2, one slot of request latency plus one slot of grant latency
no longer costs throughput. The arbiter must keep its own count of requests it has not yet
served. Here it is a pending count per input/output pair (see the central arbiter below).

One point needs care. The shift rule can be read as testing the *entry* element rather than
the head. Under that reading a VOQ could never have more than one request outstanding, and the
FIFO length would make no difference. This RTL tests the head element, the element that leaves
the FIFO first. `tb_rfc` fails if the entry element is tested instead.

## Shared buffer and linked lists

- **INBM** (`N_CELLS*CELL_ROWS` rows of 72 bits). Row k of cell c is at `c*CELL_ROWS + k`. Each
  row is a left half (LHC, bits 71:36) and a right half (RHC, bits 35:0). Both are 36-bit half
  words of the cell, in arrival order.
- **INPM** (`N_CELLS` entries of 36 bits). Bits 22:16 hold the next pointer; bits 15:0 hold the
  multicast leaves the cell has still to visit. The write port has a bit mask, so either field
  can be written alone.
- **VOQ registers**: head, tail and a non-empty flag per output. Head equal to tail means one
  cell, because an address is in exactly one list at any time.
- **Idle queue**: after reset, entry i points to i+1, address 0 sits in IAR, IHR = 1 and
  ITR = `N_CELLS-1`. IAR always holds the address for the *next* arriving cell, so the ICW can
  start writing in phase 1. Freed addresses go to the tail.
- **Cell address registers**: the WPM holds the address of the cell being written (CWC,
  current writing cell). The OCR holds the address of the cell being read (CRC, current
  reading cell).

**Multicast.** The routing tag is a destination bitmap. The cell is linked only into its
lowest-numbered destination, and the other bits go into its INPM leaf field. Each time the cell
is read out, the RPM removes the lowest remaining leaf from the field and links the address at
that leaf's VOQ tail. The stitch is reported through the PM and BPC, so the RFC can request for
it. When no leaves are left, the address is freed. A multicast cell therefore leaves for its
outputs one at a time, in port order, and waits in each queue behind the cells already there.

## Central arbiter and crossbar

The arbiter's request FIFO is a count `pend[i][o]` per input/output pair. Requests carry no
data, so a count is all the FIFO needs. At phase 0 of every slot the arbiter adds each
engine's `req_vec` to the counts. A request that is not served stays counted and competes
again in later slots, so an input never has to repeat it. A count never exceeds `RF_LEN`,
because an input has at most that many requests outstanding per queue. An assertion checks
this.

The matching is iSLIP with `ITER = 3` iterations, one per clock cycle in phases 1 to 3:
- **Grant:** each unmatched output picks an unmatched input with a non-zero count. It picks
  round robin, starting from its grant pointer.
- **Accept:** each input that received grants accepts one, round robin from its accept
  pointer.
- **Pointers:** for matches made in the first iteration only, both pointers move one place
  past the partner. This is the rule that keeps iSLIP fair and free of starvation.

In phase 4 the matched pairs become the grants, at most one per input, and their counts drop
by one. The grants are held for a whole slot, and each engine samples its grant at the next
phase 0. So a request formed at the end of slot k is arbitrated in slot k+1, and its grant is
used at the start of slot k+2. That is one slot of request latency and one of grant latency.

Timeline of one cell from request to output port:

| when | what |
|---|---|
| slot k, phase 11 | the engine's RFC shifts and issues the request |
| slot k+1, phases 0-4 | the arbiter counts it, matches, and registers the grant |
| slot k+2, phase 0 | the RFC samples the grant and deletes the oldest request |
| slot k+2, phase 4 | the engine's first half word is out (4 cycles after the grant sample) |
| slot k+2, phase 5 | the first half word is at the crossbar output (registered, 1 cycle) |

The crossbar is a registered multiplexer per output. Each engine sends its cell stream
together with its `out_port`, and output o takes the stream whose port is o. The arbiter never
grants one output to two inputs in a slot, and an assertion checks this. A cell takes a full
slot to read out, and grants for successive slots start 12 cycles apart, so two streams never
overlap at an output.

In the published switch the arbiter configures the crossbar directly. Here the same
information, the granted output, reaches the crossbar with the cell, as the engine's
`out_port`. This keeps the crossbar setting aligned with the cell without a separate delay
line.

## Interface of `switch_fabric`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset, common to all engines |
| `ready`, `slot_start` | out | 1 | as on one engine (all run in lockstep) |
| `in_valid`, `in_data` | in | 16, 16x36 | one cell stream per input port |
| `voq_limit`, `bp_thresh` | in | 8 | common to all inputs |
| `out_valid`, `out_sop`, `out_data` | out | 16, 16, 16x36 | one switched cell stream per output port |
| `backpressure`, `drop_count`, `bad_grants`, `voq_len`, `free_cells` | out | per input | the engines' status outputs |

## Interface of `routing_engine`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `ready` | out | 1 | idle queue built; slots running |
| `slot_start` | out | 1 | phase 0 of a slot |
| `in_valid`, `in_data` | in | 1, 36 | arriving cell, 12 half words, first one in phase 0 |
| `voq_limit` | in | 8 | policing: a cell is refused if any destination VOQ already holds this many |
| `bp_thresh` | in | 8 | `backpressure` is raised while fewer free addresses remain |
| `req_vec` | out | 16 | requests of this slot to the arbiter |
| `grant_valid`, `grant_port` | in | 1, 4 | grant, sampled in phase 0 |
| `out_valid`, `out_sop`, `out_data`, `out_port` | out | 1, 1, 36, 4 | outgoing cell and its output port |
| `backpressure`, `drop_count`, `bad_grants` | out | 1, 32, 32 | status |
| `voq_len`, `free_cells` | out | 16x8, 8 | VOQ lengths; free addresses |

**Cell format.** A cell is 12 half words of 36 bits (432 bits), and the first one is the routing
tag. Its low 16 bits are the destination bitmap; the RTL does not interpret the other 20. The
432 bits hold the tag plus a 52-byte cell, that is, an ATM cell without its HEC byte. Cells must
start at `slot_start`: the source, normally a cell framer, aligns them.

**Policing.** A cell is refused in phase 0 in two cases. One is that no free address is ready,
which happens when all `N_CELLS` are in use. The other is that any destination VOQ holds
`voq_limit` cells or more. A refused cell is counted in `drop_count` and never written.

## Parameters

| parameter | default | from |
|---|---|---|
| `N_PORTS` | 16 | published switch size |
| `N_CELLS` | 128 | published buffer size |
| `RF_LEN` | 2 | published request FIFO length (at least 2) |
| `ITER` | 3 | published iSLIP iteration count (arbiter, switch) |
| `CELL_ROWS` | 6 | own choice: sets the cell length and the slot (`2*CELL_ROWS` cycles), at least 3 |
| row / pointer width | 72 / 36 | published memory widths (fixed in `re_pkg`) |

**Rate.** At the published 77 MHz clock a 12-cycle slot lasts 155.8 ns. A 53-byte cell at
2.5 Gb/s lasts 169.6 ns, so one engine keeps up with its port, and 16 engines carry 40 Gb/s.
Timing closure at 77 MHz has not been checked on any FPGA.

## Choices this RTL makes on its own

The block structure follows the published design, along with these parts of it:
- the linked lists sharing one dual-port pointer memory;
- the register names;
- the memory widths;
- the request shifting rule and deleting the oldest request on a grant;
- the OCR-to-RPM/PM grant path;
- multicast stitching;
- a request FIFO of residual requests at the central arbiter, and 3-iteration iSLIP.

The following are this RTL's own choices:
- the 12-cycle phase plan and the fixed-phase sharing of the pointer memory;
- the cell length, tag layout and input/output half-word streams;
- the INPM field layout and its bit write mask;
- the lowest-port-first order of multicast leaves;
- the policing rule (free address plus per-VOQ limit) and the single backpressure flag;
- the reset-time fill of the idle list and the IAR prefetch;
- dropping and counting unmatched grants;
- reading the FIFO's "first element" as its head (see above);
- counts as the arbiter's request FIFO, one iSLIP iteration per cycle, and the usual iSLIP
  pointer rule (iSLIP itself comes from earlier work);
- wiring the request and grant links directly, one slot each, instead of the serial links;
- the crossbar as a parallel multiplexer steered by the port number that travels with the
  cell.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. For
example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/re_pkg.sv tb/tb_switch_fabric.sv \
          --top-module tb_switch_fabric -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_routing_engine` | Whole engine at default size, with a reference model of every VOQ, the free count and the policing. Runs moderate load, then overload, then a low VOQ limit on one hot port, then a drain. Checks every output word, the port, the drop and bad-grant counts, backpressure, no more than `RF_LEN` requests in flight, and a 4-cycle grant-to-data latency. It also requires each mechanism to occur: unicast, stitching, full-buffer drop, limit drop, backpressure, full request FIFO, unrequested grant, empty idle queue. At the end, all 128 addresses must be free. |
| `tb_switch_fabric` | Whole switch at default size. Runs uniform Bernoulli unicast traffic at loads 0.90, 0.98 and 1.00, then load 0.60 with a quarter of the cells multicast to 2-4 outputs, then a drain. Checks every word at every output, that each cell reaches exactly the outputs in its mask, unicast order per input/output pair, and carried load. It also requires later-iteration matches, residual requests and a full request count to occur. At the end, all buffers must be empty. |
| `tb_central_arbiter` | the grants of every slot against an iSLIP model with its own counts and pointers; all requests are eventually granted |
| `tb_crossbar` | random one-to-one connections; data, sop and valid at every output |
| `tb_rfc` | request FIFO rule against a bit-level model, including stall on a full FIFO |
| `tb_voq`, `tb_idq`, `tb_wpm`, `tb_rpm`, `tb_pm`, `tb_bpc`, `tb_icw`, `tb_ocr`, `tb_inbm`, `tb_inpm` | each block against its own model |

Measured with `tb_switch_fabric` (2000 slots after 300 slots of warm-up):

| offered load | carried load | drops |
|---|---|---|
| 0.90 | 0.902 | 0 |
| 0.98 | 0.965 | 0 |
| 1.00 | 0.976 | 2 |

At 0.98 and 1.00 the queues are still growing during the 2000-slot window, so the carried
figures are lower bounds on the saturation throughput. The published evaluation reports 0.986
for this case, and 0.917 for a conventional arbiter without request shifting. The
conventional arbiter and the 2DRR alternative were not built.

## Limits

- The cell framer, the serial link interface and the processor interface are not part of the
  RTL. `voq_limit` and `bp_thresh` are plain inputs.
- The request and grant links are direct wires with a fixed one-slot latency. A longer link
  would need `RF_LEN` raised to the round trip in slots, and delay stages added in
  `switch_fabric`.
- `backpressure` is only a status flag. Nothing in the engine acts on it.
- Cells must be slot-aligned, and the RTL has no framing or error handling.
- Most widths are fixed by `re_pkg` (36-bit half words, the 72-bit row, the 36-bit pointer
  word). The INPM layout needs `N_PORTS + log2(N_CELLS) <= 36`.

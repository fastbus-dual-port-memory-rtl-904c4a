# FASTBUS dual-port memory and display diagnostic module

This is a diagnostic slave for FASTBUS, the IEEE 960 data-acquisition bus. One module sits on
two segments at the same time: a **crate segment** (the backplane) and a **cable segment**.
It offers three things:

* **Memory for both segments.** A shared data space holds a fast 256 × 32 memory and a slow
  16K × 32 memory. Masters on either segment can use it to exercise block transfers at full
  speed, to run software tests, or to pass messages to the other segment (a "mailbox").
* **A CSR space on each port.** Each port has its own control and status registers: ID,
  error counter, control bits and module address.
* **A bus monitor.** It watches either segment, can freeze it by asserting WT on a chosen
  timing edge, and shows the live or captured bus state on front-panel LEDs.

The RTL is synchronous SystemVerilog. The module described in the source was built in ECL
with asynchronous one-shots. Here, every bus line is sampled on one clock, 10 ns by default.
The memory access times (10 ns fast, 100 ns slow) become 1 and 10 clock cycles.

## Block structure

```
                 +--------------------+            +----------------------+
  crate segment  | fb_port (crate)    |  ds_need   |                      |
  ---------------| 4 x fma601_adi     |----------->|  contention_logic    |
   crate_m/s     | csr_regs, parity,  |<-----------|  (first come,        |
                 | error_detect,      |  grant/wt  |   first served)      |
                 | read_logic,        |            +----------+-----------+
                 | access_clock_gen   |                       | grant
                 +---------+----------+            +----------v-----------+
                           |  dreq (owner only)    | data_space           |
                           +---------------------->|  MAR + A14 bank bit  |
                           +---------------------->|  data_mem 256 x 32   |
                 +---------+----------+            |  data_mem 16K x 32   |
  cable segment  | fb_port (cable)    |            +----------------------+
  ---------------| own MA register,   |
   cable_m/s     | same blocks        |   CSR out buses cross over, so each
                 +--------------------+   port can read the other's registers
                         both segments
                              |
                 +------------v-------+
                 | display_logic      |--> LEDs, IWT lamp, WT on the watched segment
                 +--------------------+
```

| File | Contents |
|------|----------|
| `rtl/fb_pkg.sv` | Shared types: master, slave and snapshot line bundles, data-space request, CSR#2 bits. Shared constants: timing, sizes, SS codes. Helpers: parity, bank select, IA validity. |
| `rtl/fb_dpm_top.sv` | Top level. Wires the two ports, the contention logic, the data space and the display. |
| `rtl/fb_port.sv` | Slave protocol engine of one port (`IS_CABLE` selects crate or cable). |
| `rtl/fma601_adi.sv` | One 8-bit address/data interface slice. The crate port uses four of them. |
| `rtl/csr_regs.sv` | CSR#0 to CSR#3. |
| `rtl/error_detect.sv`, `rtl/parity_gen.sv` | Parity check with its SS code, and parity generation. |
| `rtl/read_logic.sv` | Read multiplexer of a port. |
| `rtl/access_clock_gen.sv` | The dual-width access pulse (a synchronous one-shot). |
| `rtl/contention_logic.sv` | Data-space ownership. |
| `rtl/data_space.sv`, `rtl/data_mem.sv` | Address register, bank selection, wrap-around and the two memories. |
| `rtl/display_logic.sv` | Bus monitor. |

The cable auxiliary card is not in the RTL. That card carries the ECL differential
transceivers, the cable terminations and the 4 mA bias sources, all analog. The cable port's
`cable_m` and `cable_s` bundles are the card's receiver outputs and driver inputs, as they
appear at the auxiliary connector.

## Bus model

`fb_master_t` holds the lines a master drives: AS, DS, EG, RD, MS[2:0], AD[31:0] and PA.
`fb_slave_t` holds what the module drives: AK, DK, WT, SS[2:0], AD with an output enable, PA
and PE. Both are sampled or driven on the rising clock edge. The wired-OR behaviour of the
real backplane is left to whatever connects the ports.

### Address cycle

When AS rises, the port latches AD, MS, EG and PA. One clock later it decides whether it is
addressed:

| Condition | Selected when |
|-----------|---------------|
| MS<2> = 1 | never |
| MS<1> = 1 (broadcast) | always |
| EG = 1 (geographic) | AD<7:0> = {000, GA} |
| EG = 0 (logical) | CSR#0 bit 1 is set and AD<31:16> = module address (CSR#3) |

MS<0> picks CSR space (1) or data space (0). If parity checking is on, an address with bad
parity is ignored and counted in CSR#1.

A selected port raises AK and holds it until AS falls. The internal address (IA) is set as
follows:

* Under logical addressing, the IA is AD<15:0> of the address cycle.
* Under geographic addressing or broadcast, the IA starts at 0. A secondary-address cycle
  then loads it.

### Internal addresses

| Space | IA bits | Meaning |
|-------|---------|---------|
| CSR | 1..0 | register number 0–3 |
| CSR | 2 | 1 = the other port's register (read only) |
| CSR | 31..3 | must be 0 |
| data | 14 (A14) | 0 = slow memory, word in 13..0 |
| data | 14 (A14) | 1 = fast memory, word in 7..0; bits 13..8 must be 0 |
| data | 31..15 | must be 0 |

An IA that breaks these rules is answered with SS=7. This check does not depend on the
memory-off bits. For example, an IA with A14 = 1 and bits 13..8 non-zero is invalid even when
the fast memory is switched off.

### Data cycles

Each DS edge seen while the port is attached is queued, together with the MS, RD, AD and PA
present at that edge. The queue holds four entries. A pipelining master can therefore toggle
DS several times before DK catches up. Entries are served in order. Each one ends with DK set
to the level DS took.

Which edges transfer a word:

* A **rising** DS edge always transfers a word.
* A **falling** edge transfers a word only in a block transfer (MS<1:0> = 1). In a random
  cycle (MS<1:0> = 0) the falling edge only completes the handshake.
* MS<1:0> = 2 is a secondary-address cycle. A write loads the IA; a read returns it, or the
  advanced address after a block run.
* MS<2> = 1 marks a pipelined cycle. It is served in the same way as a non-pipelined one.

**Latency.** DK answers 2 + W clock edges after the DS edge:

* one edge to sample DS;
* one edge to start the access;
* W edges for the access pulse: W = 1 for CSR space and the fast memory, W = 10 for the slow
  memory.

Word rates:

* Handshaken fast transfers: one word per 3 clocks per edge.
* Slow transfers: one word per 12 clocks.
* Pipelined fast writes overlap with the master's edges.

### Status (SS) returned with DK

| SS | When |
|----|------|
| 0 | normal |
| 2 | the block-transfer word at which the data space wraps around (end of block) |
| 6 | parity error on a word written to CSR space |
| 7 | parity error on a word written to data space; invalid IA; write to the other port's CSRs |

A parity error also raises PE, suppresses the write, and advances the error counter if it is
enabled. With parity generation on (CSR#2 bit 1), read data carry even parity on PA.

## The data space

The two memories share one address space. The *memory address register* (MAR) holds 14 bits,
and the bank bit A14 sits beside it. Two bits of CSR#2 choose the organisation:

| CSR#2 bit 3 (slow off) | bit 2 (fast off) | Organisation | Block run wraps |
|---|---|---|---|
| 0 | 0 | slow 0..16383, then fast 0..255 | after fast word 255, back to slow 0 |
| 1 | 0 | fast memory only (A14 ignored) | after fast word 255 |
| x | 1 | slow memory only (A14 ignored) | after slow word 16383 |

The address wraps around in every organisation. The word at which it wraps is answered with
SS=2, so a master learns that it ran off the end.

A data-space access uses the MAR. The exception is the first access after a new IA, which
loads the MAR from the IA. After the access, a block transfer advances the MAR.

The access pulse follows the same table. CSR accesses are always fast. Data-space accesses are
fast or slow depending on which memory the access goes to.

Each port has its own CSR#2. The memory-off bits that apply are those of the port that
currently owns the data space.

## Sharing between the ports

* **Data space.** A port asks for the data space from the moment it is attached there until AS
  falls. The first port to ask owns it for that whole time. The other port can still attach,
  but its transfers wait, and it shows WT until the owner lets go. If both ports ask in the
  same clock, the crate port wins.
* **Reading the other port's CSRs.** Each port owns its own CSR space and can read the other
  port's registers at any time. It does so through IA bit 2.
* **The CSR#3 exception.** On the crate port, the module address is not a plain register: it
  lives in the address/data interface slices that also carry the crate AD lines. So the cable
  port may read the crate port's CSR#3 only while the crate port is idle. Until then it waits
  with WT. The crate port shows the register only in a clock where it is idle and no address
  cycle starts.

## CSR registers

| Reg | Read | Write |
|-----|------|-------|
| #0 | 31..16 = ID `0018`; bit 6 = error counter on; bit 1 = logical addressing on | bit 1 sets LA enable, bit 17 or bit 30 clears it; bit 6 sets the counter enable, bit 22 clears it |
| #1 | error counter in 7..0 | loads the counter |
| #2 | bits 3..0: slow off, fast off, parity generate, parity check | a one in bit n sets bit n; a one in bit n+16 clears it |
| #3 | module address in 31..16 | loads it |

Where a set bit and a clear bit are written together, the clear wins. The error counter
counts only while enabled and stops at 255. Reset clears everything: the module then answers
only to geographic addressing, both memories are on, and parity is ignored.

## The address/data interface slice (`fma601_adi`)

The crate port uses four 8-bit slices, modelled on a commercial ECL interface chip. Each slice
has an internal bus linking:

* the AD buffer;
* a parity tree;
* an address latch;
* the logical-address register R#3;
* a logical comparator (latch against R#3) and a geographic comparator (latch against GA);
* a LA/GA result multiplexer;
* a user-side buffer with optional inversion.

In this design:

* Only the two upper slices hold the module address and take part in the logical comparison
  (`la_width_ctrl`).
* Only the lowest slice's geographic result is used.
* The crate port's read data go out through the slices.

The chip's internal bus priority and the encoding of its width control are not published.
Those choices are this design's own.

## Display unit

The display watches the segment chosen by `disp_bus_sel`. It fires on:

* the timing signals enabled in `disp_trig_mask` (AG, AS, AK, DS, DK);
* the edges enabled by `disp_edge_p` (leading) and `disp_edge_n` (trailing);
* only while `disp_en_wt_gen` is set.

When it fires, the display:

* captures the full segment state (timing lines, MS, SS, AD) into a latch;
* sets a flip-flop that lights the IWT lamp;
* asserts WT on the watched segment only.

The flip-flop is cleared by the push button (`disp_man_reset`). In automatic mode it is
cleared `disp_auto_delay` clocks after it was set. The delay is limited to 1 s
(`MAX_AUTO_DELAY` = 10^8 clocks).

The LEDs show either the live segment or the latch (`disp_led_sel`). The display sees a
segment as the master's lines, the AG input and this module's own responses. Other slaves'
responses are not wired in.

## Where this RTL departs from, or adds to, the published design

* **Synchronous sampling.** The original is asynchronous ECL. Here DS-to-DK takes 2 + W
  clocks instead of the raw memory time.
* **Edge queue.** The four-deep queue of DS edges, which carries pipelined transfers, is this
  design's mechanism.
* **Unpublished choices**, all made here:
  * the MS encodings of address and data cycles beyond "block transfer = MS0";
  * the IA bit that selects the other port's CSRs;
  * refusing writes to the other port's CSRs with SS=7;
  * how broadcasts and address parity errors are handled;
  * even parity;
  * the reset values;
  * the saturating error counter;
  * the tie rule of the contention logic;
  * the LED contents.
* **Module address width.** The module address is 16 bits (31..16), as in the CSR#3 layout.
  The data-space address layout shows the field reaching down to bit 15; here bit 15 of a
  logical data-space address must be 0.
* **Access pulse generators.** The original describes one access pulse generator. Here each
  port has its own, and both follow the same width table.
* **Memory parts.** The memory chips are replaced by synchronous RAM arrays. Their access
  time lives only in the pulse width.

## Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and stops
itself with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/fb_pkg.sv tb/tb_fb_dpm_top.sv --top-module tb_fb_dpm_top
./obj_dir/Vtb_fb_dpm_top
```

`tb/tb_fb_dpm_top.sv` runs the whole module at its default sizes in a few seconds. It uses
`tb/fb_master_bfm.sv`, a master model for each segment. The scenario:

1. Set up both ports through their CSRs.
2. Fill all 16,640 words from the crate side with one block transfer, which ends with SS=2.
3. Read them back from the cable side, checking the data and PA.
4. Make the two ports contend for the data space.
5. Have the cable port read the crate port's CSR#3 while the crate port is busy.
6. Switch each memory off in turn.
7. Inject parity errors in both spaces, and write an invalid IA.
8. Run a pipelined burst and a broadcast.
9. Freeze the cable segment with the display, then release it by hand and automatically.

The testbench counts each of these mechanisms and fails if any never happened. Every other
block has its own testbench, `tb/tb_<module>.sv`, which compares against an independent
reference model or hand-computed values.

To change sizes or timing, override the top's parameters: `FAST_WORDS`, `SLOW_WORDS`,
`FAST_W`, `SLOW_W`, `FIFO_DEPTH` and `MAX_AUTO_DELAY`.

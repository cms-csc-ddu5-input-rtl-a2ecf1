# DDU input controller: eight DMB fibers into two event-ordered streams

In the CMS cathode-strip-chamber readout, each Detector Unit (DDU) collects
the event fragments that the chamber boards (DMBs) send over optical fibers.
This design is the input-controller FPGA of the DDU. It takes eight fibers
and buffers each fiber's data for as long as an event takes to arrive. Then,
for every Level-1 Accept (L1A), it writes the fragments out one fiber after
another, as two 36-bit streams for the DDU's external FIFOs.

The core problem is that fragment sizes vary a lot. A one-board fragment
with one cathode board is about 800 16-bit words. A large one is several
thousand. Giving each fiber a fixed buffer would waste most of the memory.
So each group of four fibers shares a pool of 22 FIFOs, and a fiber borrows
another FIFO whenever its current one gets nearly full. The reader follows
each fiber's chain of FIFOs in order and hands every FIFO back as soon as it
has been drained.

```
 fibers 0-3 ─► in_half 0 ─► OUT0 (36 bit, OWEN[0])       reset_stretch, bxn_counter,
 fibers 4-7 ─► in_half 1 ─► OUT1 (36 bit, OWEN[1])       fiber_led x8, jtag_instr_decode,
                                                          jtag_status_sr
 in_half:  in_unit x4 ─► fifo_slot x22 (each: mux4_9b_e x2 + sfifo18_36)
                         ▲ mem_ctrl assigns/releases        │
                         └──────────── rd_ctrl (+ l1a_fifo) ◄┘
```

The whole design runs on one clock (40 MHz in the source system). All of
its state is reset synchronously by the stretched reset. The exceptions are
the 18-bit output register of the input unit and the JTAG register, which
clear asynchronously.

## Words, FILL and the LAST flag

The fibers carry 16-bit words. Everything stored in a FIFO is an 18-bit
half-word `{LAST, FILL, data[15:0]}`, and the reader always takes two at a
time as one 36-bit word. In the 36-bit word, bits 16 and 34 are the FILL
flags and bits 17 and 35 are the LAST flags. The first half written sits in
bits 17:0.

`in_unit` (one per fiber) does the following:

- **Filtering.** It takes a word only when the receiver marks it valid, with
  no receive error and no K character. The idle pattern (K28.5 followed by
  D16.2, 0xBC50) and words with a receive error are dropped. A dropped error
  word sets a sticky per-fiber flag.
- **Pairing and FILL.** Words are paired into 36-bit units. If a lower half
  is waiting and a clock brings no data word, the pair is completed with a
  FILL word: 0xC000 with the FILL flag set. This keeps a FIFO from being left
  with half a 36-bit word. A real data word in the same clock takes priority
  over the fill.
- **LAST.** A DMB fragment ends with four trailer words whose top nibble is
  0xE ("E-codes"). Each finished pair is held until the next pair is known.
  The upper half of a pair gets LAST when:
  - at least 3 of the 4 halves of this pair and the next one are E-codes,
    and
  - the previous pair did not already get LAST.

  In the normal case LAST therefore falls on the word that holds the second
  E-code. The rule still finds the end if any single E-word is lost or
  corrupted. FILL words never count as E-codes.
- **Output timing.** A pair is written as two 18-bit writes on consecutive
  clocks, lower half first, through the registered selector `mux2_18b_reg`.
  `BND_OK` is low only in the clock that writes a lower half. The memory
  controller moves a fiber to a new FIFO only when `BND_OK` is high, so a
  36-bit word is never split across two FIFOs.

## The FIFO pool and the memory controller

`sfifo18_36` is written 18 bits at a time and read 36 bits at a time, with a
first-word-fall-through output:

- **Occupancy.** Counted in half-words: a write alone adds 1, a read alone
  subtracts 2, and both together subtract 1.
- **EMPTY.** Set when fewer than two halves are stored.
- **Almost full (AF).** Raised when 120 or fewer writes remain before full.
  The FIFO is 1024 halves, so AF starts at 904. The margin leaves the input
  unit time to finish its pair before it moves on.

`fifo_slot` wraps one FIFO with its write side:

- Each slot has a fixed address. When the memory controller strobes `ASF`
  with that address, the slot records which fiber now owns it.
- It then writes that fiber's words, selected through two 9-bit 4-to-1 bus
  muxes (`mux4_9b_e`).
- It stops writing when the owner moves on (`FNEXT`). Its data stay until
  they are read.

`mem_ctrl` manages the 22 slots of one half:

- **Corners.** The slots form two corners of 11. Fibers 0 and 1 prefer
  corner 0 and fibers 2 and 3 prefer corner 1.
- **Search direction.** In each corner one fiber searches upward from the
  lowest address and the other downward from the highest. The two fibers
  therefore rarely want the same slot. A fiber whose preferred corner is full
  searches the other corner.
- **One assignment per clock.** A fiber needs a FIFO when it has none, or
  when its FIFO is almost full and `BND_OK` is high. The lowest-numbered
  needy fiber is served first. `ASF`, the new address and `FNEXT` for that
  fiber all take effect at the same edge.
- **Chains.** For every fiber the controller keeps, in order, the list of
  slots holding its data. The oldest slot (`HEAD`) is the one the reader
  reads.
- **Release.** When the head slot is empty and the fiber already writes to a
  later slot, the reader releases the head (`REL`) and the slot becomes free.
- **Free counts.** `NFREE` counts free slots. `MINFREE` records the lowest
  `NFREE` seen since reset.

## Read control, the L1A FIFO and timeouts

`rd_ctrl` (one per half) works through one event at a time:

- **L1A FIFO.** Every L1A pushes the running 24-bit event number into
  `l1a_fifo`: 8192 entries, almost full at 7680.
- **Fiber order.** For each entry the controller visits fibers 0-3 in order.
  A fiber whose `FOK` bit is low is skipped.
- **Start timeout.** The controller waits for the fiber's head FIFO to show
  data. If nothing arrives within 128 clocks (256 in calibration mode), the
  fiber gets a start timeout and is skipped.
- **Copying.** 36-bit words are copied to the output until a word with a
  LAST flag. Because LAST marks the second E-code, one more word (the rest of
  the trailer) is copied after it, and then the next fiber starts.
- **End timeouts.** If LAST does not come within 18945 clocks (about 236 µs
  at 80 MHz), the fiber is abandoned. The flag is *end-wait* if its FIFO was
  empty at that moment and *end-active* if data were still coming.
- **Event end.** After fiber 3 the L1A entry is popped and `EVT_DONE` pulses.
- **Back-pressure.** While the external FIFO reports almost full (`EXT_PAF`),
  reading stops and the end timer holds.

Timeout flags stay set until reset. A fiber read empty in mid-event simply
waits. Its head FIFO is released only once the fiber has moved to a newer
FIFO.

## JTAG status, reset, bunch counter and LEDs

- **JTAG instructions.** `jtag_instr_decode` maps a 5-bit user opcode to a
  status value and its width. The values include:
  - the L1A numbers of the two readers
  - the 32-bit status word, or either 16-bit half of it
  - fiber-OK and fiber-error lists
  - the three timeout lists
  - the RX-error list
  - the minimum free FIFOs
  - the almost-full, full and not-ready lists
  - the number of FIFOs held by each of fibers 0-2

  Opcode 1 requests an FPGA reset, which goes through the same stretcher as
  the external reset.
- **JTAG register.** `jtag_status_sr` captures the selected value while
  `LSHFT` is low and shifts it out on `TDO`, bit 0 first, while `LSHFT` is
  high. It is enabled only when `DVCENB` and `SEL2` are both high.
- **Reset.** `reset_stretch` holds reset for 16 clocks after the raw reset
  request ends.
- **Bunch counter.** `bxn_counter` counts bunch crossings 0 to 923, which is
  one SPS/LHC orbit. It clears on BC0 or after 923.
- **LEDs.** `fiber_led` runs two dividers: a 2.5 MHz slow enable
  (clock / 16) and a pulse of about 38 Hz after a further 2^16. For each
  fiber:
  - the link LED is steady when the link is present and OK, blinks when it
    is present but not OK, and is off when there is no link;
  - the data LED lights while words arrive and is held long enough to be
    seen.

Status word bits:

| bit | meaning |
|---|---|
| 0 | any start timeout |
| 1 | any end-wait timeout |
| 2 | any end-active timeout |
| 3 | an L1A FIFO almost full |
| 4 | an L1A FIFO full |
| 5 | a FIFO pool has no free FIFO |
| 6 | a fiber is present but not OK |
| 7 | an external FIFO is almost full |
| 8 | a fiber-OK bit has changed since reset |
| 11 | an RX-error word was dropped |
| 30 | a FILL word was inserted |
| 31 | clock-manager (DLL) error |

The ready lists have fixed layouts:

- `NRDY[7:0]`: the fiber has nothing to read. `NRDY[8]` and `NRDY[9]`: L1A
  FIFO 0 or 1 is empty.
- `FAF[1:0]`: pool 0 or 1 has at most one free FIFO. `FAF[3:2]`: L1A FIFO 0
  or 1 is almost full. `FAF[5:4]`: external FIFO 0 or 1 is almost full.
- `FF[7:0]`: the fiber's current FIFO is full. `FF[9:8]`: L1A FIFO 0 or 1 is
  full. `FF[11:10]`: external FIFO 0 or 1 is full.

## Capacity

These figures are at the default sizes. One 64-bit DDU word is four 16-bit
fiber words.

| Event (one CFEB = one cathode front-end board, 8 time samples) | per fiber | FIFOs used |
|---|---|---|
| one DMB, 1 CFEB (DDU word count 210) | 816 halves | 1 |
| one DMB, 2 CFEB (410) | 1616 halves | 2 |
| 8 DMBs, 1 CFEB each (1638) | 816 halves | 8 of 44 |
| 5 CFEBs on every fiber | 4016 halves | 20 of 22 per half |
| largest DDU event (< 30070 words) | up to ~8000 halves | more than the pool |

So a full event of the largest size fits only if it is read out while it
arrives. Nothing stops the DMBs from sending, so such an event overruns the
pool.

## Where this design departs from the source, and what it leaves out

The source design is a schematic design for a Virtex FPGA. This RTL keeps
its structure, sizes, codes and timeouts. Where the source leaves something
open, this design makes its own choices:

- **FNEXT source.** `FNEXT` comes from the memory controller, in the same
  clock as the new assignment. In the source it comes from the input units.
  The input unit's `BND_OK` signal replaces that handshake.
- **LAST rule.** The "three of four E-codes in two pairs" rule is one reading
  of the source's LAST tables. The case where the first E-word is lost and
  LAST should fall on a lower half is not built. The end is then found one
  pair later.
- **Clocks.** Both timeouts count on the one design clock. The source runs
  the end timer at 80 MHz.
- **Status layout.** Only bits 11, 30 and 31 of the status word come from
  the source. The other bits are this design's choice. So are the
  fiber-error summary (opcode 6), the packing of the FIFO counts (opcode 28)
  and the choice where the source's opcode list gives one number two
  meanings.
- **Fiber-OK change.** The source calls a change of a fiber-OK bit an
  error that needs a reset. Here it sets status bit 8 until the next reset.
- **JTAG shift direction.** The direction in which the JTAG register shifts
  is this design's choice.

Not built:

- the Rocket I/O receivers, the clock manager and its lock sequencing (they
  are vendor parts; their signals are ports);
- the DMB consistency checks: L1A-number mismatch, stuck buffer, lost in
  event, DMB error and warning words, and the C-code status;
- the diagnostic trap and the JTAG opcodes that read those checks;
- the filtering that keeps only the first two 8-code words;
- any back-pressure path to the DMBs;
- the fake-L1A pass-through mode and the logic-analyser/LED display modes.

## Files

`rtl/`:

- `ddu_in_pkg.sv` holds the shared types and codes.
- `in5ctrl.sv` is the top. `in_half.sv` is one group of four fibers.
- The other files are the blocks named above.

`tb/`:

- Each block has a self-checking testbench `tb_<block>.sv`.
- `tb_ddu_pkg.sv` builds DMB events and the 36-bit words expected for them.
  It is used by the two multi-fiber tests.
- `tb_in_half.sv` and `tb_in5ctrl.sv` run events end to end at reduced sizes
  (64-half FIFOs, short timeouts). They also make each mechanism happen and
  count it: FIFO switch and release, FILL, every trailer-damage case, masked
  fibers, all timeouts, back-pressure, L1A almost full, JTAG readout and
  reset, BXN wrap, LEDs and the reset stretch.
- `tb_in5ctrl_full.sv` runs one eight-fiber event at the default sizes.
- `tb_in5ctrl_workloads.sv` runs the event sizes of the capacity table
  (1 to 8 DMBs, 1, 2 or 5 CFEBs) at the default sizes. Reading is held off
  until each event has fully arrived, so the FIFO pool must hold the whole
  event. With 5 CFEBs on all eight fibers, 20 of the 22 FIFOs of each half
  are in use at the peak.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl rtl/ddu_in_pkg.sv tb/tb_sfifo18_36.sv --top-module tb_sfifo18_36
./obj_dir/Vtb_sfifo18_36
```

The tests that use events (`tb_in_half`, `tb_in5ctrl`, `tb_in5ctrl_full`)
need the event package too:

```
verilator --binary --timing -Irtl rtl/ddu_in_pkg.sv tb/tb_ddu_pkg.sv tb/tb_in5ctrl.sv --top-module tb_in5ctrl
./obj_dir/Vtb_in5ctrl
```

Other modules are found through `-Irtl` as `rtl/<name>.sv`; add
`-y rtl +libext+.sv` if your Verilator does not search the include path for
modules.

## Parameters of `in5ctrl`

| parameter | default | meaning |
|---|---|---|
| NFIFO | 22 | FIFOs per half (two corners of NFIFO/2) |
| DEPTH18 | 1024 | FIFO depth in 18-bit halves |
| AF_MARGIN | 120 | FIFO almost full when this many writes remain |
| START_TO / CAL_TO | 128 / 256 | start timeout, normal / calibration (clocks) |
| DONE_TO | 18945 | end-of-fiber timeout (clocks) |
| L1A_DEPTH / L1A_AF | 8192 / 7680 | L1A FIFO depth and almost-full level |
| RST_HOLD | 16 | reset stretch (clocks) |
| BXN_MAX | 923 | last bunch-crossing number |
| LED_SLOW_DIV, LED_BCLK_BITS, LED_BLINK_BITS | 16, 16, 4 | LED dividers |

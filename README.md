# Header matching engine for a four-port IPv6/IPv4 router card

A router card extracts the interesting fields of every packet header (MAC
addresses, VLAN, IP addresses, ports, error flags) into a fixed-format record,
the *Unified-header*. This engine decides, for each Unified-header, which
*editing program* the packet gets: how it is changed and where it is sent. That
includes "to the host's operating system" for anything the hardware does not
handle. It does this by running a small *look-up program*. The program is a
decision tree. Its first levels are searched in a ternary CAM (content
addressable memory), and its lower levels are compare-and-branch instructions
held in an SRAM.

The card has four network interfaces. Each has its own *look-up processor*
(`lup`), and the four share one external CAM and one external SRAM. The hard
part of the design is how they share these memories. The time-slot scheme
described below gives every processor its SRAM slot. It never lets two
processors load the CAM at once. It also keeps every processor's wait for the
CAM at 120 ns or less.

```
 extractor 0..3 ──► uh_buffer 0..3 ──► lup 0..3 ──► output_queue ──► replicator
                                      │   ▲
                      cam_arbiter ◄───┘   └─── sram_slot_mux
                           │                       │
                       external CAM           external SRAM
                    (4K x 272, ~80 ns)      (36-bit words, 10 ns)
                 slot_timer: 10 ns slots modulo 4, shared by all
```

## The look-up program

Each instruction is a 36-bit word. Its upper 4 bits are the operation, and the
lower 32 bits are its arguments, which is why the SRAM's parity bits are used as
data. There are three kinds of instruction:

| kind | opcode | arguments | effect |
|---|---|---|---|
| EXE Queue | `0x0` | `[31:0]` Queue | Writes (packet identification, Queue) to the output queue, frees the header and starts on the next header. |
| CAM Step, List | `0x1` | `[26:24]` Step code, `[18:16]` CAM mask register, `[15:0]` List | Sends the header words chosen by the List bit map to the CAM. On a match it continues at SRAM word `0x40000 + row`; on a miss, at PC + Step. |
| compare | `0x8` EQ, `0x9` NE, `0xA` GT, `0xB` LT, `0xC` GE, `0xD` LE | `[31:27]` register, `[26:24]` Step code, `[17:16]` byte mask, `[15:0]` constant | Compares (register AND mask) with the constant, unsigned. If true it continues at PC + Step, otherwise at PC + 1. |

- Steps come from a fixed set so that no general adder is needed: Step =
  2^(code+1), which gives 2, 4, ..., 256 words forward.
- The mask has one bit per byte of the 16-bit register (bit 1 is the upper
  byte). A compare can therefore test a whole register or either half of it.
- Any other opcode falls through to PC + 1.
- `hm_pkg` has the constructors `mk_exe`, `mk_cam` and `mk_cmp`, and the
  function `cmp_true`.

Every header starts with a CAM step. Its instruction comes from the
configuration input `cfg_root`, not from the SRAM, and it counts as the word at
address 0. A root miss therefore continues at 0 + Step.

A processor leaving the idle state goes straight to loading the CAM. It does
not spend an SRAM slot fetching the root instruction first.

The CAM reports the lowest-numbered matching row, so more specific entries must
sit at lower rows. The continuation of row *r* is the single SRAM word
`0x40000 + r`. A row whose continuation needs more than one word must leave the
rows after it unused, or must branch away at once.

### CAM key format

The 272-bit key goes out in eight beats of 34 bits on `DQ`:

| bits | contents |
|---|---|
| `DQ[31:0]` | one 32-bit header word; the List bits are taken from the lowest upwards |
| `DQ[32]` | 1 for a real word, 0 for a padding beat |
| `DQ[33]` | the CAM half this header uses |

- A key holds at most 8 words. If List selects more than 8, only the 8
  lowest-numbered words are used.
- Padding beats carry zero data. The marker bit `DQ[32]` lets CAM rows tell
  keys of different lengths apart. For example, a second-level key on one word
  never matches a first-level row that expects two words.

### Two CAM halves

Software loads a new table into the unused half of the CAM, then flips
`cfg_bank`. Each processor latches `cfg_bank` when it starts a header and sends
it as `DQ[33]`. A header is therefore matched entirely in one half, even if the
switch happens while it is being processed. The SRAM words belonging to each
half are told apart by the CAM row index. The upper 2K rows are the second half
if software places them there.

## Sharing the CAM and the SRAM

Time is divided into 10 ns slots numbered 0..3, repeating (`slot_timer`). The
clock is 5 ns, so one slot is two cycles.

- **SRAM:** processor *k* owns slot *k*. Only processor *k* may address the
  SRAM in that slot (`sram_slot_mux`). The 36-bit word comes back as two 18-bit
  halves, the upper half first.
- **Rounds:** processor *k* changes its scheduling state only at the end of its
  own slot. Each state therefore lasts one round of four slots: slots
  k+1, k+2, k+3 and then k again. The last slot of every round is the
  processor's SRAM slot, so a fetch always ends a round.
- **CAM:** the round after processor *k*'s SRAM slot is its *CAM slot*. At the
  end of slot *k*, the processor may start loading the CAM in the next round,
  but only if no other processor is loading it at that moment (`cam_arbiter`:
  `CAMAck = CAMRq` in slot *k* while no load is in progress). Loading takes the
  whole round. The CAM then searches for two more rounds. During that time
  other processors may load their own keys, so searches overlap.

A processor moves through six states (`lup_state_e`):

| state | round spent doing |
|---|---|
| SLEEP | nothing; at the end of its slot it checks whether a header is ready |
| WAIT | wanted the CAM but it was busy; asks again every round |
| LOAD | sends eight key beats, one buffer word per cycle |
| LAT1 | CAM search running |
| LAT2 | CAM search running; takes the result; its SRAM slot fetches the next instruction from the CAM's row (hit) or from PC + Step (miss) |
| COMP | executes one instruction; its SRAM slot fetches the next one |

From SLEEP, from COMP after an EXE (when the next header is ready) and from COMP
on a CAM instruction, the processor goes to LOAD if the CAM was granted and to
WAIT if not.

In the worst case the other three processors each load in turn. A processor can
then wait three rounds, which is 12 slots or 120 ns. The testbenches measure
exactly that maximum.

Because LOAD rounds never overlap, the LAT2 rounds never overlap either, since
each comes two rounds after its LOAD. The CAM result (`MV`, `MF`, `CAMIdx`) can
therefore go to all processors at once: each one only accepts it during its own
LAT2.

### Inside a round (cycles 0..7, starting at slot k+1)

- **LOAD:** one word address per cycle goes to the buffer, and the data comes
  back one cycle later as a key beat on `DQ` with `OPV`. The first word is
  already read in cycle 7 of the round before, so the eight beats fill the
  round exactly.
- **LAT2:** `MV` is accepted in any cycle. The next address is formed in
  cycles 6–7.
- **COMP:**
  - cycle 0: buffer read of the compared register, or of the packet
    identification for EXE;
  - cycle 1: comparison, with both possible targets formed at the same time;
  - cycle 2: `REPWrite` and `Free` for EXE;
  - cycles 6–7: SRAM fetch of the next instruction.

Latencies from the first LOAD cycle to `REPWrite`:

| path | cycles |
|---|---|
| CAM step, then EXE | 3·8 + 2 = 26 |
| each further instruction | +8 (40 ns) |
| second CAM level, if granted at once | +3·8 = +24 |

Writes from different processors to the output queue fall in different slots
(cycle 2 of each processor's own round), so they never collide.

## Unified-header buffer (`uh_buffer`)

Each interface has a dual-port 512 x 32 memory holding four *sets*, one
Unified-header each, plus a 4-bit status register.

Layout inside a set:

| words | contents |
|---|---|
| `Adr[8:7]` | selects the set |
| 0..15 | the 32 16-bit header registers; register 2w is in bits [15:0] of word w and register 2w+1 in bits [31:16] |
| 16 | packet identification (DRAM block number), bits [15:0] |

The status bits interlock the two sides:

- The extractor writes a set only while its status bit is 0. Writes to a full
  set are dropped and trigger a warning assertion.
- The extractor raises `wr_done` when the whole header is written, which sets
  the bit.
- The processor uses a set only while its bit is 1 (`Ready`), and clears it
  with `Free` when its EXE is done.

Both sides go through the sets in order 0, 1, 2, 3. `Ready` and `Free` refer to
the set selected by the processor's current read address.

## Output queue (`output_queue`)

This is a FIFO of `DEPTH` (16) entries. Each entry holds the 16-bit packet
identification, the 32-bit Queue value (pointer to the editing program) and the
source interface. The replicator reads it with a valid/ready handshake.

The processors have no back-pressure input. A write into a full queue is
therefore dropped and counted in `oq_dropped`, and it raises the sticky
`oq_overflow` flag.

## Files

| file | contents |
|---|---|
| `rtl/hm_pkg.sv` | constants, instruction encoding, state enum, queue entry struct, helper functions |
| `rtl/slot_timer.sv` | slot/phase counter |
| `rtl/uh_buffer.sv` | Unified-header buffer with status register |
| `rtl/lup.sv` | look-up processor (parameter `RANK` = its slot) |
| `rtl/cam_arbiter.sv` | CAM grant rule and CAM pin multiplexer |
| `rtl/sram_slot_mux.sv` | SRAM slot multiplexer |
| `rtl/output_queue.sv` | output FIFO |
| `rtl/combo6_hm.sv` | top: four buffers and processors, arbiter, multiplexer, queue |
| `tb/cam_model.sv`, `tb/sram_model.sv` | behavioural models of the external CAM (first match wins, 8 global mask registers, result 80 ns after the first key beat) and SRAM |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

The top's ports are plain signals and packed arrays:

- `ext_*`: the extractors' write ports;
- `cam_*`: the CAM pins;
- `sram_a` / `sram_q`: the SRAM;
- `rep_*`: the output queue;
- `cfg_root`, `cfg_bank`: configuration from the host;
- status outputs.

The host interface that would load the CAM and SRAM and set the configuration is
not part of this RTL.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself (it has
a watchdog). For example, the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/hm_pkg.sv tb/tb_combo6_hm.sv \
  --top-module tb_combo6_hm -o sim
./obj_dir/sim
```

Replace `tb_combo6_hm` with `tb_lup`, `tb_uh_buffer`, `tb_cam_arbiter`,
`tb_sram_slot_mux`, `tb_output_queue` or `tb_slot_timer` to run the others. All
of them take under a second.

What the tests establish:

- **`tb_combo6_hm`** runs the top at its default parameters. The program in it
  has a root CAM step on two words, a chain that uses all six comparisons, a
  duplicate CAM row that must lose, a row in the second CAM half and a default
  path. Its second CAM level is a small routing table on one word. The table
  holds 192.168.1/24, 192.168.0/24, 192.168/16 and 192/8, with longer prefixes
  in lower rows. A global mask register drops the last byte, and per-row
  don't-care bits shorten the prefix further. An address under both
  192.168.1/24 and 192.168/16 must get the /24 answer, because the first
  matching row wins.
  - Four extractors send 840 random headers, and every output is
    compared with a reference computed from the header fields.
  - In one phase the CAM half is flipped every 97 cycles while headers flow.
    Each answer must match one half or the other. A header matched partly in
    each half gives an answer that matches neither. Both outcomes must occur.
    A processor that sent the live `cfg_bank` instead of its latched copy
    fails this phase.
  - On an idle engine it checks the exact cycle counts of four paths.
  - It counts that each mechanism happened: CAM wait, hit, miss, multiple
    match, second level, each route of the table, every comparison both true
    and false, a new header straight after EXE, an extractor stalled by a full
    buffer, the CAM-half switch and queue overflow.
  - It checks that no two processors load the CAM at once and that no CAM wait
    exceeds 24 cycles (120 ns). The maximum seen is exactly 24.
- **`tb_cam_arbiter`** first replays a worked example of the scheme.
  Processor 0 loads in slots 1–4. Processor 3 asks from slot 3 on and gets the
  CAM in slot 8. Processor 1 asks in slot 9 while processor 3 loads, and gets
  it in slot 14. The testbench then drives the arbiter with four random
  processes that follow the six-state scheme. It checks every grant against an
  independent reference, and checks the 12-slot bound (reached).
- **`tb_lup`** runs one processor with random grant refusals. It checks
  outputs, latencies and the CAM-half latch.
- **Other unit testbenches:** they check the buffer interlock, the SRAM
  half-word order, and the FIFO order and overflow count.

`combo6_hm` asserts the two properties of the sharing scheme: at most one
processor is in LOAD, and a processor entering WAIT reaches LOAD within 24
cycles. Further assertions in the RTL check the handshake rules:

- no write into a full set;
- no Free of an empty set;
- only the owner drives the CAM;
- SRAM data only in the processor's own slot;
- at most one queue write per cycle.

## Where this design makes its own choices

The following come from the source description of the engine:

- the division into blocks;
- the buffer's four sets and status-bit protocol;
- the three instruction kinds and the 36-bit word;
- the comparison semantics (jump by Step if true, else next word);
- the six-state slot scheme with its grant rule;
- the 272-bit, 4K-row CAM and the 80 ns / 10 ns memory timings;
- the signal names and widths of the processor's interface;
- the two-half CAM update.

The following were chosen here:

- **Clock:** the 5 ns clock with two cycles per slot, and the cycle plan inside
  a round.
- **Encoding:** the instruction field layout, the opcode values, the step set
  {2, 4, ..., 256} and the byte-lane form of the mask.
- **CAM step:**
  - the rule that a miss continues at PC + Step, while a hit continues at SRAM
    word `0x40000 + row`;
  - the `CAMIdx` input that carries the row number back to the processor. The
    documented interface has match flags but no index, so it was added;
  - the use of `cfg_root` for the first level.
- **Key:** the marker and half bits in each key beat (`DQ[33:32]`), and
  ignoring List bits beyond the eighth.
- **Buffer:** the layout (set in `Adr[8:7]`, identification in word 16), and
  `Ready`/`Free` acting on the addressed set.
- **Output queue:** its depth, source tag, valid/ready side and drop-on-overflow.
  The documented processor interface has no back-pressure.
- **Other:** `MM` (multiple match) is read but not used, because the CAM
  already reports the first matching row; undefined opcodes fall through to the
  next word.

Not included:

- the external CAM and SRAM chips (behavioural models only);
- the header field extractors;
- the packet replicator and editing engine;
- the host (PCI) path that uploads programs;
- the block called "scheduler" in the system diagram, which is not specified
  beyond its name. The slot scheme above covers the scheduling that is
  specified.

Also not modelled:

- the SRAM's host write port;
- timing of the CAM's own update cycles;
- any protection against a program that loops (jumps are forward only, but
  chains can be long).

# A programmable protocol processor for network reception

This is RTL for the fast path of a network terminal's protocol processor: the
hardware that receives Ethernet frames at line rate, checks and classifies them
while they stream in, and decides for each frame whether to drop it, hand it to
the host, or keep it for the control software. Nothing is stored and then parsed.
Every received word passes once through a short chain of registers. Small fixed
units, the *functional pages* (FPs), look at the words as they go by. A tiny
programmable controller tells each unit when to look and reads back its flags.
A general-purpose micro controller runs the slow, control-heavy part of the
protocols (connection set-up, time-outs, reassembly bookkeeping). It is not part
of this RTL; its side of every interface is a set of top-level ports.

The design has four parts:

| part | module(s) | job |
|---|---|---|
| input buffer chain | `input_buffer_chain`, `gmii_rx`, `mii_par_fp` | turns the GMII byte stream (or MII nibbles) into 32-bit words and moves them through a 16-stage flip-flop chain |
| functional pages | `crc_fp`, `xac_fp` (x2), `checksum_fp` (x2), `length_counter_fp` (x2) | CRC check, extract-and-compare, Internet checksum and length counting, all at one word per clock |
| counter and controller (C&C) | `cc` | a programmable controller that starts and stops the FPs, branches on their flags and accepts or discards each frame |
| control memory access accelerator (CMAA) | `cmaa`, `plue`, `slue`, `cam`, `mem_buf_gen`, `control_memory` | finds a frame's reassembly buffer and its connection in CAMs within a few clocks, and shares the control memory with the micro controller |

`hw_timer` is a hardware timer for the micro controller's time-outs. `ppp_top`
wires everything together. `ppp_pkg` holds the shared types, the FP and flag
numbering, and the C&C and CMAA instruction encodings.

## How a frame moves through the design

1. **Reception.** `gmii_rx` waits for the preamble and the `0xD5` delimiter. It
   then packs bytes into words, first byte in bits 31:24. Each word is a
   `strm_word_t` with `sof`, `eof`, a byte count (1..4) and the data. The
   interface supplies one byte on each clock where `rx_byte_en` is high. That
   lets the core clock run faster than the byte clock, so the C&C gets several
   instruction slots per word. In MII mode, `mii_par_fp` first pairs nibbles
   (low nibble first) into bytes.
2. **Chain.** A new word enters stage 0 (a *push*) and the chain shifts by one.
   So a word stays in each stage for a whole word time. Every FP takes its input
   from the word being pushed or from stage 0. The word that falls out of the
   last stage is the delivered payload.
3. **FPs and the C&C.** The C&C program waits for a given word number
   (`WAITW`). It then fires FP start strobes, enables FPs for a span of words,
   and reads flags and results. Because the chain holds each word for four or
   more clocks, the program has time to act between two words.
4. **CMAA.** For IP packets the program sends `NEW_PKT` with the IP
   identification. It then loads the port and address words and starts the
   connection search. The CMAA returns *packet-ready* or *discard* (no such
   connection). It has already written the connection pointer into the packet's
   buffer in the control memory. The program can then read and write that buffer
   directly (`MEMW`/`MEMR`).
5. **Decision.** `ACCEPT` (with a destination: host memory or control memory) or
   `DISCARD` enters a two-entry decision queue, in frame order. When a frame's
   first word reaches the end of the chain, the decision at the head of the
   queue decides the whole frame:
   - accepted frames come out on `pay_valid`/`pay_word`/`pay_dest`;
   - discarded frames vanish.

   A frame whose first word arrives before its decision is dropped whole and
   counted on `late_drop`. The decision that comes later for it is thrown away.
   Between frames, once the waiting frame is decided and the C&C is back at
   `END`, the chain drains without new words (`flush`).

The chain length is set by how long the decision takes. With 16 stages, a
minimum-size 64-byte frame (16 words) fits entirely. The program may therefore
wait for the frame's CRC before it decides. For longer frames the program must
decide on the header alone, before word 17 arrives, or the chain must be made
deeper (`CHAIN_DEPTH`).

## The functional pages

* **`crc_fp`.** A configurable radix-16 CRC. Each step consumes 4 bits and
  works for any 16, 24 or 32-bit generator polynomial.
  - A shorter polynomial is kept left-aligned in the 32-bit register, so one
    datapath serves all three lengths.
  - Registers: polynomial, {bit order, length}, initial value, residue.
  - `crc_ok` compares the register with the residue. The running value is
    checked over the whole frame including its FCS; for Ethernet the residue
    is `0xC704DD7B`.
  - Reset values give the Ethernet CRC-32.
  - `STEPS` chains several 4-bit steps in one clock. The FP itself takes one
    step (4 bits per clock); the top uses 8 steps to keep up with 32 bits per
    clock.
* **`xac_fp`.** Extract and compare. On `start` it captures the stage-0 word
  into its vector register and compares it with a reference under a mask.
  - The comparator is four byte slices. Their results combine into four 8-bit,
    two 16-bit and one 32-bit comparison.
  - A mode/select register chooses which result drives the main `match` flag.
  - The captured vector is also a result that the C&C can read.
* **`checksum_fp`.** Two chained 16-bit one's-complement adders add both halves
  of each enabled word in one clock. Operand loads and adds handle three cases:
  - pseudo-header sums;
  - fields that start in the middle of a word;
  - partial sums kept between fragments.

  `ok` means the sum is `0xFFFF`.
* **`length_counter_fp`.** An accumulator and a stop register.
  - It counts bytes (or words) of enabled stream words, or adds an operand.
  - It raises `eq` when the accumulator equals the stop value, and `zero` when
    the accumulator is zero.

## The counter and controller

The C&C is a small one-instruction-per-clock machine. It has eight 32-bit
registers, a single ALU with a zero flag, and a program memory of 256
32-bit words that the micro controller writes. It also has two counters:
- the **word counter**, which counts the words of the current frame and drives
  `WAITW`;
- a **down counter**, driving `LDCNT`/`WAITC`.

The most unusual instruction is the **four-way jump** (`MJMP`). It picks one of
four jump-target registers with two selectable flags in one clock, so a
protocol dispatch (IPv4 / ARP / other) costs a single cycle.

Instruction word: `[31:27]` opcode, `[26:24]` rd, `[23:21]` ra, `[20:18]` rb,
`[15:0]` immediate.

| opcode | effect |
|---|---|
| `LDI`, `ADDI`, `ALU` | load immediate, add immediate, ALU op (`imm[2:0]`: add, sub, and, or, xor, >>16, low 16, <<16); `ALU`/`ADDI` set the zero flag |
| `JMP`, `BRF` | jump; branch if flag `imm[15:12]` equals `imm[11]` |
| `SETJT`, `MJMP` | set jump target `rd[1:0]`; four-way jump on flags `imm[7:4]`, `imm[3:0]` |
| `WAITW` | stall until the word counter reaches `imm[7:0]`, then fire FP starts `imm[15:8]` in that cycle (the awaited word is in stage 0) |
| `WAITF`, `LDCNT`, `WAITC` | wait for a flag value; load / wait for the down counter (`WAITC` takes count + 1 cycles) |
| `FPON`, `FPOFF`, `FPSTART`, `FPLD` | FP enables (effective in the instruction's own cycle), start strobes, operand load (`imm[1:0]`: 0 load, 1 stop value, 2 add) |
| `RDFP` | read an FP result (`ppp_pkg::SRC_*`) into a register |
| `CMAA` | issue CMAA instruction `imm[14:12]` with cfg `imm[7:0]`; dbus0 from result `imm[11:8]` or, for `SRC_REG0`, from register ra |
| `MEMW`, `MEMR` | write / read the current packet buffer at offset `imm[7:0]` (read data lands one cycle later: one delay slot) |
| `ACCEPT`, `DISCARD` | decide the frame (`imm[0]`: 0 host, 1 control memory); `DISCARD` also switches every FP off at once |
| `END` | wait for the first word of the next frame |

A program is a loop:
1. prepare the FPs for the next frame;
2. `END`;
3. work through the header word by word;
4. decide;
5. jump back.

`tb/ppp_top_tb.sv` contains a complete program for Ethernet, IPv4/UDP with
fragments, and ARP. It has a small two-pass assembler and is the best example
of how to program the C&C.

## The control memory access accelerator

The CMAA keeps per-packet and per-connection state in a shared control memory
(2^20 x 32 bit). It finds that state in a few clocks with two CAM-based look-up
engines:

* **PLUE** (primary look-up engine): 16 entries of 16-bit IP identification,
  each with a 20-bit packet-buffer pointer. A fragment whose identification is
  already there reuses that packet's buffer. Latency: an input register plus a
  two-cycle search, so the result appears three cycles after the request.
* **SLUE** (secondary look-up engine): 64 connection entries.
  - It is built from six CAMs: internal type (8 bits), source port, destination
    port, and the 128-bit address field split 64/32/32.
  - Every entry has one wildcard bit per CAM. One table can therefore hold full
    IPv4 connections, listening ports, IPv6 unicast by source only, and
    multicast by destination only.
  - A distinct internal type per pattern keeps matches unique, so no priority
    logic is needed. The encoder still takes the lowest hit.
  - The search takes `SLUE_CYCLES` clocks (3 by default, 4 also supported).

`cam` is the shared CAM row: valid bits, a whole-entry wildcard and a
find-first-free index for the write pointer.

Instructions (C&C or micro controller; the C&C has priority):

| instruction | buses | action |
|---|---|---|
| `NEW_PKT` | dbus0 = IP id, cfg = {fragmented, has layer-4 header, type} | start a packet; a fragment is searched in the PLUE |
| `LOAD_REG` | dbus0, cfg = word (0 ports, 1..4 address bits 127:96..31:0, 5 type) | load the connection key |
| `ID_CAM` | dbus0 = id, cfg = read/write/remove | direct PLUE access (e.g. remove when all fragments are in) |
| `PA_CAM` | key registers; write: dbus0 = {wild[5:0], pointer} | SLUE search, add or remove a connection |
| `RELEASE` | | packet done |
| `SET_BUF` | dbus1 = {stride[11:0], base}, cfg = buffer class | place the buffer area of one class |

The procedure is a small state machine: wait, look up, check connection, write,
ready, update. It runs as follows.
- `NEW_PKT` starts a PLUE search for a fragment.
- A hit gives the old buffer (*frag_old*). Otherwise the buffer generator hands
  out a new one, and a new fragment's identification is written into the PLUE.
- If the packet carries a layer-4 header, the key loads and the SLUE search run
  in parallel with this.
- On a connection hit, the pointer appears on dbus1 and is written into word 0
  of the packet buffer in the next cycle. A miss raises `discard`.
- Then comes *packet-ready*, and the C&C owns the buffer.
- `RELEASE` gives one update cycle. In it the buffer pointer advances and the
  CAM write indices move. The micro controller gets its *new packet* flag.

The micro controller reaches the control memory only while the CMAA is waiting
or updating (`uc_cm_gnt`).

Latency from `NEW_PKT` to packet-ready, with the key loads issued back to back:

| packet | 3-cycle SLUE | 4-cycle SLUE |
|---|---|---|
| IPv4, new packet (3 key words) | 9 | 10 |
| IPv4/IPv6, later fragment (no layer-4 header) | 4 | 4 |
| IPv6, new packet (5 key words) | 11 | 12 |
| unknown connection (IPv4) | 8 | 9 |

The first three rows are the target figures of the architecture. An unknown
connection has nothing to write, so it is reported one cycle earlier.

## Hardware timer

`hw_timer` keeps up to 16 events sorted by deadline in a shift-insert list. It
also has a free-running tick counter. Insert (id, delay) places an event in
order. The earliest event fires when due, and can be cancelled by id.
Comparisons are wrap-safe over half the 16-bit time range. Only the head entry
is compared against the time, so firing costs one comparator whatever the
number of entries.

## Top-level interface (`ppp_top`)

* Network side:
  - `mii_mode`, `rx_byte_en`;
  - GMII `gmii_rx_dv`/`gmii_rxd`;
  - MII `mii_rx_dv`/`mii_rxd`.
* Output side:
  - the `pay_*` payload stream;
  - `frame_accepted` / `frame_discarded` pulses;
  - `late_drop`.
* Micro controller side:
  - FP configuration (`cfg_page` 0 CRC, 1 XAC0, 2 XAC1, 3 LEN0, 4 LEN1; then
    `cfg_addr`, `cfg_wdata`);
  - C&C program load and `cc_run`;
  - CMAA instructions and the *new packet* flag;
  - control-memory port with grant;
  - timer (`tmr_*`).

Default parameters:

| parameter | value | what sets it |
|---|---|---|
| `CHAIN_DEPTH` | 16 | one 64-byte frame |
| `M` | 16 | PLUE entries |
| `N` | 64 | SLUE entries |
| `W` | 20 | pointer width and control-memory address width |
| `SLUE_CYCLES` | 3 | SLUE search clocks |
| `TIMERS` | 16 | timer events |

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops through a watchdog if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ppp_pkg.sv tb/ppp_top_tb.sv --top-module ppp_top_tb -o sim
./obj_dir/sim
```

(swap in any `tb/<block>_tb.sv`). The simulator is two-state, and the
testbenches reset or initialise everything they read.

What the testbenches check:

* `ppp_top_tb` runs the whole design at its default parameters. It plays the
  micro controller and sends 14 frames over GMII and MII:
  - good UDP frames;
  - wrong destination addresses;
  - a CRC error;
  - an ARP frame (delivered to the control memory);
  - an unknown Ethernet type;
  - an unknown connection;
  - a first fragment and a later fragment;
  - a bad IP header checksum;
  - a length mismatch;
  - a frame too long for its decision.

  Every delivered word is compared with the sent frame. The test counts each
  mechanism:
  - GMII and MII reception;
  - each branch of the four-way jump;
  - each discard reason;
  - PLUE hit, SLUE hit and SLUE miss;
  - delivery to host and to control memory;
  - late drop and chain drain;
  - the new-packet flag and a timer event.

  It fails if any mechanism never happens. It also checks the CMAA latencies
  (9 and 4 cycles) inside the running system.
* `cmaa_tb` runs a 3-cycle and a 4-cycle SLUE side by side and checks every
  latency in the table above.
* `cc_tb` runs a program that uses every instruction. It checks cycle counts,
  the four-way jump targets, and when each strobe fires.
* The unit testbenches compare each FP, the CAMs, the look-up engines, the buffer
  generator, the memory and the timer with reference models. Examples:
  - a bit-serial CRC reference for several polynomials, including Ethernet;
  - a software one's-complement sum;
  - a sorted event list.

## Departures and limitations

* The C&C's instruction set, its encoding, register count and program size, and
  the `MEMW`/`MEMR` access path are this design's own. The architecture fixes
  only the controller's makeup: an ALU, a register file, a flag decoder, a
  program counter, a four-way conditional jump and two counters.
* The C&C is meant to run on a faster clock than the rest of the processor. Here
  there is one clock, and the interface byte rate is set by `rx_byte_en`.
* The CAMs are flip-flop arrays with a compare per entry, not full-custom CAM
  cells. The multi-cycle SLUE search is modelled with a one-cycle compare
  followed by delay stages, so it meets the latency but not the area of a real
  CAM.
* The host interface (DMA, buffer management) is not designed. Accepted payload
  leaves as a word stream with a destination bit.
* The generic adder FP is not a separate unit. Its job of finding free CAM
  entries is done by the find-first-free logic in each CAM.
* The micro controller, its program memory and the PHY are outside this RTL.
* The buffer generator keeps four buffer areas (packet, connection, protocol,
  spare), and `SET_BUF` can place any of them. The CMAA draws only packet buffers
  from it. A connection's pointer is given by the program with the `PA_CAM`
  write, so nothing in this top draws connection buffers yet.
* Nothing here has been through timing analysis. The intended clock of about
  133 MHz (32 bits per clock, about 4.3 Gbit/s) is a target, not a measured
  result.
* Frames longer than the chain need a header-only decision. If a program waits
  for the CRC on such a frame, the frame is dropped as late. A frame-end abort
  of an already accepted frame is not provided.

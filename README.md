# KDC-I magnetic tape control unit in SystemVerilog

The KDC-I was a transistorised, decimal, digit-serial computer with a magnetic
drum main memory. This RTL models its tape system's control unit (TCU). The
TCU sits between the CPU and up to four tape handlers (MTHs) and has three
jobs:

- It turns a 50-word buffer of 12-digit decimal words into blocks of 8-bit
  tape characters, and back.
- It checks every bit of that traffic with character parity, channel parity,
  digit parity and decimal validity.
- It runs these long mechanical operations alongside the CPU. Once an
  instruction is accepted, the CPU goes on computing after 0.45 ms while the
  tape moves for about a tenth of a second.

The same 50-word core buffer (CB) is also the CPU's bank of fast registers,
addresses 4200-4249. Two extra instructions copy words between the CB and the
drum.

The unit is synthesizable RTL. The top is `kdc_tcu`. The CPU, the drum, the
tape handlers with their read amplifiers, and the control panel's switches and
lamps are outside the design: they are ports of the top. The testbenches use
a behavioural tape-handler model, `tb/mth_model.sv`, in their place.

## Time base

Every counter in the design counts **digit times**.

- A word of 12 decimal digits passes in about 52 µs, so one clock is about
  4.33 µs.
- Tape runs at 150 cm/s and is written at 9,600 characters/s. That is one
  character every 104 µs: two word times, or **24 clocks**.
- All the original machine's timings become clock counts at this rate. The table below
  shows the parameter defaults.

| parameter | default | meaning | origin |
|---|---|---|---|
| `CHAR_CLKS` | 24 | clocks per tape character (104 µs) | documented rate |
| `CPU_RELEASE_CLKS` | 104 | CPU released 0.45 ms after acceptance | documented |
| `START_CLKS`, `STOP_CLKS` | 1615 | 7 ms handler start and stop | documented |
| `RUNOUT_CLKS` | 3072 | tape kept running 2 cm (128 characters) after a block, so the head stops mid-gap | documented distance |
| `RWD_TCU_CLKS` | 4615 | TCU busy for 20 ms after a rewind starts | documented |
| `NOISE_COUNT` | 4 | a read pulse must last more than 4 clocks (17.4 µs) to count | documented |
| `BTR_DELAY` | 12 | transfer strobe 52 µs after the sprocket pulse | documented |
| `RELAY_CLKS` | 692 | 3 ms settle time of the handler-selection relays | chosen ("a few ms") |
| `DROP_CLKS` | 96 | a block read that goes silent for 4 characters is abandoned | chosen |

## What is on the tape

### Characters

Each tape character has eight channels:

```
bit   7   6   5   4   3   2   1   0
      H   G   F   E   D   C   B   A
      par 32  16  8  spr  4   2   1
```

- **D** is the sprocket. It is 1 in every character and is the read timing
  reference.
- **H** gives the character **odd** parity, with the sprocket counted.
- A decimal digit is F plus its 8-4-2-1 value on E, C, B and A.
- Six non-digit codes are used: `+`, `-`, word end, block-beginning,
  block-ending and no-effect. Their bit patterns are this design's choice,
  kept distinct from every digit code. They are constants in `kdc_tape_pkg` and can be changed there:
  - `+` and `-` use F with E and D set.
  - Word end, block-beginning and block-ending use G with D.
  - No-effect uses G, F and E with D.

### Blocks

One instruction writes one block: the 50 CB words plus a 4-digit block number
chosen by the program. A block is 666 characters, about 10.4 cm of tape:

| index | content |
|---|---|
| 0-3 | 4 block-beginning codes |
| 4 | no-effect |
| 5-8 | block number, most significant digit first |
| 9 | no-effect |
| 10-659 | 50 words × 13 characters: digit 12 (sign and overflow bits), digit 11, then 10 … 1, then word end |
| 660 | no-effect |
| 661 | channel parity code |
| 662-665 | 4 block-ending codes |

The channel parity code makes the number of 1s in **every channel** even over
characters 0-661. It needs no logic of its own, because of how the tape is
written:

- The eight NRZ write flip-flops toggle on every 1 written.
- At the end of the data, their state is therefore exactly the code that
  makes each channel even.
- Writing that state as a character returns every flip-flop to 0.

661 characters of odd parity come before the code, so the code itself also
has odd parity. The block length is arranged so that this holds.

The block number is written by the program, not pre-formatted. Any number can
appear anywhere on the tape, and block search (BLS) compares numbers as it
reads.

### Writing (`nrz_format`, `distributor_reg`, `core_addr_reg`)

Writing runs in this order:

1. The handler starts with its erase head on. If the tape is at the load
   point, writing waits until it has left it. Then 2 cm of tape is erased
   before the first character, as a lead-in.
2. The main control emits the block character by character, one every 24
   clocks. Each character is counted into the NRZ flip-flops, whose levels are
   the handler's write currents.
3. For the data characters, the distributor register (DR) holds one CB word.
   Before the word is sent, the DR checks its digit parity and its decimal
   validity.
4. The DR shifts one digit toward digit 12 per character. The core address
   register (AR) counts 00…49 through the CB.
5. A bad word found before writing, or an invalid AR, raises `error_stop`. On
   the real machine this halts the computation.

## Reading: noise suppression and skew correction

Reading is the subtle part. Each channel arrives as a reshaped pulse from the
handler's read amplifier. Two things go wrong between the eight channels:

- **Noise.** Short spurious pulses appear.
- **Skew.** Pulses of one character arrive tens of microseconds apart, from
  tape skew and head-gap misalignment.

Eight identical `input_channel` circuits, gathered in `read_front_end`, deal
with both.

```
 rd_in ─► duration counter ─► IB ──BTR──► TR ──► DR / checks
             (> 4 clocks)       ▲
 sprocket channel detect ───────┴── wait BTR_DELAY clocks ──► BTR
```

1. **Duration counter.** Each channel counts the clocks its input is high.
   When the count passes `NOISE_COUNT`, meaning more than 17.4 µs, the pulse
   is a signal and sets the channel's **IB** flip-flop. Shorter pulses are
   ignored. This acts as a small digital integrator.
2. **Sprocket reference.** The sprocket channel is in the middle of the tape.
   Its IB firing starts a `BTR_DELAY` (52 µs) timer.
3. **BTR.** When the timer ends, the transfer strobe BTR copies all eight IBs
   into the **TR** synchronisation buffers at once and clears the IBs.
   - Any channel whose pulse was recognised within that window lands in the
     same character.
   - Characters arrive 104 µs apart, so the window is half a character time
     either side.
4. **Handoff.** One clock later the character in TR is handed to the main
   control (`char_valid`).

The main control then checks each character as it arrives:

- It finds the block by its first block-beginning code, or its first
  block-ending code when reading backward.
- It checks odd parity on every character.
- Going forward, it checks that every character is the code expected at its
  index.
- It feeds the characters back through the NRZ flip-flops. Because counting is
  modulo 2, after the parity code they must all read 0. This check works in
  either direction.
- It sends the four block-number characters to `block_number_test`, which
  compares them with #JA.
- It shifts data digits into the DR. At each word end the DR's parity and
  validity are checked and the word is stored in the CB.

Any read error sets the **TC** (tape check) indicator. Computation does not
stop, and the program can test TC with JTG.

## Instructions and concurrency

| code | name | action | CPU released |
|---|---|---|---|
| 910 BTP | buffer to tape | erase, write #JA and the 50 CB words as one block | 0.45 ms |
| 936 ETP | erase tape | as BTP with the write current off | 0.45 ms |
| 912 TPB | tape to buffer | read the nearest block into the CB; skip the next instruction if its number equals #JA | when the block number has been read |
| 914 BLS | block search | read block numbers until one equals #JA, then read that block into the CB | 0.45 ms |
| 934 TTP | test tape | read the nearest block forward, checks only | 0.45 ms |
| 932 BST | backspace tape | read the nearest block backward, checks only | 0.45 ms |
| 930 RWD | rewind | rewind; TCU busy for 20 ms, the handler busy until the load point | 0.45 ms |
| 950 JTG | jump on tape good | jump if TC is off; clear TC | 0.45 ms |
| 952 JTE | jump by tape end | jump if handler N's TE indicator is on | 0.45 ms |
| 920 DMB | drum to buffer | drum E… → CB 0…, 50 − (E mod 50) words; zeros if E ≥ 4200 | at the end |
| 922 BDM | buffer to drum | CB 0… → drum E…; NOP if E ≥ 4200 | at the end |

Concurrency rests on two kinds of busy indicator in `tcu_indicators`:

- **TCU busy**, and **No. N MTH busy**. The MTH busy indicator is operation
  busy OR the handler rewinding.
- An instruction naming handler N is accepted only when both TCU busy and
  handler N's busy are off. Until then the CPU waits (`instr_accept` stays
  low).
- Rewinding keeps only its handler busy. After 20 ms another handler can be
  used while the rewind finishes.

The **TE** (tape end) indicator of a handler:

- It is set when its tape-end sensor comes on.
- It is cleared by backward motion (BST, RWD).
- While it is on, forward operations become NOPs. BST and RWD are NOPs at the
  load point.

A read that finds no block runs until the tape end, or the load point when
going backward, and ends as a NOP. Pressing the console's HALT and TE buttons
(`halt_te`) ends a fruitless block search.

## The core buffer and its address

`core_buffer` holds 50 words of 60 bits: 12 digits × (4 BCD bits + an even
parity bit). The original store was a coincident-current core memory of 100
words of 30 bits, with 17.4 µs cycles. The model keeps that organisation:

- Word *a* is the pair of core words 2*a* (low half) and 2*a*+1 (high half).
- An access takes two 4-clock cycles plus the request clock.

The CB has three users. The priority is fixed:

1. The CB adjustment circuit, when the panel runs it.
2. The main control during an operation.
3. The CPU. Its one-clock request is held until the CB is free. Its reads are
   checked, and a bad word raises `error_stop`.

`core_addr_reg` is the two-digit decimal AR. It counts 00…49 and wraps, and
flags any non-decimal digit or any value above 49.

## Control panel

- With `panel_mode` on, instructions come from the panel inputs instead of
  the CPU, so every operation can be run by hand.
- The panel can also run `cb_adjustment`:
  - It can clear the CB, or write zeros, ones, or two alternating
    0101…/1010… patterns.
  - It can read all words repeatedly. The last word read is shown on
    `panel_word`.
- The set of adjustment modes is this design's choice. The original gives
  only the block's name and purpose.

## Files

| file | content |
|---|---|
| `rtl/kdc_tape_pkg.sv` | character codes, block layout indices, word and instruction types, helper functions |
| `rtl/kdc_tcu.sv` | top: instruction source selection, CB arbitration, wiring |
| `rtl/tcu_main_control.sv` | instruction acceptance, release, skip/jump, all operation sequences |
| `rtl/tcu_indicators.sv` | busy, TE and TC indicators |
| `rtl/core_buffer.sv` | 50-word CB as 100 × 30-bit cores |
| `rtl/core_addr_reg.sv` | AR |
| `rtl/distributor_reg.sv` | DR |
| `rtl/nrz_format.sv` | NRZ flip-flops and channel parity |
| `rtl/input_channel.sv` | one channel's noise filter, IB and TR |
| `rtl/read_front_end.sv` | eight channels and the sprocket-timed BTR |
| `rtl/block_number_test.sv` | block number comparison |
| `rtl/mth_selector.sv` | relay selection of one handler, with settling delay |
| `rtl/cb_adjustment.sv` | panel CB test sequences |
| `tb/mth_model.sv` | behavioural tape handler with a reel of tape (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the end-to-end `tb_kdc_tcu` |

## Simulating

Every testbench ends with one `TB_RESULT checks=N failures=M` line. A watchdog
stops the run if it hangs. To run one testbench with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_kdc_tcu -Mdir obj -y rtl -y tb +libext+.sv \
  rtl/kdc_tape_pkg.sv tb/tb_kdc_tcu.sv -o sim
./obj/sim
```

Use any other `tb_*` as the top module the same way.

**`tb_kdc_tcu`** runs the whole unit at its default parameters, with four
handler models and a drum model. It simulates about 420,000 clocks, roughly 1.8 s of machine
time, in under a second of host time.

- It writes three blocks and checks the tape frame by frame. It then reads
  them back with TPB, BLS, TTP and BST.
- It rewinds one handler while another writes.
- It injects noise pulses and a corrupted character.
- It erases a block and runs into the tape end.
- It moves words to and from the drum, drives the panel and the CB
  adjustment, and provokes an error stop.
- It counts 21 mechanisms and fails if any of them never happened. These
  include the concurrent release, busy wait, skip, jump, TE-induced NOP,
  rewind overlap, a block search passing other blocks, backward reading and
  rejected noise.

**`tb_tcu_main_control`** runs the same unit with shortened mechanical times.
It checks the 0.45 ms release, the busy time of a write against
relay + start + 666 characters + run-out + stop, TPB release and skip, JTG and
JTE, and DMB/BDM with random E.

The other testbenches check one module each against independent reference
computations.

## Where this design departs from the original, and what to trust

- **Non-digit character codes** are assumptions, as explained above. The
  digit codes, the parity rules and the block layout follow the original.
- **Operation times.** The original quotes 220 ms of TCU busy time per
  block, and 100 ms per block passed plus 120 ms for a search.
  - A search here passes a block in 96 ms: 666 characters plus a 4 cm gap.
    That matches the per-block term.
  - A single block operation takes about 113 ms: 3 ms relays + 7 ms start
    + 13 ms lead-in + 69 ms of characters + 13 ms run-out + 7 ms stop.
  - The rest of the original 220 ms is handler mechanism time, which was not
    broken down. If matching it matters, lengthen `START_CLKS`, `STOP_CLKS`
    or `RELAY_CLKS`.
- **Inter-block gap.** A write begins with 2 cm of erased lead-in and ends
  with 2 cm of run-out. Blocks are therefore 4 cm apart, and a stopped head
  sits in the middle of a gap. The handler model stops and starts the tape
  without coasting, so no distance is added during start and stop.
- **Relay settling (3 ms) and the drop-out timeout** are chosen values.
- **TPB on a non-matching block** still reads the block into the CB and
  simply does not skip. This is how the instruction's description reads.
- **The drum** is a request/acknowledge word port, and DMB/BDM release the CPU
  when the transfer ends. The original's 2.90 ms depends on drum latency,
  which is outside this design.
- **The CPU interface** (valid/accept, release/skip/jump pulses) is this
  design's own. The original defines the instructions, not the wires.
- Lint leaves only warnings, of three kinds, none of them a circuit problem:
  - Some shared package constants are unused.
  - The AR's decimal digit outputs are unused at the top.
  - Assertions are disabled during reset.

# Shift-register digitizer for magnetostrictive wire spark chambers

A magnetostrictive spark chamber encodes the position of a spark as a time:
the strain pulse it launches travels along a wire to a pickup coil at sonic
speed, so the delay from the chamber's high-voltage pulse to the pickup
signal is the coordinate. The classic readout gives every spark to be
recorded its own scaler, started together and stopped one by one by the
pickups. That is one scaler per possible spark, which becomes expensive
once an event can hold hundreds of sparks.

This design uses **one** time scaler for the whole system. Whenever a spark
arrives on any pickup, the scaler's current reading and the identity of the
pickup are written as one word into a long shift-register memory. After the
event the memory is rotated so that the first spark sits at its output, and
the computer reads the words in arrival order.

The RTL is for the large configuration of this scheme:

| quantity | value |
|---|---|
| pickup inputs | 64, as 8 groups of 8 lines |
| time scaler | 15 bits at 20 MHz (50 ns resolution, 1.64 ms window) |
| memory | 1024 words of 28 bits: 4 interleaved banks of 256 words |
| bank speed | 5 MHz; each shift takes 4 clock cycles (200 ns) |
| spark rate | up to one spark per 50 ns clock cycle |
| sparks per event | up to 1023; sized for 10 per input (640) |
| computer interface | 14-bit words, one per read request |

Everything runs on the single 20 MHz clock `clk`.

## Event sequence

```
 trigger      scaler carry   1 cycle     1024-N cycles       <=4 cycles       rd_done
   |  RECORD (2**15 cycles) |  XFER  |     ADVANCE      |      DRAIN      | READOUT |  IDLE
   |<---------------------------- busy ------------------------>|
                                                                         rd_ready |<------->|
```

1. **RECORD.** A `trigger` pulse clears and starts the scaler, clears the
   spark counter and the latch steering, and enables the input flip-flops
   and the spark detector. Each spark is stored as one word (next section).
2. **End of recording.** The scaler's overflow carry ends the window after
   exactly 2^15 cycles. Arrivals after that point are discarded.
3. **XFER.** The spark count N is copied into the spark-count latch.
4. **ADVANCE.** Every clock cycle pushes one filler word into the memory and
   increments the spark counter, until the counter wraps from 1023 to 0.
5. **DRAIN.** `busy` has fallen with the counter overflow. The system waits
   for the last bank load to finish, then raises `rd_ready`.
6. **READOUT.** The computer reads the event with `rd_req` pulses and ends it
   with `rd_done`.

## Storing a spark: input identification

With 64 inputs, two or more signals arriving in the same 50 ns are common
enough to matter. A plain 6-bit input number cannot describe that case. The
design therefore records a 12-bit identification built from the 8x8
arrangement of the inputs:

* **Holding flip-flops** (`holding_ffs`). A rising edge on
  `pickup[j][i]`, meaning line i of group j, sets flip-flop (j,i). It stays
  set until line i is stored.
* **OR circuits and priority encoder** (`priority_encoder`). OR circuit i
  combines line i of all eight groups. The encoder picks the **largest**
  active line i.
* **Group multiplexers** (`group_mux`). Multiplexer j outputs flip-flop
  (j,i) for the chosen i. Together the eight outputs show which groups fired
  on line i. Several of these bits can be set at once, so one word covers
  every group that fired on the same line.
* **Coincidence comparator** (`coinc_comparator`). It sets the coincidence
  bit when lines other than i are still pending.
* **Spark detector** (`spark_detector`). It gives the store strobe in any
  cycle where some line is pending, recording is on and the memory is not
  full.
* **One-of-eight decoder** (`line_decoder`). With the strobe, it clears
  line i in all eight groups at the same clock edge.

Stored word (`spark_pkg::spark_word_t`, 28 bits):

| bits | field | meaning |
|---|---|---|
| 14:0 | `time_cnt` | scaler reading when the word was stored (50 ns units from the trigger) |
| 17:15 | `line` | line number i (0..7) |
| 25:18 | `groups` | bit j set: group j fired on line i |
| 26 | `coinc` | other lines were still pending when this word was stored |
| 27 | `spare` | always 0 |

### Coincident arrivals

Suppose lines 6, 3 and 1 (in any groups) all fire at scaler time T. On the
next three cycles the detector stores:

| word | line | time | coinc |
|---|---|---|---|
| 1 | 6 | T | 1 |
| 2 | 3 | T+1 | 1 |
| 3 | 1 | T+2 | 0 |

Only one line is stored per cycle, so the later members get later times.
Analysis software treats a run of words with `coinc=1`, plus the word that
follows the run, as one group. It should use the time of the group's first
word for every member. A pulse that arrives while its line is being cleared
is kept, because the set takes priority over the clear. The same pending
logic also handles sparks that arrive while earlier ones are still waiting
to be stored.

## Interleaved memory

The shift registers in this design run at 5 MHz, so one word takes 200 ns
(four clock cycles) to shift in. Sparks can arrive every 50 ns. The design
bridges the gap in `word_latches`:

* There are four word latches, A to D, and a 2-bit steering counter.
* Each store writes the word into the latch the counter points to.
* The same store starts a 4-cycle load of the matching bank (`sr_bank`) and
  advances the counter.

The next write to a latch comes at least four stores later. Its bank has
finished loading by then, so the whole memory accepts one word per cycle.
Word k of an event goes to bank k mod 4. `sr_bank` asserts that it is never
restarted while it is still loading.

## Aligning the memory: why the spark counter runs on

After recording, the N spark words are spread at different depths in the
four 256-word shift registers. The alignment step lines them up without
knowing N:

* The spark counter continues from N and pushes one filler word per cycle
  into the same round-robin.
* It stops when the counter overflows, after 1024 - N more pushes.
* In total exactly 1024 words have entered the memory, so each bank has
  received exactly 256.
* Word 0 was the first word pushed into bank A, so it is now at bank A's
  output. Words 1, 2 and 3 are at the outputs of banks B, C and D.

This works for any N, and leftovers from earlier events are always pushed
out. For this reason the shift registers need no reset. N is capped at 1023:
once the counter reads 1023, further sparks are refused so that the count
never wraps during recording.

## Reading an event out

The readout control (`readout_ctrl`) has two flip-flops, FF2 and FF3, a
2-bit bank counter and the output multiplexer. FF2 and FF3 are clear when
readout begins. Each `rd_req` steps them as follows:

| request | FF2 FF3 | `rd_data` | side effect |
|---|---|---|---|
| 1 | 1 0 | spark count N (zero-extended) | |
| 2 | 1 1 | word 0 bits 13:0 (bank A) | |
| 3 | 0 1 | word 0 bits 27:14 | |
| 4 | 1 1 | word 1 bits 13:0 (bank B) | bank A shifts one place |
| 5 | 0 1 | word 1 bits 27:14 | |
| 6 | 1 1 | word 2 bits 13:0 (bank C) | bank B shifts |
| ... | | | A, B, C, D, A, ... |

A full event is read with 1 + 2N requests. `rd_data` is valid from the cycle
after each request. A bank shift takes 4 cycles, and the same bank is read
again only six requests later, so a shift is always complete before its
bank is read, even with a request in every clock cycle. The end-to-end test
reads one event that way and one with requests two to four cycles apart. The
computer decides when it has read N words and pulses `rd_done`, which
returns the system to idle.

## Top-level interface (`spark_digitizer`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 20 MHz master clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `trigger` | in | 1 | one-cycle start pulse from the chamber trigger; ignored unless idle |
| `pickup` | in | `[8][8]` | discriminated pickup signals, `pickup[group][line]`, synchronous to `clk`; a rising edge is an arrival |
| `rd_req` | in | 1 | one-cycle read request |
| `rd_done` | in | 1 | end of readout |
| `busy` | out | 1 | from the trigger until the spark counter overflow ends the alignment |
| `rd_ready` | out | 1 | readout phase: the computer may read |
| `rd_data` | out | 14 | current word for the computer |

Timing: an arrival sampled at clock edge p after the trigger edge (p >= 1)
is stored with time p if its line is not waiting behind others. `busy` lasts
exactly 2^15 + 1 + (1024 - N) cycles. `rd_ready` rises at most 4 cycles
after `busy` falls.

## Files

Each file in `rtl/` holds one unit.

| file | contents |
|---|---|
| `spark_pkg.sv` | sizes, the stored-word struct and the sequencer states |
| `spark_digitizer.sv` | top: wires everything below |
| `controller.sv` | event sequencer (IDLE, RECORD, XFER, ADVANCE, DRAIN, READOUT) |
| `master_counter.sv` | 15-bit time scaler, stops at its carry |
| `holding_ffs.sv` | 8x8 holding flip-flops |
| `priority_encoder.sv` | OR circuits and largest-line encoder |
| `group_mux.sv` | eight group multiplexers |
| `coinc_comparator.sv` | coincidence bit |
| `spark_detector.sv` | store strobe |
| `line_decoder.sv` | one-of-eight line clear |
| `spark_counter.sv` | 10-bit spark counter and its latch |
| `word_latches.sv` | latches A-D and the steering counter |
| `sr_bank.sv` | one 28 x 256 shift-register bank with 4-cycle shifts |
| `readout_ctrl.sv` | FF2/FF3, the readout bank counter and the output multiplexer |

The top's parameters are `SCALER_W` (15), `SPARK_W` (10), `BANK_DEPTH` (256)
and `LOAD_CYCLES` (4). The memory must hold `4 * BANK_DEPTH == 2**SPARK_W`
words, which an elaboration-time assertion checks. The word format is fixed
by the package. With a smaller `SCALER_W`, the time field is zero-extended
and the recording window becomes shorter.

Synthesis gives about 300 flip-flops of control and latches, plus 28,672
bits of shift register (4 x 28 x 256). The shift registers are written as
register arrays that shift as a whole, which stands in for the original
5 MHz shift-register chips.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. To run one
with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl rtl/spark_pkg.sv tb/tb_spark_digitizer.sv --top-module tb_spark_digitizer
./obj_dir/Vtb_spark_digitizer
```

`tb_spark_digitizer` runs the whole system at its default size. It acts as
the trigger source, the pickups and the computer, and runs two complete
events:

* **Event 1:** 10 random arrivals per input (640), plus bursts on several
  lines at once and on one line in several groups.
* **Event 2:** enough arrivals to fill the 1023-word limit, read back with
  a request in every clock cycle.

A reference model in the testbench is written from the storing rules alone:
largest pending line first, one word per cycle, the coincidence rule and
the 1023 cap. The testbench compares the count and every 28-bit word read
back against this model. It also checks:

* the busy time and the number of advance pulses;
* that pulses before the trigger, after the window and during readout are
  ignored;
* that each mechanism happened at least once: coincidence, multi-group
  words, backlog, four or more stores back to back, the full counter, both
  overflows and the readout bank shifts.

Each event takes about 35,000 cycles and runs in well under a second.

## Choices beyond the original description

The storing, interleaving, alignment and readout mechanisms follow the
original system. These details are this design's own:

* The bit order of the stored word, and the zero spare bit. The original
  used 30-bit latches for a 28-bit memory word; the latches here are 28 bits.
* Pickup inputs are treated as synchronous logic pulses and are
  edge-detected. An arrival beats a simultaneous clear. The flip-flops are
  held clear outside the recording window.
* The coincidence bit is set whenever more than one line is pending.
* Sparks are refused once the counter reads 1023, instead of letting the
  count wrap.
* There is a separate one-cycle state to latch the count. A short drain
  state after the counter overflow lets the last bank load finish before
  `rd_ready` rises.
* Alignment pushes all-zero filler words.
* The computer interface is generic: `rd_req`, `rd_data`, `rd_ready` and
  `rd_done`. The original's interface was specific to its host computer.
  The "first 14 bits" of a word are bits 13:0.

Not included:

* the analog pickups, amplifiers and discriminators (their logic outputs
  are the `pickup` inputs);
* the clock oscillator;
* the host computer and its interface electronics.

The original also describes a simplified version with a binary input
encoder for a few pickups. That version only illustrates the principle and
is not built here.

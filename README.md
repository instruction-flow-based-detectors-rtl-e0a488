# Instruction-flow fault detectors for a RISC-V core

A fault injection attack (a voltage or clock glitch, a laser or EM pulse) that
hits a processor running a cryptographic routine, for instance a software RSA
decryption, usually changes the instructions the core fetches. A flipped bit
in a branch can turn `bne` into `beq`. A glitch can also change one operation
into another. These detectors catch such faults without looking at data. They
watch the stream of fetched instructions and check that every **window** of
the last *WL* instructions is one of the windows the program produces when it
runs without faults. A single instruction can be faulted into another valid
instruction fairly easily. A faulted instruction that still fits into valid
windows, in several overlapping positions, is far less likely.

The RTL contains two detectors of this kind. They sit side by side on the
same instruction stream:

* **CAM detector**: the valid windows are stored exactly in a content
  addressable memory. A window that is not in the table is a fault. The
  check is exact: every stored window passes and no other window does. False
  alarms come only from valid windows that were never learned. The table
  grows with the number of different windows.
* **Bloom filter detector**: each valid window sets two bits of a 512-bit
  map, one bit chosen by an FNV-1a hash of the window and one by a
  MurmurHash2 hash. A window is a fault if either of its two bits is 0. A
  valid window is never rejected. An invalid window can be accepted by chance
  (a false positive). The cost is fixed, whatever the number of windows.

A third member of the family, a recurrent neural network that predicts the
next instruction, is not included. The top level provides the ports such a
detector would use.

## Windows, sliding and filling

```
fetched:   i0 i1 i2 i3 i4 i5 i6 ...
WL=5,SL=1: [i0 i1 i2 i3 i4]            first check after the 5th fetch
              [i1 i2 i3 i4 i5]         next check one fetch later
                 [i2 i3 i4 i5 i6]      ...
```

* `WL` (window length, default 5) is how many instructions make up a window.
  The window is 5 x 32 = 160 bits and covers the whole instruction word.
* `SL` (sliding length, default 1) is how many fetches separate two checks.
  With SL = 1 every instruction is checked in WL different windows. A larger
  SL checks less often and costs less. The RTL requires 1 <= SL <= WL, so no
  instruction goes unchecked.
* After a `restart`, the window is empty. The controller (`window_ctrl`)
  waits for WL fetches before the first check (state FILL). From then on it
  requests one check every SL fetches (state RUN).
* With `enable` low, fetched instructions are ignored and the window keeps
  its contents. This is meant for interrupts and for code that is not
  protected. Another program's instructions never mix into a window, and the
  check resumes where it stopped once `enable` returns.

The window is packed `{newest, ..., oldest}`. Word 0 (bits 31:0) is the
oldest instruction. Both hashes read from word 0 upwards.

## Design phase and evaluation phase

Each detector must first learn the valid windows of the program it protects.
This is the design phase, with `learn` high. The program is run without
faults, and every window checked in this phase is stored:

* The CAM detector writes a window to the next free row if the window is not
  in the table yet, so each different window takes one row. `entries` counts
  the rows in use. `overflow` is set if a new window finds all rows taken;
  that window is then dropped.
* The Bloom filter detector sets the two bits of each window. `new_windows`
  counts the insertions that changed the map.

In the evaluation phase (`learn` low) every check compares the window with
what was learned. No alarm is raised during the design phase.

Software can also load the contents directly, for example when an operating
system switches between protected applications. For the CAM, `cam_clear`
and `cam_wr_*` write one 160-bit row per cycle. For the Bloom filter,
`bf_clear` and `bf_wr_*` write one bit per cycle. If a software write and a
learn write to the CAM fall in the same cycle, the software write wins and
the learned window is lost.

## The CAM detector (`cam_detector`)

A `window_buffer`, a `window_ctrl` and a `cam_table` with 213 rows of 160
bits. A search compares the window with every valid row in parallel, without
a clock, and gives `hit` and the address of the lowest matching row. A row
counts only once its valid bit is set, and `clear` resets all the valid bits.
The table is built from flip-flops and comparators. 213 rows is the number of
different windows of a CRT-based RSA decryption with 5-instruction windows.
A program without CRT needs 63. A program with more different windows than
rows cannot be protected completely: `overflow` reports this.

## The Bloom filter detector (`bf_detector`)

The same buffer and controller. Two hash units (`fnv_hash`, `murmur_hash`)
and a bit map (`bf_bitmap`).

* `fnv_hash`: FNV-1a, 32 bit. It starts from 0x811c9dc5, and for each of the
  20 bytes of the window (byte 0 first) it XORs the byte in and multiplies by
  0x01000193.
* `murmur_hash`: MurmurHash2, 32 bit, with seed 0. The initial state is the
  seed XOR 20. Each of the 5 words is mixed with M = 0x5bd1e995 and r = 24,
  followed by the final avalanche (>>13, xM, >>15).
* Both hash units are fully unrolled combinational logic, so they give one
  hash per clock. The 20 multiplications in FNV are by a constant. Murmur has
  12 multiplications by a constant. This is the longest path in the design,
  and the place to add a pipeline stage if the clock is too fast.
* The bit index is the low 9 bits of each hash (hash mod 512).
* `bf_bitmap` reads the two indexed bits and ANDs them. A lookup shows
  writes from the cycle after they happen.

The chance that a window never learned is accepted is about
(1 - e^(-k n / m))^k for n learned windows. With k = 2 and m = 512 this gives
about 0.05 for n = 63 and about 0.32 for n = 213. A fault normally disturbs
WL consecutive windows, so the chance that all of them pass is much smaller.
In the testbench, 29 of 600 faulty windows were accepted. No faulty run went
undetected.

## Timing

Every check takes two cycles from the fetch that completes the window:

```
cycle  F      fetch_valid=1, fetch_instr = last instruction of the window
cycle  F+1    window register holds it, controller's check=1, CAM search / hashes
cycle  F+2    chk_valid=1, chk_fault = result, match_addr (CAM); alarm set if fault
```

`alarm` is sticky. It stays high from the first fault until `alarm_clr`.
`irq` in the top is `cam_alarm | bf_alarm | rnn_alarm`. Fetches may arrive
every cycle or with gaps of any length. There is no backpressure: the
detectors never stall the core.

## Top level (`ifd_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset (everything empty, no alarm) |
| `enable` | in | detectors running; low = paused (window and counters kept) |
| `restart` | in | start of a protected run: empty both windows |
| `learn` | in | design phase: store windows instead of checking them |
| `alarm_clr` | in | clear both sticky alarms |
| `fetch_valid`, `fetch_instr[31:0]` | in | instruction fetched by the core this cycle |
| `cam_clear`, `cam_wr_en`, `cam_wr_addr[7:0]`, `cam_wr_data[159:0]` | in | software load of the CAM |
| `bf_clear`, `bf_wr_en`, `bf_wr_addr[8:0]`, `bf_wr_bit` | in | software load of the bit map |
| `cam_chk_valid`, `cam_fault`, `cam_match_addr`, `cam_alarm` | out | CAM check result and alarm |
| `cam_entries[7:0]`, `cam_overflow` | out | CAM rows used, table full in design phase |
| `bf_chk_valid`, `bf_fault`, `bf_alarm`, `bf_new_windows[15:0]` | out | Bloom filter result, alarm, insert count |
| `rnn_feat_valid`, `rnn_feat[10:0]` | out | per fetch, `{instr[30], instr[14:12], instr[6:0]}` for an external RNN detector |
| `rnn_alarm` | in | alarm of that detector |
| `irq` | out | OR of the three alarms |

The RNN feature is the part of an RV32I instruction that defines the
operation: the opcode, funct3 and bit 30, which separates add/sub and
srl/sra. It is registered and follows the fetch by one cycle.

Parameters (`ifd_pkg` holds the defaults): `WL` = 5, `SL` = 1, `XLEN` = 32,
`CAM_DEPTH` = 213, `BF_M` = 512 (a power of two). The number of hashes is
fixed at two. Both detectors take the same control inputs.

## Files

`rtl/`: `ifd_pkg` (constants, the feature function), `window_buffer`,
`window_ctrl`, `cam_table`, `cam_detector`, `fnv_hash`, `murmur_hash`,
`bf_bitmap`, `bf_detector`, `ifd_top`.

`tb/`: one self-checking testbench per module (`tb_<module>`), and `tb_pkg`,
which provides:

* reference FNV-1a and MurmurHash2 written as byte loops;
* RV32I instruction encoders;
* a generator of instruction traces for two programs, both with 12-bit
  keys:
  * a square-and-multiply modular exponentiation, with a key-dependent
    multiply, a shift-and-add modular multiply with data-dependent branches
    and a reduction loop of random length. It produces 58 different windows;
  * a CRT decryption: two half-length exponentiations, two modular inverses
    by the extended Euclidean algorithm, and the recombination. It produces
    146 different windows, which fit in the 213 rows;
* four fault models: single bit flip, single byte change, branch to opposite
  branch (instruction bit 12: beq/bne, blt/bge, bltu/bgeu) and instruction
  to instruction.

The detector and top testbenches learn from fault-free traces, then inject
one fault per run. Set and bit-array models predict every check result and
the cycle it must appear in. `tb_ifd_top` runs the top at its default size
and drives every mechanism at least once:

* learning;
* hits and misses in both detectors;
* fetches paused by an interrupt;
* idle cycles between fetches;
* restarts;
* CAM overflow, by learning random code;
* software loads;
* alarm clear;
* the RNN alarm path and the RNN feature stream.

In these runs, every branch-to-opposite and instruction-to-instruction fault
was detected by both detectors. So were the single-bit and single-byte
faults, because any change to a fetched word makes windows the program never
produces. The Bloom filter let through some individual faulty windows, but
never a whole faulty run.

## Evaluation workload

`tb_exp3_workload` runs both programs through the full-size top. For each
program it:

* learns the valid windows from 40 fault-free runs;
* counts false alarms over 20 fresh fault-free runs;
* injects faults of each model, either one fault per run or two to four.
  Instruction-to-instruction comes in two variants: model I only changes a
  branch into another branch and a non-branch into another non-branch;
  model II has no such limit.

For the CRT program it then attacks the detectors themselves: it flips one
bit of one CAM row and one bit of the Bloom filter map, and repeats the
runs. Typical results are:

* no false alarm on fault-free runs;
* every faulty run flagged by both detectors, for every fault model;
* after the attack on the detectors, many false alarms on correct runs
  (the corrupted row or bit is needed by valid windows), while every faulty
  run is still flagged. Corrupting a detector disturbs correct operation but
  does not hide faults.

## Window and sliding length

`tb_wlsl_sweep` builds both detectors at (WL, SL) = (1,1), (3,2), (5,1),
(5,5), (10,1) and (10,10). All of them run the plain program with an 8-bit
key. In every setting the checks come one per SL fetches and match the
models. The results show the trade-off:

* with WL = 1 the "window" is a single instruction. Only about 60 % of the
  faulty runs are caught: an instruction-to-instruction fault that produces
  another valid instruction passes;
* from WL = 3 upwards every faulty run is caught;
* the number of different windows, which is the CAM size needed, grows with
  WL: 29 at WL = 1, 58 at WL = 5, about 130 at WL = 10;
* a large SL leaves fewer overlapping checks per instruction. With
  WL = SL = 10, the Bloom filter missed some faulty runs.

## Simulating

With Verilator 5 (packages first; `-y` finds the modules):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ifd_pkg.sv tb/tb_pkg.sv tb/tb_ifd_top.sv --top-module tb_ifd_top
./obj_dir/Vtb_ifd_top
```

Replace `tb_ifd_top` with any other testbench. Each prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed time if it
hangs. The testbench for the top takes a few seconds.

## Choices made in this RTL

These points are design decisions of this implementation. Change them
freely:

* The hashes read the whole 160-bit window, so that a sequence is hashed and
  not a single instruction. FNV is the FNV-1a variant, Murmur is MurmurHash2
  with seed 0, and both read word and byte 0 first.
* A check result appears two cycles after the fetch: a registered window
  plus a registered result. A single-cycle lookup is possible by searching on
  the incoming word and the other WL-1 slots.
* Learn mode inside the detectors, with de-duplication, an overflow flag,
  and software load ports. The alternative is to load tables computed
  elsewhere.
* Sticky alarms with a clear input, the `restart`/`enable` controls, the
  asynchronous reset, and the lowest-row priority in the CAM.
* The CAM and the bit map are flip-flop arrays. In an FPGA they could be
  mapped to block RAM, with a different read timing.
* The two detectors run in parallel in one top with one `irq`. Each can be
  used on its own.

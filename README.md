# MD5 hash reversal engine

MD5 cannot be inverted, but a short string can be recovered from its hash by
trying candidates until one hashes to the target. This design does that in
hardware. A PC sends a 128-bit MD5 digest over an RS232 link. The device then
hashes every printable ASCII string of 1 to 8 characters in a fixed order,
shortest first. It stops at the first string whose digest matches and reports
that string and how many strings it tried.

Each solver worker is a fully pipelined MD5 core with 64 stages, one per MD5
round. It accepts a new candidate every clock. With `NUM_WORKERS` workers the
device tests `NUM_WORKERS` strings per clock. With the default single worker
at 100 MHz that is 10^8 strings per second.

```
 PC ──RS232──► md5r_uart_rx ──► md5r_controller ──► md5r_solver_manager ──► md5r_solver_worker [0..N-1]
 PC ◄──RS232── md5r_uart_tx ◄──┘       ▲  hash, reset      │  strings ──►  md5r_pad
                                       └─ solved, attempts, result          md5r_round_stage x 64
```

The top module is `md5_reversal_top` (ports `clk`, `rst`, `uart_rx`,
`uart_tx`, `solved`).

## The search order

The alphabet is the 95 printable characters from 32 (space) to 126 (`~`).
Strings are enumerated like an odometer: first all 1-character strings, then
all 2-character strings, and so on up to 8 characters. Within one length the
last character changes fastest. The sequence is therefore
`" "`, `"!"`, ..., `"~"`, `"  "`, `" !"`, ..., `"~~~~~~~~"`, about 6.7·10^15
strings in all. After the last one the search stops.

The 1-based position of a string `c0 c1 … c(L-1)` is

    position = (95^1 + … + 95^(L-1)) + Σ (c_k − 32)·95^(L-1-k) + 1

The final attempt count the device reports is exactly this number. Examples:
`"so"` is 8060, `",)d"` is 118344, `"wax"` is 800559, `"test"` is 73516690
and `"vader"` is 7143420583. Because shorter strings come first, the string
reported is the shortest one (and, among those, the lowest) with the target
hash.

Inside the RTL a candidate is a 64-bit word plus a 3-bit length. Character
`k` sits in bits `8k+7:8k`, so the first character is in the low byte, which
is the order in which MD5 reads message bytes. The length field holds
length − 1. Bytes past the end of the string are zero. The incrementer is the
function `md5r_pkg::next_string`.

## The solver worker: MD5 as a 65-stage pipeline

`md5r_solver_worker` hashes one string per clock. A string of at most 8
characters always fits in a single 512-bit MD5 block, so each hash is one
pass through the compression function.

1. **Padding** (`md5r_pad`, 1 registered stage). The unit builds the 16 message
   words. The characters go into words 0–1, followed by the byte `0x80`.
   Word 14 holds the bit length (8–64). All other words are zero. The string
   and its valid flag are registered together with the block.
2. **64 round stages** (`md5r_round_stage #(ROUND)`, one register each). Stage
   `r` performs MD5 round `r`:

       B' = B + rotl(A + F(B,C,D) + K[r] + m[g(r)], s(r));   A' = D;  C' = B;  D' = C

   Stages 0–15 use `F1 = (B∧C) ∨ (¬B∧D)` and stages 16–31 use
   `F2 = (B∧D) ∨ (C∧¬D)`. Stages 32–47 use `F3 = B⊕C⊕D` and stages 48–63 use
   `F4 = C ⊕ (B∨¬D)`. The constants `K[r] = floor(|sin(r+1)|·2^32)`, the
   rotations `s(r)`, the word index `g(r)` and the initial state are those of
   the MD5 standard (RFC 1321). They are all in `md5_pkg`. Every stage passes
   along the whole message block, the string and its valid flag. This keeps
   65 different strings in flight at once. Synthesis removes the message
   words that later stages no longer read.
3. **Digest and compare** (combinational after stage 63). The initial state is
   added to A, B, C and D. Each word is byte-swapped, which gives the digest
   in its usual printed order: the first digest byte is in bits 127:120.
   The digest is then compared with the target. `solved = valid_out && hashout == hash`.

A string entered in clock *t* comes out in clock *t + 65*. The `valid` flags
are cleared by reset. The words left in a filling or draining pipeline are
therefore never reported as results, even though the data registers hold
garbage. The worker keeps no state other than this pipeline.

## The solver manager: feeding N workers and counting

`md5r_solver_manager #(NUM_WORKERS)` holds the current string. Every clock it
gives worker `i` the `i`-th string after it, using a chain of `NUM_WORKERS`
incrementers. Then it advances the current string by `NUM_WORKERS`. Each clock
it adds to `attempts` the number of valid strings that left the workers.

When one or more workers report `solved` in the same clock, the lowest one
holds the earliest string in search order. The manager latches that string as
`result`, counts only the strings up to and including it, raises `solvedflag`
and stops issuing strings. Flag, count and result then stay fixed until the
next reset. Holding the manager in reset restarts the search from `" "` with
a count of zero.

Timing: the string at position *n* is issued `(n−1)/N` clocks after reset is
released (integer division). `solvedflag` rises 66 clocks after that: 65
clocks of pipeline and one of result register. The search time is therefore
`T·n/N` plus a constant 66 clocks and the serial transfer.

## Serial protocol

The link runs 8 data bits, LSB first, no parity and one stop bit. Each bit lasts
`CLKS_PER_BIT` clocks; the default is 1000, which gives 100 kBd at 100 MHz. The
receiver samples in the middle of each bit, behind a two-flop synchroniser.
It drops frames with a low stop bit.

| PC sends | Device answers |
|---|---|
| `0x01` + 16 bytes | The 16 bytes are the target hash, first digest byte first. No reply is sent. The search is held in reset while the bytes arrive and starts after the 16th. |
| `0x02` | `0x03` followed by 16 bytes: the attempt count at the moment of the request, most significant byte first. |
| `0x08` | `0x06` followed by 16 bytes if solved: the string's characters in order, then zero bytes. Otherwise the single byte `0x07`. |
| `0x0A` | The 16 stored hash bytes in the order they were received, with no leading code. |
| anything else | The code is ignored. |

The device never sends anything unprompted. Progress reports come from the
PC polling with `0x02`. Until the first hash arrives the solver is held in
reset, and `0x08` returns `0x07`.

`md5r_controller` is a small state machine with four states: idle, receiving
hash, send byte and wait for complete. It acknowledges a received byte
combinationally (`rx_ack`), so the receiver drops `ready` on the next edge.
It hands the transmitter one byte at a time and waits for the transmitter's
one-clock `complete` pulse before sending the next.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `md5_reversal_top`, `md5r_solver_manager` | `NUM_WORKERS` | 1 | Solver workers, i.e. strings hashed per clock. The original FPGA prototype had room for only one. |
| `md5_reversal_top`, `md5r_uart_rx`, `md5r_uart_tx` | `CLKS_PER_BIT` | 1000 | Clocks per serial bit (100 MHz / 100 kBd) |
| `md5_reversal_top`, `md5r_solver_manager` | `MAX_LEN` | 8 | Longest string tried (1–8); the search stops after `MAX_LEN` times `~` |
| `md5r_round_stage` | `ROUND` | 0 | MD5 round performed by the stage (0–63), set by the worker |

One worker synthesises to about 18,000 flip-flops, most of them in the state
and message registers of the 64 stages, and about 1,100 word-level cells.

## How this relates to the original design description

These points follow the original description of the design:

- the block structure: UART receiver and transmitter, controller, solver manager and solver workers;
- the worker as a padding unit followed by 64 pipeline stages, 16 for each MD5 function, with a valid flag;
- the signal widths: 64-bit string, 3-bit length, 128-bit hash, 128-bit attempt count and 64-bit result;
- the command codes;
- the 100 kBd / 1000-clock bit time;
- the 95-character alphabet;
- the 8-character limit;
- shortest-first search.

These are choices made here, because the description leaves them open:

- The length field holds length − 1.
- Strings are stored little-endian in the 64-bit word.
- Several orders are fixed here: the order of hash and count bytes on the link, the order within one length (last character fastest) and how strings are split among workers.
- The `0x06` reply carries the found string padded to 16 bytes. The description calls those 16 bytes the found "hash", but the useful content is the string.
- `0x0A` is answered with no leading code.
- Unknown codes are ignored.
- The receiver uses an acknowledge handshake.
- Reset is synchronous and active high.
- The search stops after `"~~~~~~~~"`.
- The solver is held in reset until a hash arrives.

The description gives one limit as 8 characters and in the same passage shows
the range as `" "` to `"~~~~~"`. This design follows the 8 characters, which is also what
the 64-bit string path holds.

The hash counts published for the sample words are not consistent with one
another. Some of them match a 94-character alphabet. The
published crossover point (`",)d"` at 118344) matches this design's 95-character order exactly.
Positions reported by this design for other words therefore differ from the
published counts (for `"test"`: 73,516,690 here against 70,386,626 there).

These features are not built, because the description names them only as
future work:

- rejecting a result to continue to the next match;
- choosing the starting point of the search;
- strings longer than 8 characters.

The PC software and the PC's serial interface are outside the device.

## Files

- `rtl/md5_pkg.sv`: MD5 types, constants and round functions.
- `rtl/md5r_pkg.sv`: alphabet, string type, command codes and the string incrementer.
- `rtl/md5r_pad.sv`, `rtl/md5r_round_stage.sv`, `rtl/md5r_solver_worker.sv`: the hashing pipeline.
- `rtl/md5r_solver_manager.sv`, `rtl/md5r_controller.sv`, `rtl/md5r_uart_rx.sv`, `rtl/md5r_uart_tx.sv`, `rtl/md5_reversal_top.sv`.
- `tb/md5_ref_pkg.sv`: a sequential reference MD5 that computes its constants from `$sin`, plus the position formula above.
- `tb/md5r_pc_model.sv`: a serial-line model of the PC.
- `tb/tb_<module>.sv`: one self-checking testbench per module, plus `tb/tb_md5r_next_string.sv` for the incrementer.
- `tb/tb_md5_reversal_top.sv`: an end-to-end test with 3 workers and a 20-clock bit time. It covers status before, during and after a search, growing counts, a restart with a new hash, an ignored code, a hash echo, answers found by a worker other than worker 0, and string-length carries.
- `tb/tb_md5_reversal_top_full.sv`: reverses `"wax"` with all defaults.
- `tb/tb_md5_table2_workloads.sv`: reverses `"so"`, `"axe"`, `"wax"` and `"test"` with all defaults. It checks that the time from the last hash byte to `solved` is the word's position plus the 65-clock pipeline, to within one bit time. The longest run, `"test"`, is 73.5 million clocks and takes about 75 s of simulation.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself,
with a watchdog. With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/md5_pkg.sv rtl/md5r_pkg.sv tb/md5_ref_pkg.sv \
  tb/tb_md5_reversal_top.sv --top-module tb_md5_reversal_top -Mdir obj
./obj/Vtb_md5_reversal_top
```

Replace the testbench name to run any other testbench. The simulator is
two-state, so the testbenches only rely on values that reset or the design
itself initialises.

To add workers, change `NUM_WORKERS`. The incrementer chain in the manager
grows linearly with it and becomes the longest combinational path for large
`N`. To shorten it, give each worker its own counter stepping by `N`.

## Verification

- **Pipeline.** The padding unit, round stages and worker are compared against the reference MD5 on random strings of every length. The comparison covers every digest, the 65-clock latency and the valid flag while the pipeline fills.
- **Manager.** It is run with 1 and 3 workers on nine targets. Each run checks the result, the exact attempt count and the exact clock at which the solution appears. A third instance, with 2 workers and `MAX_LEN = 2`, checks that the last string of the space is found and that the search stops at the end of the space.
- **Incrementer.** `tb_md5r_next_string` checks the string incrementer against the position formula.
- **UARTs.** Both are checked bit by bit. The receiver is also tested with a ±2% rate error, a start-bit glitch and a framing error.
- **Whole device.** It is tested end to end over the serial line as described under Files.
- **Assertions.** They check the receiver handshake and that no byte is handed to a busy transmitter.
- **Not done.** The design has not been run on hardware and has no timing analysis. A 65-stage pipeline with one 32-bit add chain per stage should close near 100 MHz on an FPGA, but that is not verified here.

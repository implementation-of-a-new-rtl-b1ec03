# Improved WTS coding for faster PCM writes

In phase-change memory (PCM), the two cell operations take very different
times. A SET crystallises the cell and takes several times longer than a
RESET, which melts it back to the amorphous state. Here a SET takes 150 ns and
a RESET 50 ns. A line write lasts as long as its slowest bit, so a write that
needs even one SET pays the full SET time.

This design stores data with a redundant code. Each 2-bit information word
can be written as any of four 4-bit codewords. Before each write the
controller reads the codewords already in the cells. For each symbol it then
picks the codeword that needs no SET, whenever the code allows one. Many
writes then need RESET pulses only and finish in the short RESET time. The
number of SET bits, and so the write energy, drops too.

The code is an improved *Write Time Speed-up* (WTS) code. It has the same
structure as the plain WTS code, but a different codeword table.

## Bit polarity

The code uses negative logic:

| stored bit | cell state | to reach it from the other value |
|---|---|---|
| 0 | crystalline (low resistance) | SET pulse, slow |
| 1 | amorphous (high resistance) | RESET pulse, fast |

All cells start at 0. A bit that goes **1 → 0 needs a SET**. A bit that goes
**0 → 1 needs a RESET**. A bit that keeps its value is not written at all
(differential write).

## The (2^2)/4 code table

The sixteen 4-bit patterns are numbered C0..C15 in order of Hamming weight.
Codeword C_m carries the information word `m mod 4`. Its *rank* among that
word's four alternatives is `j = m div 4`. A lower rank is never heavier.

| rank j | d = 00 | d = 01 | d = 10 | d = 11 |
|---|---|---|---|---|
| 0 | 0000 | 0010 | 0100 | 0001 |
| 1 | 1000 | 0011 | 1001 | 0110 |
| 2 | 0101 | 1100 | 1010 | 0111 |
| 3 | 1101 | 1110 | 1011 | 1111 |

Every 4-bit pattern appears exactly once. Decoding is therefore a plain
16-entry look-up, and any stored pattern decodes. This order inside each
weight class is what separates the improved code from the plain WTS code.
The plain code keeps the numeric order, e.g. `0001, 0010, 0100, 1000` for
weight one.

## Choosing a codeword

For information word `d` and stored codeword `c'`, the encoder tries
`d`'s codewords from rank 0 to rank 3. It takes the first one that clears
no bit that `c'` has set, i.e. `(c' & ~c) == 0`. If all four would clear a
bit, it takes rank 0, the lightest one. Taking the lightest word that works
keeps few 1s in the cells, which leaves more SET-free choices for later
writes.

Example: erased cells receive 00, 01, 11, 10 in turn.

| write | stored before | candidates (rank 0..3) | chosen | pulses |
|---|---|---|---|---|
| 00 | 0000 | 0000 1000 0101 1101 | 0000 | none |
| 01 | 0000 | 0010 0011 1100 1110 | 0010 | RESET |
| 11 | 0010 | 0001✗ 0110 0111 1111 | 0110 | RESET |
| 10 | 0110 | 0100✗ 1001✗ 1010✗ 1011✗ | 0100 | SET (fallback) |

Only the last write needs a SET. No codeword of `10` keeps both 1s of `0110`.

`wts_encoder` holds this rule as a 64-entry ROM addressed by `{d, c'}`.
Each entry is 7 bits: the codeword, its rank, and a flag that says whether
it still needs a SET. `wts_pkg::build_enc_lut()` fills the ROM during
elaboration from the code table and the rule above. Changing the table in
`wts_pkg::CW_TABLE` changes the encoder and the decoder together.

## Line controller (`wts_pcm_controller`, top)

A memory line holds 64 bytes (512 data bits). That is 256 symbols, stored in
1024 cells. Symbol `s` is data bits `[2s+1:2s]` and cell bits `[4s+3:4s]`.
Every symbol is encoded against its own four cells.

```
 host req ──► IDLE ──► READ (T_READ cycles) ──► read:  RESP (decoded line)
                                              └► write: ENC ──► WRITE (T_SET or T_RESET) ──► RESP
                                                              └► (line unchanged) ─────────► RESP
```

* **READ.** `pcm_rd_en` is held for `T_READ` cycles. `pcm_rdata` is
  captured in the last of them.
* **ENC.** This cycle does three things:
  * `wts_line_encoder` builds the new codeword line.
  * `pcm_diff_write` splits the changes into a SET mask and a RESET mask and
    counts each.
  * `pcm_write_stats` records the write.
* **WRITE.** `pcm_wr_en` is held for the programming window. Address, new
  codeword line and both masks stay stable for the whole window. The window
  is `T_SET` cycles if any bit needs a SET, and `T_RESET` if only RESETs
  are needed. A write that changes no bit has no window at all.
* **RESP.** `resp_valid` is high for one cycle.
  * For a read, `resp_rdata` carries the decoded line.
  * For a write, `resp_set_free` tells whether the write got by without a
    SET.

The controller handles one request at a time. `req_ready` is high only in
IDLE. A request must hold still until it is accepted; an assertion checks
this. A second assertion checks that the SET and RESET masks never overlap.

### Timing

Latency is counted from the clock edge that accepts the request to the cycle
in which `resp_valid` is high. Latencies are in cycles of an 800 MHz clock
(1.25 ns).

| operation | latency | default |
|---|---|---|
| read | `T_READ + 1` | 101 |
| write, no bit changes | `T_READ + 2` | 102 |
| write, RESETs only | `T_READ + 2 + T_RESET` | 142 |
| write with a SET | `T_READ + 2 + T_SET` | 222 |

The defaults `T_READ = 100`, `T_SET = 120` and `T_RESET = 40` are the
single-level-cell PCM figures at 1.25 ns per cycle: a 125 ns read, a 150 ns
SET and a 50 ns RESET. The SET/RESET *iteration* and verify times of
program-and-verify schemes are not modelled. Each pulse is issued once.

### PCM port

The cells are outside the design. While `pcm_wr_en` is high, the array must
do three things:

* force the `pcm_set_mask` bits to 0;
* force the `pcm_reset_mask` bits to 1;
* leave every other bit alone.

`pcm_wdata` is the line the cells hold once the window ends. An array that
writes whole lines can use it instead of the masks. Reads are taken as ready
after `T_READ` cycles; there is no handshake from the array.
`tb/pcm_array_model.sv` is a behavioural array of this kind.

### Statistics

`pcm_write_stats` adds up five counts over all line writes:

* line writes;
* SET-free line writes;
* SET bits;
* RESET bits;
* write energy.

Write energy uses 22.5 pJ per SET bit and 29.7 pJ per RESET bit. It is kept
in units of 0.1 pJ (`energy_dpj`). `stats_clear` zeroes all counters.
`last_set_syms` gives the number of symbols of the last write that fell back
to a SET codeword.

The average write power used to compare coding schemes,
`(P_SET + P_RESET) / 4`, is left to software that reads these counters.

## Files

| file | contents |
|---|---|
| `rtl/wts_pkg.sv` | code table, encoder ROM builder, cell energies and latencies, command enum |
| `rtl/wts_encoder.sv` | one-symbol encoder (64 × 7 ROM) |
| `rtl/wts_decoder.sv` | one-symbol decoder (inverse of the table) |
| `rtl/wts_line_encoder.sv` | 256 symbol encoders side by side, plus a count of symbols needing a SET |
| `rtl/wts_line_decoder.sv` | 256 symbol decoders |
| `rtl/pcm_diff_write.sv` | SET/RESET masks and their population counts |
| `rtl/pcm_write_stats.sv` | write counters and energy accumulator |
| `rtl/wts_pcm_controller.sv` | top: read-modify-write sequencer |
| `tb/tb_wts_ref_pkg.sv` | independent reference model of the improved code and of the plain WTS code |
| `tb/pcm_array_model.sv` | behavioural PCM line store for the top-level test |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_wts_transactions` |

The top's parameters are:

| parameter | default | meaning |
|---|---|---|
| `DATA_BITS` | 512 | data bits per line; the line has `2*DATA_BITS` cells |
| `ADDR_W` | 27 | line address bits, enough for 8 GB of 64-byte lines |
| `T_READ` | 100 | read latency in cycles |
| `T_SET` | 120 | SET window in cycles |
| `T_RESET` | 40 | RESET window in cycles |
| `ACC_W` | 48 | width of the statistics counters |

The code itself, `K = 2` and `N = 4`, is fixed by the table in `wts_pkg`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each one also has a watchdog. Use Verilator 5 and put the packages first.
For example, for the full-size end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_wts_pcm_controller \
  rtl/wts_pkg.sv tb/tb_wts_ref_pkg.sv tb/tb_wts_pcm_controller.sv
./obj_dir/Vtb_wts_pcm_controller
```

Swap in another `tb_*` name to run the other testbenches.

* **`tb_wts_pcm_controller`** runs the top at its default parameters. It
  uses an 8-line array model and about 80 operations. It checks for every
  operation:
  * read data;
  * latency in cycles;
  * write-window length;
  * the SET-free flag;
  * cell contents;
  * all statistics.

  It also checks that each of these happened at least once: a read, a write
  with a SET, a RESET-only write, an unchanged write, a symbol fallback, a
  request stalled while the controller is busy, and a statistics clear. The
  worked example above runs on all 256 symbols of one line.
* **`tb_wts_transactions`** writes 1000 random symbols to one cell group,
  all checked against the reference. It tallies SET bits for each of the 16
  transactions `d_a → d_b`, for this code and for the plain WTS code. It
  requires the improved code to need fewer SET bits in total. It also
  requires `11 → 00` to be the costliest transaction. A typical run counts
  546 SET bits against 653 for the plain code.
* The unit testbenches check the encoder against all 64 input pairs and the
  decoder against all 16 codewords. The other units get random full-width
  vectors.

## How far to trust it

* The code table, the selection rule and the SET/RESET polarity are those
  of the improved WTS scheme. The worked example above is reproduced
  exactly.
* The table's Hamming weights were checked entry by entry. Six codewords
  have weight two (C5..C10) and four have weight three (C11..C14).
* The fallback when every codeword needs a SET takes the *lightest*
  codeword. It does not search for the one with the fewest SET bits. In
  the example `0100`, `1010` and `1011` each clear one bit of `0110`, and
  `0100` is taken because it is the lightest.

### Choices made here

These parts are this design's own; the scheme says nothing about them:

* the line layout of the symbols;
* the host and array handshakes;
* serving one request at a time;
* the 800 MHz cycle base;
* the counter widths;
* the asynchronous active-low reset.

### Not included

The memory system around the controller is not part of this RTL: banks,
read/write queues and their scheduling, DRAM cache and processors.

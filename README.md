# Soft repair for a de-interleaver SRAM: permuting sensitivity regions

An OFDM receiver's frequency-time de-interleaver (FTDI) is usually the
largest memory on the chip. In an ISDB-T receiver it is several megabits and
more than half of the core area. Manufacturing faults in it are likely. The
classic repair is spare rows and columns, and those cost area. This design
uses no spares. It relies on two facts:

* The receiver already has strong forward error correction downstream
  (soft-output Viterbi, then Reed-Solomon (204,188)). It can absorb a few
  wrong bits.
* Bits are not equally important. A stuck sign bit of I or Q hurts the bit
  error rate far more than a stuck least significant bit.

So, when a memory test finds a word whose **important bits** (the
high-sensitivity region) have a fault and whose **unimportant bits** (the
low-sensitivity region) have none, the design marks that row. From then on,
every write to the row swaps the two regions before storing, and every read
swaps them back. The sensitive data then sit in good cells, and only the
least significant bits land on the bad ones. The cost is one 2:1 mux on the
write path, one per instance on the read path, and a small register of
ceil(M/i) bits per memory instance.

This repository holds the SystemVerilog for one FTDI RAM tile with this
repair logic (`ftdi_ram_tile`), its sub-blocks, and self-checking
testbenches.

## The stored sample and its two regions

Each de-interleaver sample is 20 bits: 8 bits of I, 8 bits of Q and 4 bits
of the carrier-to-noise ratio CN. Two samples make one 40-bit memory word.

```
 sample (20 bits):  | I[7:0]  (19:12) | Q[7:0]  (11:4) | CN[3:0] (3:0) |
 high region:         I[7:4]            Q[7:4]           CN[3:2]    10 bits
 low region:          I[3:0]            Q[3:0]           CN[1:0]    10 bits
 word (40 bits):    | sample 1 (39:20) | sample 0 (19:0) |
 word masks:        high = 40'hF0F0C_F0F0C,  low = 40'h0F0F3_0F0F3
```

The field widths and the region split are those of the measured hardware
configuration of the published scheme. The order of the fields inside a
sample is this design's choice. All of it lives in `rtl/ftdi_pkg.sv`.

The ITL ("repair interleave") permutation swaps, inside each field, the upper
half with the lower half: I[7:4] trades places with I[3:0], Q[7:4] with
Q[3:0], and CN[3:2] with CN[1:0]. The swap is its own inverse, so one
block serves both the write path and the read path. It is pure wiring.

## Tile architecture

```
 data ──┐
        AND ── d ──┬────────────► 2:1 ──► wr_word ──► SRAM k   (k = 0..3, 16K x 40)
 mask ──┘          └── ITL ─────►  ▲                    │ rdata
                             repair_en_write            ├────────────► 2:1 ──► rd_word[k]
                                                        └── ITL ─────►  ▲
                                                               repair_en_read[k]
 rd_word[0..3] ──► 4:1 (addr[16:15], registered) ──► 2:1 (addr[0], registered) ──► out[19:0]

 row_fault_reg k : ceil(1024/i) bits beside each SRAM, looked up with the current row
 error_capture_repair : fills the registers in MBIST mode, drives the repair enables
```

| Module | Role |
|---|---|
| `ftdi_pkg` | Sizes, sample struct, region masks, row-from-address function |
| `ftdi_sram` | One instance: 1024 rows × 16 words × 40 bits, single port, 1-cycle synchronous read |
| `repair_itl` | The region swap, combinational |
| `row_fault_reg` | ceil(M/i) flip-flops; one bit per group of i consecutive rows |
| `error_capture_repair` | Serial error-register capture, region test, set requests, repair enables |
| `ftdi_ram_tile` | Four instances, write and read paths, output muxes |

### Address map

| Bits | Meaning |
|---|---|
| `addr[16:15]` | instance |
| `addr[14:5]` | physical row (0..1023) |
| `addr[14:1]` | word within the instance |
| `addr[0]` | sample on reads: 0 gives bits 19:0, 1 gives bits 39:20 |

The instance fields and widths come from the original tile drawing. The
split of `addr[14:1]` into a row and a 4-bit column (16 words per row) is
this design's reading of "1K rows" together with a 14-bit word address.
It makes one tile 4 × 16384 × 40 = 2,621,440 bits.

### Functional mode (`mbist_mode = 0`)

* **Write:** `we[k]` stores `data & mask` into instance k at `addr[14:1]`.
  Both samples of the word are written. `repair_en_write` is the fault bit
  of the addressed row in the instance selected by `addr[16:15]`. It is
  combinational, in the same cycle. When it is set, the word goes through
  the ITL. There is one write-path ITL for all four instances. For that
  reason only the instance that `addr[16:15]` points at may be written, and
  an assertion checks this.
* **Read:** present `addr` with `we = 0`. `out` holds the sample on the next
  cycle. The same cycle, each instance's fault bit for the row is
  registered into `repair_en_read[k]`, so it lines up with the SRAM data.
  A read can be issued every cycle.

### MBIST mode (`mbist_mode = 1`)

The tile expects an external memory BIST (a commercial self-test processor
in the original system). The BIST reads and writes the cells through the
same `we`/`data`/`addr`/`out` ports. Both repair enables are held at 0 in
this mode, so the test sees the raw cells. Entering the mode clears every
fault register.

Error report protocol (this design's own choice):

1. The BIST raises `cur_err_out` for one cycle and puts the failing word's
   address on `test_addr` (same format as `addr`).
2. On the following cycles it shifts the 40-bit error word (read XOR
   expected) into `err_sout`, most significant bit first. One bit is taken
   per cycle in which `err_shift` is high, and gaps are allowed.
3. In the cycle after the 40th bit, the logic checks the word. If it has
   at least one error bit in the high region and none in the low region, it
   sets the fault bit for that row's group in that instance.
4. `err_busy` is high from step 1 through step 3. A new report must wait
   until it falls.

Each report is judged on its own. Take a word with a stuck-at-0 bit in the
high region and a stuck-at-1 bit in the low region. A march test sees the
low-region error during its read-0 pass, and that report is rejected. It
sees the high-region error alone during its read-1 pass, and that report
marks the row. A marked bit is never cleared until the next entry into
MBIST mode. When i > 1, one faulty row marks its whole group, so
fault-free neighbours are also permuted. That is harmless.

## The one parameter: i (`ROWS_PER_BIT`)

`ftdi_ram_tile #(.ROWS_PER_BIT(i))` sets how many physical rows share one
fault register bit. The register has ceil(1024/i) bits per instance.

| i | bits per instance | bits per tile | note |
|---|---|---|---|
| 1 | 1024 | 4096 | one bit per row |
| 2 | 512 | 2048 | |
| 4 (default) | 256 | 1024 | the configuration reported at 1.7 % area overhead |
| 256 | 4 | 16 | smallest useful setting |

A larger i costs less area, but more fault-free rows get permuted along
with a faulty one. It also becomes more likely that a row with low-region
faults shares a group with a marked row. Those low-region faults then hit
the high-region data. The design does not guard against this case, and
neither does the published scheme.

## What is and is not here

Included: the complete repair datapath and control of the tile, and the
SRAM as a plain array model.

Not included, because the scheme only uses them:

* the memory BIST itself;
* the JTAG/P1500 test access, the fuse box and the rest of the DFT
  infrastructure;
* the de-interleaving address generation (frequency and time), which follows
  the ISDB-T standard;
* the demappers and the Viterbi/Reed-Solomon decoders.

Departures and open points:

* The published simulation study used 6-bit I/Q and 3-bit CN with a
  different region split. This RTL follows the 8/8/4 hardware
  configuration. Other widths require editing `ftdi_pkg`. The ITL needs
  even field widths.
* The permutation is hard-wired. The published text also mentions a
  programmable permutation network as an option, and it is not built.
* Read latency, the error-report handshake, reset behaviour, column
  multiplexing and the sample order are choices made here. The published
  architecture leaves them open.
* The published clock rate (69.4 MHz in 65 nm, against a 64 MHz
  specification) has not been checked. No timing analysis was made. The
  added logic is one 2:1 mux on each path, as in the original.
* Only one error report is taken in at a time, even though the original
  algorithm treats the instances in parallel. A BIST that tests the four
  instances concurrently has to serialise its reports.
* One tile holds 131,072 samples. A full ISDB-T time de-interleaver needs
  several tiles, and how they are combined is outside this RTL.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_repair_itl` | swap against a bit-slice reference; double application gives the identity |
| `tb_ftdi_sram` | 1-cycle read, read-before-write, all rows, first and last word |
| `tb_row_fault_reg` | i = 1, 2, 4 side by side; register width; every lookup; clear beats set; reset |
| `tb_error_capture_repair` | clear pulse; random error words with random shift gaps; set only for high-only words, in the cycle after bit 40; repair enables in both modes |
| `tb_ftdi_ram_tile` | end to end at the default size (below) |
| `tb_ftdi_ram_tile_rows_per_bit` | the same end-to-end run for i = 1, 2 and 256; the i = 2 run uses March C- as its memory test |
| `tb_ftdi_ram_tile_nsa400` | 400 alternating stuck-at faults in a burst on one bit, for I[7], I[6], I[5] and Q[4] |

The last two are built on the helper `tb/tile_e2e_run.sv`, which has
parameters for i, the fault set (mixed or a burst of N faults on one bit)
and the march algorithm.

End-to-end run (`tb_ftdi_ram_tile`, full default size, about 0.9 M cycles):

1. About 47 stuck-at faults are placed in the cells. Some are placed by
   hand to cover each case of the marking rule, and the rest are random.
   The testbench forces each faulty bit back to its stuck value on every
   falling clock edge, through a hierarchical reference to the SRAM array.
2. A behavioural BIST runs MATS+ ({any(w0); up(r0,w1); down(r1,w0)}) over
   all 65,536 words. It reports mismatches with the serial protocol.
3. Every fault register bit is compared with an independent reference.
4. Functional writes (random data, random masks) and back-to-back reads
   are compared with a reference model. The model applies the swap, the
   stuck bits and the swap back. The test also checks the raw stored word,
   and that words with only high-region faults read back with their high
   region intact.
5. A second BIST pass on a fault-free memory must clear every mark.

The test counts each mechanism: error reports, marks, rejected reports,
repaired writes and reads, shared-bit repair, masked writes, both output
samples, mode switches and clearing. Any mechanism that never occurs is
counted as a failure.

### What the simulations show

With a burst of 400 alternating stuck-at-0 and stuck-at-1 faults on one of
the top bits of I or Q, every row of the burst is marked. The read data then
have no high-region bit errors. The same faults without the repair cause
379 to 397 of them. The corrupted bits move to the matching low-region bit
(I[7] becomes I[3], for example).

With scattered faults and coarse grouping, the trade-off of the previous
section shows up. In the mixed fault set at i = 256, a few low-region
faults share a group with a marked row, and they then corrupt high-region
data. There were 11 high-region errors with the repair against 12 without.
At i = 1 and i = 2 the counts were 2 to 3 with the repair against 12 to 14
without.

These are counts of bit errors in stored samples. The bit error rate after
the Viterbi and Reed-Solomon decoders, which is how the scheme is judged at
system level, is outside the scope of this RTL.

To run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl \
    rtl/ftdi_pkg.sv tb/tb_ftdi_ram_tile.sv --top-module tb_ftdi_ram_tile
./obj_dir/Vtb_ftdi_ram_tile
```

Substitute any other testbench name. Each one finishes within a few
seconds.

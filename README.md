# Floor-free block interleaver for 4-stream MIMO WLAN

An 802.11n-style transmitter interleaves the coded bits of each spatial
stream in three steps: a row/column block permutation, a swap of bits
between more and less significant constellation positions, and, for streams
2 to 4, a frequency rotation. Written as formulas, all three steps use the
floor function (integer division), which is awkward to build in hardware.
The usual alternative is a table of precomputed addresses for every
modulation, bandwidth and stream, which costs a lot of memory.

This design computes the interleaved addresses as it goes, with no floor, no
divider and no address table. A column counter and a row counter walk the
interleaver block. A few adders, comparators and multiplexers, plus one
multiplication by the row count D, turn the counter values into each
stream's write address. Each stream's data are written at these permuted
addresses into one half of a dual-port memory, and read back in natural
order from the other half. The two halves swap roles at the end of every
block, so the interleaver takes and delivers one word per stream per clock
without gaps.

Supported settings: BPSK, QPSK, 16-QAM and 64-QAM; 20 MHz and 40 MHz; four
spatial streams, all processed in parallel.

## The permutation

For a block of N coded bits (N = C · D), input bit k goes to output position
r(k):

```
step 1   m = D · (k mod C) + floor(k / C)
step 2   j = s · floor(m / s) + (m + N − floor(C · m / N)) mod s,   s = max(1, Nbpscs / 2)
step 3   r = (j − Jrot) mod N
         Jrot = ( ((iss−1)·2) mod 3 + 3·floor((iss−1)/3) ) · Nrot · Nbpscs
```

| setting | C (columns) | D (rows) | N | Nrot |
|---|---|---|---|---|
| 20 MHz | 13 | 4 · Nbpscs | 52 · Nbpscs (52, 104, 208, 312) | 13 |
| 40 MHz | 18 | 6 · Nbpscs | 108 · Nbpscs (108, 216, 432, 648) | 29 |

Here Nbpscs is 1, 2, 4 or 6 bits per subcarrier, and iss is the stream
number, 1 to 4.

**Caution on Nrot.** The rotation constants this design uses correspond to
Nrot = 13 at 20 MHz and 29 at 40 MHz. IEEE 802.11n-2009 lists Nrot = 11
at 20 MHz; check this against your copy of the standard. If you need bit-exact compliance at 20 MHz,
recompute the stream offsets (next section) for Nrot = 11. Stream 1 is not
affected. The 40 MHz values agree.

## How the address is built without floor

Write index k as a position in a C-column, D-row block: column i = k mod C
and row j = floor(k / C). In hardware these are just two counters. ICOUNT
counts i every clock. JCOUNT counts j and advances each time ICOUNT wraps.
Step 1 is then simply `D·i + j`.

**Rotation as a block offset.** For a given stream, Jrot is a constant.
Subtracting it modulo N is the same as adding N − Jrot, and that shift can
be written as `D·I + J`: I whole columns plus J rows. With the constants
above, every shift falls out as:

| stream | 20 MHz (C = 13) | 40 MHz (C = 18) |
|---|---|---|
| 1 | I = 0, J = 0 | I = 0, J = 0 |
| 2 | I = 6, J = 2·Nbpscs | I = 8, J = 2·Nbpscs |
| 3 | I = 9, J = 3·Nbpscs | I = 13, J = Nbpscs |
| 4 | I = 3, J = Nbpscs | I = 3, J = 3·Nbpscs |

So the address is `(D·(i+I) + (j+J)) mod N`. Because J < D and I < C, the
"mod N" becomes at most one row wrap (which carries one column) and one
column wrap. Three comparisons select one of four cases:

| row | column | address |
|---|---|---|
| j < D−J | i < C−I | D·(i+I) + (j+J) |
| j < D−J | i ≥ C−I | D·(i−(C−I)) + (j+J) |
| j ≥ D−J | i < C−I−1 | D·(i+I+1) + (j−(D−J)) |
| j ≥ D−J | i ≥ C−I−1 | D·(i−(C−I−1)) + (j−(D−J)) |

This is the whole story for BPSK and QPSK, where s = 1 and step 2 does
nothing.

**Step 2 for 16-QAM and 64-QAM.** Step 2 only reorders rows inside groups
of s rows, and the reordering depends on the column. It therefore becomes a
small adjustment `adj(i mod s, j mod s)` of the row term, applied in both
the wrapped and the unwrapped form (j + J + adj, or j − (D − J − adj)):

| | j mod s = 0 | j mod s = 1 | j mod s = 2 |
|---|---|---|---|
| 16-QAM, i odd | +1 | −1 | |
| 64-QAM, i mod 3 = 1 | +2 | −1 | −1 |
| 64-QAM, i mod 3 = 2 | +1 | +1 | −2 |

For even i (16-QAM), or i mod 3 = 0 (64-QAM), the adjustment is 0. J and
D − J are multiples of s, so the adjustment never changes which wrap case
applies. The generators code the case as a select word:

- 16-QAM: `II4 = {column wraps, i mod 2}` and `JJ4 = {row wraps, j mod 2}`.
- 64-QAM: `II6` and `JJ6` take values 0–2 for "no wrap" and 3–5 for "wrap",
  plus the residue.

A tree of multiplexers then picks the row term and the column term. The
residues i mod 3 and j mod 3 come from two small modulo-3 counters that run
beside ICOUNT and JCOUNT. i mod 2 and j mod 2 are bit 0 of the counters.

## Datapath

```
mimo_interleaver
├── address_generator
│   ├── frame_dims          D (4..36) and C (13/18) from BW and modulation
│   ├── rowcol_counter      ICOUNT, JCOUNT, i mod 3, j mod 3, end of block
│   ├── wa_stream ×4        one write-address path per stream
│   │   ├── stream_offsets  I_x, J_y of the table above
│   │   ├── boundary_compare   i < C−I, i < C−I−1, j < D−J
│   │   ├── wa_gen_bq       BPSK/QPSK generator (4 cases)
│   │   ├── wa_gen_qam16    16-QAM generator (II4/JJ4 tree)
│   │   └── wa_gen_qam64    64-QAM generator (II6/JJ6 tree)
│   │       → 4:1 multiplexer on the modulation code
│   ├── ra_gen              read counter 0..N−1 (N chosen by multiplexers)
│   └── toggle flip-flop    sel, flips at every block end
└── memory_block ×4
    └── dp_ram              1296 × 6 dual-port memory
```

All four streams share the counters, the read counter and the select. Only
the rotation offsets differ between streams. An assertion in
`address_generator` checks that the C × D walk and the N-count read counter
always end a block on the same clock.

**Ping-pong memory.** Each stream has one dual-port memory of 2 × 648 words.
Words 0–647 are port A's half; words 648–1295 are port B's half, reached
through an adder that adds 648 (288 hex) to port B's address. The select
decides which half is written and which is read:

| sel | port A | port B | output |
|---|---|---|---|
| 1 | writes at WA | reads at RA + 648 | port B |
| 0 | reads at RA | writes at WA + 648 | port A |

The write enables are WE_A = sel and WE_B = not sel. The memory reads
synchronously, so the output multiplexer uses sel delayed by one clock.
Without that delay, the last word of every block would come from the wrong
half.

## Interface and timing (`mimo_interleaver`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst | in | 1 | synchronous, active-high reset |
| bw | in | 1 | 0 = 20 MHz, 1 = 40 MHz |
| nbpscs | in | 2 | 00 BPSK, 01 QPSK, 10 16-QAM, 11 64-QAM |
| din | in | 24 | one 6-bit word per stream; stream 1 in bits 5:0 |
| dout | out | 4 × 6 | interleaved words, stream 1 in `dout[0]` |
| int_add | out | 4 × 10 | write address of each stream (for observation) |
| rd_add | out | 10 | common read address |
| sel | out | 4 | ping-pong select of each stream |

Parameters: `DATA_W` = 6, `ADDR_W` = 10, and `BANK_OFFSET` = 648 (words
per memory half).

Timing:

- Take cycle 0 to be the first clock with rst low. Word k of block b enters
  in cycle b·N + k.
- Block b leaves in natural order in cycles (b+1)·N + 1 to (b+2)·N. That is
  a latency of N + 1 clocks: N clocks to fill the block, plus one clock of
  memory read.
- Input and output run continuously at one word per stream per clock. There
  is no valid or handshake signal.
- Change `bw` or `nbpscs` only together with a reset. The counters compare
  with ≥, so a shrinking limit cannot strand them, but the block in flight
  is lost.

Each memory word is 6 bits wide, enough for all coded bits of one 64-QAM
subcarrier. How the coded bits are packed into these words is up to the
surrounding transmitter. The interleaver permutes words as it is told.

## Choices made in this implementation

The following points are not fixed by the architecture this RTL follows.
They were settled here:

- **Step 2 parameter.** s = max(1, Nbpscs/2), so BPSK and QPSK share one
  generator. This is what the 16-QAM (mod 2) and 64-QAM (mod 3)
  generators need.
- **Memory address multiplexers.** They are connected as in the table
  above, consistent with the write enables and the output multiplexer. The
  memory address is 11 bits, because port B's half reaches word 1295.
- **Carry-side column selects.** On the row-wrap side, the 16-QAM and
  64-QAM generators use their own column-wrap select based on i < C−I−1
  (II4c, II6c). This is what the address equations require.
- **Shared read side.** One read counter and one toggle flip-flop serve all
  four streams, since their values are identical. The per-stream RA and sel
  outputs are copies.
- **Reset.** Reset is synchronous and active high. Memory contents are not
  reset.
- **Column order and counter limits.** ICOUNT is the inner (fast) counter.
  The counter and read-counter limits compare with ≥ rather than ==.
- **Multiplier.** The multiplication by D is a plain `*`. On an FPGA it maps
  to a DSP block. Each of the three generators of a stream has its own multiplier;
  only one result is used at a time, so they could be merged into one
  multiplier after the column-term multiplexer.

Synthesised with yosys (generic cells), the whole interleaver is about 420
word-level cells, 28 flip-flops and 4 × 1296 × 6 memory bits.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line. The reference model,
`tb/intlv_ref_pkg.sv`, evaluates the three steps literally, with integer
division and modulo, so it is independent of the floor-free arithmetic.

- `tb_wa_gen_bq`, `tb_wa_gen_qam16`, `tb_wa_gen_qam64`, `tb_wa_stream`:
  every k of every block, for all streams, modulations and bandwidths,
  against the reference.
- `tb_address_generator`: clocked run of all eight settings over three
  blocks each: write addresses, read addresses, select toggling every N
  clocks. It also checks published worked examples: address tables for BPSK
  stream 4, 16-QAM stream 2 and 64-QAM stream 3 at 20 MHz, and the first
  addresses of all four streams for BPSK at 20 MHz and 64-QAM at 40 MHz.
- `tb_stream_offsets`: checks the offset table, and checks that D·I + J
  equals N − Jrot.
- `tb_rowcol_counter`, `tb_frame_dims`, `tb_boundary_compare`, `tb_ra_gen`,
  `tb_dp_ram`, `tb_memory_block`: unit checks of the counters, dimensions,
  comparators, read counter, memory and ping-pong swap.
- `tb_mimo_interleaver`: end to end at the default parameters. It runs all
  eight settings (each a reset-and-switch), four blocks of random data on
  all streams, and checks every output word and the N + 1 latency. It counts
  mode switches, ping-pong swaps, read-counter wraps, row and column wraps,
  and use of each generator, and fails if any never happens.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/intlv_pkg.sv tb/intlv_ref_pkg.sv tb/tb_mimo_interleaver.sv \
    --top-module tb_mimo_interleaver
./obj_dir/Vtb_mimo_interleaver
```

Replace the last file and the top name to run another testbench. Each one
finishes in well under a second.

Not verified: timing closure at any clock frequency, and behaviour on FPGA
hardware.

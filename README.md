# JCAEBBEC: burst-error-correcting, crosstalk-avoiding link code for NoC routers

A network-on-chip link carries each flit over a bundle of long parallel wires.
Two things go wrong on such wires. Coupling between neighbours (crosstalk)
slows or corrupts transitions, and noise flips bits, often several adjacent
ones at once (a burst). This design protects a 32-bit flit against both with
"joint crosstalk avoidance with eight-bit burst error correction" (JCAEBBEC):

1. The 32 payload bits are arranged as an 8 x 4 matrix, and each row gets its
   own Hamming(7,4) code: 24 redundant bits, 56 code bits.
2. The 56 bits are sent column by column, so neighbouring wires of one copy
   always belong to different rows.
3. The 56-bit copy is sent twice, and the two copies are interleaved bit by
   bit on 112 wires. Each wire then has a neighbour carrying the same value,
   so no wire can ever switch while both of its neighbours switch the other
   way, which is the worst crosstalk case.
4. The receiver decodes both copies independently and a checker decides which
   corrected copy to deliver, or that neither can be trusted.

Any burst of up to 16 adjacent wires is always corrected. Any one or two wrong
wires anywhere are always corrected. Heavier random errors are corrected most
of the time (see [How well it corrects](#how-well-it-corrects)).

All logic is combinational except the two pipeline registers of the link hop.

## The Hamming matrix and the wire order

Payload bit `Mk` is `data[k]`. The matrix is filled column by column:

| row | col 0 | col 1 | col 2 | col 3 |
|-----|-------|-------|-------|-------|
| 0   | M0    | M8    | M16   | M24   |
| 1   | M1    | M9    | M17   | M25   |
| …   | …     | …     | …     | …     |
| 7   | M7    | M15   | M23   | M31   |

For a row with data bits d0..d3 (columns 0..3) the three redundant bits are

    P1 = d0 ^ d1 ^ d3
    P2 = d0 ^ d2 ^ d3
    P3 = d1 ^ d2 ^ d3

One copy is the 8 x 7 code matrix sent column by column. Code bit `c*8 + r`
is slot `c` of row `r`, and the slot order is

| slot c | 0  | 1  | 2  | 3  | 4  | 5  | 6  |
|--------|----|----|----|----|----|----|----|
| holds  | d0 | d1 | d2 | P3 | d3 | P2 | P1 |

So code bits 0..7 are M0..M7, bits 24..31 are the P3 bits of rows 0..7, and
bits 48..55 are the P1 bits. The code is systematic: 32 of the 56 bits are the
payload bits on new positions.

On the link, `link[2*i]` is bit `i` of copy I and `link[2*i+1]` is bit `i` of
copy II.

## Why bursts of 16 wires are corrected

A burst of at most 16 adjacent wires covers at most 8 consecutive bits of each
copy, because the copies alternate. Eight consecutive code bits of a copy are
in eight different rows, because a column has 8 rows. So every row of both
copies has at most one error. A single error per row is within Hamming(7,4)'s
reach, and both copies decode to the right payload.

The same argument holds for any `ROWS`. The matrix height is the parameter
`ROWS` (default 8). The payload is `4*ROWS` bits, a copy is `7*ROWS` and the
link is `14*ROWS` wires. A burst of up to `2*ROWS` wires is corrected.

## Decoding one copy

For each row the decoder recomputes the three checks from the received bits:

    S1 = P1 ^ d0 ^ d1 ^ d3
    S2 = P2 ^ d0 ^ d2 ^ d3
    S3 = P3 ^ d1 ^ d2 ^ d3

The value `{S3,S2,S1}` is the position of a single flipped bit in the classic
Hamming order `P1 P2 d0 P3 d1 d2 d3` (positions 1..7):

| syndrome | 0    | 1  | 2  | 3  | 4  | 5  | 6  | 7  |
|----------|------|----|----|----|----|----|----|----|
| wrong bit| none | P1 | P2 | d0 | P3 | d1 | d2 | d3 |

The data bit it names is inverted. Each row with a non-zero syndrome is flagged
and the flags are counted.

Two errors in one row always give a non-zero syndrome. That syndrome points at
a third bit, so the row is miscorrected. Three errors can also cancel to a zero
syndrome. One copy alone cannot notice either case, so the copy decision has to
use the other copy.

## Choosing a copy: the checker

This is the least obvious part of the design. The published scheme says only
that the checker chooses a copy "based on the number of errors". It names four
situations:

- no error;
- errors both copies can correct;
- errors only one copy can correct;
- errors neither can correct, when no copy is chosen.

The checker here scores each copy's corrected payload by how many received bit
errors that payload implies, counted over both received copies:

    score(I)  = rows corrected in copy I
              + bits where received copy II differs from encode(payload I)
    score(II) = rows corrected in copy II
              + bits where received copy I differs from encode(payload II)

Then:

| corrected payloads | scores          | delivered | `sel`   | `uncorrectable` |
|--------------------|-----------------|-----------|---------|-----------------|
| equal              | (equal)         | copy I    | COPY_I  | 0               |
| differ             | II lower        | copy II   | COPY_II | 0               |
| differ             | I lower         | copy I    | COPY_I  | 0               |
| differ             | equal           | copy I    | COPY_I  | 1               |

Take as an example copy I with two errors in row 3, and copy II clean.
Copy I's decoder miscorrects row 3 into a payload that is 3 code bits away from
the real one. Copy I's score is 1 (its correction) plus at least 3 (where its
payload disagrees with clean copy II). Copy II's score is 0 (no corrections)
plus 2 (the two errors in copy I). Copy II wins.

A tie means both payloads explain the received bits equally well. No decoder
can then know which one was sent, so the flit is flagged rather than delivered
silently. The flagged flit still carries copy I's payload. What to do with it
(drop, retransmit) is left to the router.

A simpler checker is possible: prefer the copy with fewer corrected rows. It
delivers only about 90% of three-error flits split one/two between the copies.
The scoring above raises that to 99.5%. It costs two extra matrix encoders and
two 56-bit ones-counters.

## How well it corrects

`tb/tb_error_capability.sv` measures this with the default size. It tries
bursts of 1..16 wires at every offset. It also injects k random wire errors,
for every split of the k errors between the two copies (1500 flits per split),
and averages over the splits.

| errors on the link      | delivered intact | flagged | delivered wrong | published figure |
|-------------------------|------------------|---------|-----------------|------------------|
| burst of 1..16 wires    | 100%             | 0       | 0               | 100%             |
| 1 random                | 100%             | 0       | 0               | 100%             |
| 2 random                | 100%             | 0       | 0               | 100%             |
| 3 random                | 99.6%            | 0.4%    | 0               | 100%             |
| 4 random                | 98.4%            | 1.6%    | 0.05%           | 98.06%           |
| 5 random                | 95.6%            | 4.3%    | 0.12%           | 96.77% / 90.77%  |
| 6 random                | 91.9%            | 7.4%    | 0.7%            | 93.27%           |
| 7 random                | 87.0%            | 10.8%   | 2.2%            | 90.64%           |

The published scheme gives two figures for five errors. Its averaging over the
splits is not defined, so the last column is only a rough guide.

Two published claims cannot hold for every error pattern. The first is 100% for
all three-error patterns. The second is 100% for an 8-bit burst in one copy
with "any" random errors in the other. Some patterns turn a copy into a
different valid code word exactly as far from the received bits as the real
one, for example three errors in one row that form a Hamming code word. This
design flags those flits; it does not deliver them wrong.

## The link hop (`jcaebbec_link`)

The error control sits inside the routers, at both ends of one link:

    tx_data_i ─► jcaebbec_encoder ─► [launch reg] ─► link_tx_o ══ wires ══►
    link_rx_i ─► [capture reg] ─► jcaebbec_decoder ─► rx_data_o, flags

- The wires are not part of the module. In a system, `link_tx_o` of the
  sending router's port connects to `link_rx_i` of the receiving router's port,
  and `link_valid_o` connects to `link_valid_i`.
- `tx_valid_i` qualifies a flit. It crosses the link on one extra wire that the
  code does not protect.
- Latency: with the wires connected, a flit presented at clock edge *n* is on
  `rx_data_o` after edge *n+2*. Launch and capture registers are loaded only
  for valid flits. A new flit can be accepted every clock.
- `rst_n` is a synchronous, active-low reset that clears the two valid
  registers only.
- Status with each delivered flit:
  - `rx_sel_o`: the copy used (`COPY_I`/`COPY_II` of `jcaebbec_pkg::copy_sel_e`);
  - `rx_corrected_o`: some row of either copy had a non-zero syndrome;
  - `rx_uncorrectable_o`: the tie case above.

The router's own routing, arbitration and crossbar, and the network interface,
are not part of this RTL. `tx_*` and `rx_*` are where they connect.

## Modules

| file                          | what it is                                                      |
|-------------------------------|-----------------------------------------------------------------|
| `rtl/jcaebbec_pkg.sv`         | default size, column slots, row parity and row encoding, `copy_sel_e` |
| `rtl/hamming_matrix_encoder.sv` | payload to one 56-bit copy                                    |
| `rtl/jcaebbec_encoder.sv`     | encoder plus duplication/interleaving onto 112 wires            |
| `rtl/copy_decoder.sv`         | syndromes, single-error correction per row, flagged-row count   |
| `rtl/copy_checker.sv`         | scoring, copy selection, uncorrectable flag                     |
| `rtl/jcaebbec_decoder.sv`     | group separator (de-interleave), two copy decoders, checker     |
| `rtl/jcaebbec_link.sv`        | top: registered link hop                                        |

Every module takes the parameter `ROWS` (default 8).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it with a failure if it hangs. The testbenches compare the RTL
with a reference model in `tb/tb_jcaebbec_ref_pkg.sv`. That model is written
separately from the RTL:

- it encodes with explicit bit indices;
- it decodes each row by brute-force nearest code word;
- it restates the checker rule.

All testbenches except `tb_rows_scaling` use the default `ROWS = 8`.

To run one with plain Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/jcaebbec_pkg.sv tb/tb_jcaebbec_ref_pkg.sv tb/tb_jcaebbec_link.sv \
        --top-module tb_jcaebbec_link
    ./obj_dir/Vtb_jcaebbec_link

To run another, replace `tb_jcaebbec_link` with one of the testbenches below:

| testbench                    | checks                                                          |
|------------------------------|-----------------------------------------------------------------|
| `tb_hamming_matrix_encoder`  | 56-bit copy for directed and random payloads, fan-out of each bit |
| `tb_jcaebbec_encoder`        | 112-wire word, equal neighbours                                 |
| `tb_copy_decoder`            | no error, one error in any set of rows, every 1..8-bit burst, double errors flagged |
| `tb_copy_checker`            | the four decision cases, random scores                          |
| `tb_jcaebbec_decoder`        | every 1..16-wire burst, 1-2 random errors, copy I ruined, 3..7 errors against the model |
| `tb_jcaebbec_link`           | 4000 flits through the registered hop, with idle gaps, per-flit error patterns, two-clock latency; every decision case must occur; no launched wire switches against both neighbours |
| `tb_error_capability`        | the correction statistics in the table above                    |
| `tb_rows_scaling`            | encoder and decoder back to back at `ROWS` = 2, 4 and 16: single errors and bursts of up to `2*ROWS` wires (helper `tb/roundtrip_check.sv`) |

All of them finish in about a second once built.

## Where this design goes beyond the published scheme

These are choices of this implementation.

- **Redundant-bit numbering.** The published parity equations number the
  redundant bits row by row; the published wire table numbers them column by
  column. The equations are used for the values and the table for the
  positions (slot order above).
- **Interleaving.** Copy I on even wires and copy II on odd wires.
- **Checker.** The scoring rule and the uncorrectable flag, as described
  above.
- **Link hop.** The register stages, the unprotected valid wire and the reset.

Synthesis figures, link power and voltage-swing analysis belong to a
standard-cell flow and wire models, not to this RTL.

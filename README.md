# 2x2 MIMO-OFDM transmitter with cross-antenna coding and per-antenna interleaving

This is synthesizable SystemVerilog for the transmit side of a two-antenna
spatial-multiplexing WiMAX-style (IEEE 802.16 OFDM PHY) link. One information
bit stream is convolutionally coded once. The coded bits are then split
between the two antennas, and each antenna's share is interleaved on its own.
This arrangement is called *cross-antenna coding with per-antenna
interleaving*. It is the scheme the paper this design follows found best among
the four ways of pairing coders and interleavers over two antennas. It has the
lowest bit error rate, the smallest interleaver memory and the lowest power.

The most unusual part is the interleaver. It implements the 802.16 block
interleaver with no address table and no transposing logic: only counters.
Each antenna's coded bits are spread over one-bit RAMs, one RAM per bit of a
constellation symbol. Reading the RAMs partition by partition then gives the
interleaved order. Double buffering hides the interleaving delay.

## Data path

```
                      system clock domain                      | OFDM clock domain (x 320/192)
                                                               |
 data_in ─┬─> [BPSK branch  ] ─┐                               |
          ├─> [QPSK branch  ] ─┤  chx, chy    ┌─ buf I x ─┐    |   ┌ pilot_insertion ┐  ifft_x_*  ┌ cp_insertion ┐
          ├─> [16-QAM branch] ─┼─> mux(sel) ──┤  buf Q x  ├────┼──>│ 256 bins        ├──> IFFT ──>│ 64 + 256     ├─> tx_x
          └─> [64-QAM branch] ─┘              │  buf I y  │    |   └─────────────────┘  (external)└──────────────┘
                                              └─ buf Q y ─┘    |    (same again for antenna y ─────────────────────> tx_y)

 one branch (mod_chain):
   conv_encoder ─X,Y─> puncturer ─x word─> interleaver ─> constellation_mapper ─> chx (I,Q)
                                 └y word─> interleaver ─> constellation_mapper ─> chy (I,Q)
```

All four modulation branches run in parallel on the same input, and `sel`
picks one of them, as in the paper's system diagram. Per OFDM symbol, each
antenna carries 192 data symbols. Each symbol becomes one subcarrier of a
256-point IFFT (192 data, 8 pilots, DC, 55 guard carriers). A 64-sample cyclic
prefix then makes a 320-sample OFDM symbol. All samples are signed 16-bit
values with 14 fractional bits (Q2.14).

| module | role |
|---|---|
| `ofdm_tx_pkg` | constants (256/192/64/12), `sample_t`, `iq_t`, `mod_e`, pilot positions |
| `conv_encoder` | K=7, rate-1/2 code, generators 171/133 (octal) |
| `puncturer` | rate-3/4 puncturing and split into antenna streams x and y |
| `interleaver` | double-buffered block interleaver of one antenna stream |
| `ilv_addr_gen` | its write/read address state machine |
| `ilv_bit_ram` | 384 x 1 buffer RAM |
| `constellation_mapper` | I and Q ROMs (BPSK, QPSK, 16-QAM, 64-QAM) |
| `mod_chain` | one modulation branch: encoder, puncturer, 2 interleavers, 2 mappers |
| `mod_select_mux` | branch selection by `sel` |
| `symbol_cdc_buffer` | 384 x 16 dual-clock double buffer (one each for I and Q, per antenna) |
| `pilot_insertion` | builds the 256 IFFT input bins |
| `cp_insertion` | prepends the cyclic prefix |
| `mimo_ofdm_tx` | top level |

## Coding and the split between antennas

`conv_encoder` is a 6-bit shift register with two XOR trees. X uses the
generator 171 and Y uses 133 (octal), as in 802.16. It accepts at most one
bit per clock, and the encoded pair appears one clock later.

`puncturer` handles the rate-3/4 modes. It shifts X and Y into two registers
of L = 3·NBPSC/2 bits: 3 for QPSK, 6 for 16-QAM and 9 for 64-QAM. When the
registers are full, it keeps the bits marked in these patterns, oldest bit
first:

```
X: 1 0 1 1 0 1 1 0 1      (QPSK uses the last 3, 16-QAM the last 6, 64-QAM all 9)
Y: 1 1 0 1 1 0 1 1 0
```

Each register then yields exactly NBPSC bits (2, 4 or 6). The kept X bits form
one constellation symbol's worth of bits for antenna x. The kept Y bits do the
same for antenna y. BPSK is not punctured: every coded pair goes out at once,
X to antenna x and Y to antenna y. This split is the "demux" of
cross-antenna coding. Because of it, the two antennas always receive bits at
the same moments, and the two per-antenna interleavers run in lockstep.

## The interleaver

The 802.16 interleaver permutes the NCBPS = 192·NBPSC coded bits of one
antenna and one OFDM symbol in two steps. First, the bits are written row by
row into 12 columns and read out column by column: bit k goes to position
(NCBPS/12)·(k mod 12) + ⌊k/12⌋. Second, inside each symbol, the bits are
rotated so that consecutive bits alternate between more and less reliable
constellation bits.

**Write.** The interleaver has NBPSC one-bit RAMs of 384 locations each, two
halves of 192. The puncturer delivers NBPSC bits at a time, and each bit goes
to a different RAM at the same address. The address is a plain counter. Coded
bit k therefore lands in RAM (k mod NBPSC) at address ⌊k/NBPSC⌋. For 64-QAM:

```
          RAM1  RAM2  RAM3  RAM4  RAM5  RAM6
addr 0:     0     1     2     3     4     5      <- coded bit numbers
addr 1:     6     7     8     9    10    11
addr 2:    12    13    14    15    16    17
 ...
addr 191: 1146  1147  1148  1149  1150  1151     (second half: addresses 192..383)
```

**Read.** Each RAM is divided into P = 12/NBPSC logical partitions. Partition
p holds the addresses with address mod P = p. For 64-QAM, P = 2 (even and odd
addresses). For 16-QAM, P = 3; for QPSK, 6; for BPSK, 12. Reading goes
partition 0 of RAM1, partition 0 of RAM2, …, partition 0 of RAM-NBPSC, then
partition 1 of every RAM in the same order, and so on. Inside a partition the
address steps by P. The column of bit k is k mod 12 = (RAM index) + NBPSC·p.
This walk therefore visits column 0, 1, …, 11 in order, and each column from
top to bottom: exactly the first permutation. The hardware needs a counter for
the partition, one for the RAM and one for the position, and an adder that
steps the address by P. `ilv_addr_gen` is that state machine.

**Symbols.** One bit is read per clock, and NBPSC successive bits form one
symbol, the first bit read being the MSB. The second 802.16 permutation only
moves bits inside a symbol. The interleaver applies it while it assembles the
symbol: inside each group of s = NBPSC/2 bits, the bit read at offset o goes to
offset (o − column) mod s. For BPSK and QPSK, s = 1 and nothing moves. The
parameter `SECOND_PERM` (default 1) can turn this off. The paper describes
only the RAM read order. Adding the second step in the symbol assembly is this
design's choice, so that the output matches the standard's two-step
definition.

**Double buffering.** While one half of every RAM is read, the next block is
written into the other half. Each RAM has one 1-bit write port and one 1-bit
read port. Only one RAM is read in any clock, so all RAMs share one read
address and differ only in their read enable. A half is read out in 192·NBPSC
clocks, and the writer needs 192·L clocks (L = 1, 3, 6, 9) to fill the other
half. The reader is therefore never the bottleneck, and for BPSK the two are
exactly equal. When a read-out ends and the other half is already full, the
next read-out starts in the next clock. A sticky `overflow` flag reports a
writer that completes a half which has not been read yet.

**Initial latency.** This is the time from the first input word to the first
output symbol, in clocks, at the puncturer's natural rate. The paper's figures
are for its FPGA implementation of the same scheme:

| modulation | this RTL | paper |
|---|---|---|
| BPSK | 196 | 192 |
| QPSK | 579 | 581 |
| 16-QAM | 1154 | 1160 |
| 64-QAM | 1729 | 1739 |

## Constellation mapping

`constellation_mapper` holds two ROMs, one for I and one for Q, each of
2^NBPSC Q2.14 words, addressed by the symbol. The contents are computed at
elaboration from the level tables, using 802.16 power normalisation: 1, 1/√2,
1/√10 and 1/√42. The first half of the symbol's bits sets I and the second
half sets Q (BPSK: I only). On each axis, the first bit is the sign and the
rest Gray-code the distance from the centre (64-QAM: 00→1, 01→3, 11→5, 10→7),
so neighbouring points differ in one bit. The paper only points to the
standard for the mapping. This exact bit-to-point assignment is this design's
choice and may differ from the standard's figure in bit labelling.

## Two clock domains

One OFDM symbol takes 13.89 µs on air (11.11 µs useful plus a quarter for the
prefix). In that time each antenna must send 320 samples, which needs a
23.1 MHz IFFT/OFDM clock. The coding side, meanwhile, delivers 192 symbols per
OFDM symbol. The OFDM clock therefore runs 320/192 ≈ 1.67 times faster than the
symbol rate. The system clock must carry one input bit per clock: 192, 576,
1152 or 1728 bits per OFDM symbol for BPSK to 64-QAM. That is 13.9, 41.5, 83
or 124.5 MHz for the paper's 2x2 raw rates of 13.88 to 125 Mbit/s.

`symbol_cdc_buffer` is the crossing. Its 384 x 16 memory is written with the
system clock and read with the OFDM clock. There is one buffer for I and one
for Q on each antenna, and the four share their read-side control. The writer
fills a half in order and then hands it over. The reader reads it in any order
and hands it back with `rd_release`. Each direction signals with one toggle
flip-flop per half, passed through a two-flop synchroniser; a half is "full"
while the writer's and the reader's toggles differ. Because only these slow,
single-bit toggles cross the clock boundary, any clock ratio works. If a word
arrives while its half is still held by the reader, the word is dropped and
`overflow` is set. The writer never takes a half back.

## OFDM symbol assembly

`pilot_insertion` starts a symbol when both I and Q buffers hold a full half.
It then emits the 256 IFFT input bins in natural order, n = 0..255. Bin n is
subcarrier k = n for n < 128 and k = n − 256 otherwise.

| subcarriers k | content |
|---|---|
| −128 … −101, +101 … +127 | guard, 0 (28 + 27) |
| 0 | DC, 0 |
| ±13, ±38, ±63, ±88 | pilot, +1.0 |
| the other 192 in −100 … +100 | data symbols 0 … 191 in ascending k |

It reads the data subcarriers from the buffer (one clock read latency, matched
inside) and releases the half after bin 255. Symbol starts are at least
`SYM_PERIOD` = 320 clocks apart, which is the rate at which the prefix stage
can send them. The pilot and guard positions are those of the 802.16 OFDM PHY.
The paper gives only the counts. The pilots are a constant +1. The standard's
pilot polarity sequence is not modelled.

The 256-point IFFT is an external pipelined streaming core. It is not part of
this RTL. The top level brings its interface out:

- `ifft_*_in_valid/_sop/_in` carry the bins to the core.
- `ifft_*_out_valid/_out` carry 256 time samples back, gaps allowed.

`cp_insertion` writes each IFFT output symbol into one half of a 2 x 256 I/Q
ping-pong buffer. When the half is full, it sends samples 192..255 (the
prefix) and then samples 0..255: 320 samples, with `tx_*_sos` on the first
one. The next symbol fills the other half in the meantime. Once the first
symbol is out, the output is continuous at matched clock rates. The end-to-end
test checks this.

## Top level: `mimo_ofdm_tx`

| port | dir | width | meaning |
|---|---|---|---|
| `sys_clk`, `sys_rst_n` | in | 1 | system clock, synchronous active-low reset |
| `ofdm_clk`, `ofdm_rst_n` | in | 1 | OFDM/IFFT clock and its reset |
| `sel` | in | 2 (`mod_e`) | 0 BPSK, 1 QPSK, 2 16-QAM, 3 64-QAM |
| `data_valid`, `data_in` | in | 1 | information bits, at most one per `sys_clk` |
| `ifft_x_in_valid`, `ifft_x_in_sop`, `ifft_x_in` | out | 1, 1, 32 (`iq_t`) | bins to antenna x's IFFT |
| `ifft_x_out_valid`, `ifft_x_out` | in | 1, 32 | antenna x's IFFT output |
| `tx_x_valid`, `tx_x_sos`, `tx_x` | out | 1, 1, 32 | antenna x's samples with prefix |
| `…_y…` | | | the same for antenna y |
| `ilv_overflow` | out | 4 | sticky, per branch |
| `buf_overflow`, `cp_overflow` | out | 1 | sticky |

Usage rules:

- Change `sel` only while `sys_rst_n` is low. The buffers are not realigned
  when a different branch is selected mid-symbol.
- Choose `ofdm_clk` to be at least 320/192 times the rate at which the selected
  branch delivers symbols.

From first input bit to first transmitted sample, the simulated latency is
3.3 OFDM symbol periods for QPSK to 64-QAM and 3.7 for BPSK. This includes an
IFFT model that answers 8 clocks after its last input. The paper reports
about 3.9 periods (54.5 µs) with its IFFT core.

## Simulation

Each module has a self-checking testbench, `tb/tb_<module>.sv`. The
interleaver's testbench also covers `ilv_addr_gen` and `ilv_bit_ram`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs. `tb/tx_ref_pkg.sv` is an independent reference model. It builds the
chain from the 802.16 formulas, not from the RTL's structure:

- the generator polynomials;
- the X=101 / Y=110 puncturing pattern;
- both interleaver permutation formulas;
- constellation levels computed in real arithmetic.

`tb/ifft256_model.sv` is a behavioural (non-synthesizable) DFT that stands in
for the IFFT core, scaled by 1/256.

Run, for example, the end-to-end test (default sizes, a few seconds):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/ofdm_tx_pkg.sv tb/tx_ref_pkg.sv tb/tb_mimo_ofdm_tx.sv --top-module tb_mimo_ofdm_tx
./obj_dir/Vtb_mimo_ofdm_tx
```

For another block, replace the testbench name. `tb_mimo_ofdm_tx` runs the top
with all parameters at their defaults. It makes five runs, each after a reset.

**Runs 1–4**, one per modulation. In each, the system clock is set so that one
OFDM symbol's worth of bits takes exactly 320 OFDM clocks, and 4 OFDM symbols
are sent per antenna. The test checks:

- every IFFT input bin against the reference chain and the subcarrier map;
- every transmitted sample against the IFFT output with the prefix in front;
- that the output has no idle clock after the first symbol;
- that no overflow flag rises.

**Run 5** uses a deliberately slow OFDM clock and must see `buf_overflow`.

The test also counts how often each mechanism happens, and requires each to
happen at least once: each mode, double-buffer half swaps, clock-domain
crossings, pilots, prefix samples, gap-free symbol joins and overflow
detection.

## What is not here, and where this departs from the paper

- **IFFT.** The paper uses a vendor IFFT core, so only its interface is
  provided. A real 256-point streaming IFFT must be attached to the
  `ifft_*` ports.
- **Other coding and interleaving schemes.** The paper also compares
  per-antenna coding (two encoders) and cross-antenna interleaving (one
  interleaver of twice the size for both antennas). These were not built.
  Only the recommended scheme is.
- **Receiver.** The receiver (FFT, deinterleaver, Viterbi decoder) and the
  bit-error-rate study are outside the transmitter hardware and were not
  built.
- **Output stage.** The final step that combines I and Q for the channel is
  left to the user. Each antenna's I and Q are brought out as ports.
- **Interleaver RAM ports.** The paper calls the interleaver memory
  single-port, but its own block diagram gives every RAM separate write and
  read addresses, and double buffering needs one write and one read in the
  same clock. The RAMs here have one 1-bit write port and one 1-bit read port.
- **Choices made here where the paper gives no detail:**
  - the generator polynomials, and the pilot and guard positions (taken from
    802.16);
  - which puncturing register feeds which antenna, and the bit order inside
    words;
  - the second interleaver permutation in symbol assembly;
  - the constellation bit labelling;
  - the toggle handshake of the clock-crossing buffer;
  - gap-free hand-over between buffer halves;
  - all overflow flags;
  - the `sel` encoding and the reset scheme (synchronous, active low, one
    per clock domain).
- **Not modelled:** the standard's pilot polarity sequence, tail bits and
  randomisation.
- **Timing closure is not shown.** Whether an implementation meets the clock
  rates above (124.5 MHz for 64-QAM at the paper's data rate) depends on the
  technology, and this RTL has not been taken through place and route.

# Bank-parallel 802.16 interleaver and 2×2 MIMO-OFDM transmitter

The 802.16 (WiMAX) OFDM bit interleaver is defined by two index permutations. A block of
`Ncbps` coded bits is written row by row into a 12-column matrix and read back column by
column. Then bits are rotated inside small groups so that neighbouring bits alternate between
more and less reliable constellation positions. A direct implementation needs an address table
or a transposing buffer. This design needs neither. The block is spread over `Ncpc` one-bit
RAM banks, one bank per bit of a modulation symbol. The banks are written in parallel at one
shared address, and every column of the matrix ends up inside a single bank. A column can
then be read with one counter that adds a constant step. Each bank is twice the block size,
so one block is read while the next one is written (double buffering). After the first block
the output has no gaps.

The interleaver sits in a complete transmitter for a 2×2 spatial-multiplexing MIMO-OFDM
system. Two independent data streams, one per antenna, each pass through convolutional
coding, puncturing, interleaving, constellation mapping, a 256-point IFFT and cyclic-prefix
insertion. The receive-side de-interleaver is built too, with the same bank structure and the
read and write orders swapped.

The structure follows the FPGA design of the paper *Efficient Interleaver Design for
MIMO-OFDM Based Communication Systems on FPGA*. "Departures and choices" below lists where
this RTL fills in details the paper leaves open.

## The interleaving rule

Let `N = Ncbps` be the block size and `Ncpc` the number of bits per subcarrier: 1, 2, 4 or 6
for BPSK, QPSK, 16-QAM or 64-QAM. With 16 subchannels, `N = 192·Ncpc`. Let `s = ceil(Ncpc/2)`
and `R = N/12`. For a coded bit with index `k`:

    m = R·(k mod 12) + floor(k/12)                              first permutation
    j = s·floor(m/s) + (m + N − floor(12m/N)) mod s              second permutation

Bit `k` is sent as bit `j` of the block. Bits `j = i·Ncpc … i·Ncpc+Ncpc−1` form modulation
symbol `i`. The first of them is the constellation MSB.

## How the banks realise it

**Write.** Coded bits are collected `Ncpc` at a time. Bit `k` goes to bank `k mod Ncpc`, at
offset `k div Ncpc`, so all banks share one write address.

**Read.** In the matrix view, bit `k` lies in row `r = k div 12` and column `c = k mod 12`.
12 is a multiple of `Ncpc`, so the whole of column `c` lies in bank `c mod Ncpc`, at offsets

    c div Ncpc + r·(12/Ncpc),    r = 0 … R−1

Reading in output order (`m = 0, 1, 2, …`) therefore means:

1. Take column 0 from bank 0, column 1 from bank 1, and so on.
2. Within a column, step the address by 12, 6, 3 or 2 (for 1, 2, 4 or 6 banks).
3. After the last bank, start over at bank 0 with the base offset increased by one.

This needs only counters: a row counter, a column counter, a bank counter, a base offset and an
accumulating address. `R` is a multiple of `Ncpc`, so each symbol is `Ncpc` consecutive rows of
one column, read from one bank in `Ncpc` successive cycles.

**Second permutation.** The rotation never leaves a group of `s` bits inside a symbol. For the
bit read from row `r` of column `c`, let `u = r mod s` and `g = (r mod Ncpc) div s`. Its place
in the symbol is

    g·s + ((u − c) mod s)

For QPSK and BPSK (`s = 1`) this is the identity. For 16-QAM, pairs are swapped in odd
columns. For 64-QAM, triples are rotated by `c mod 3`. The generator keeps `c mod s` in a
2-bit counter. It sends the place with each read, and the interleaver drops the bit straight
into its slot of the symbol register.

**Example: 16-QAM, N = 768, four banks, R = 64.** Column 0 is bank 0 at offsets 0, 3, 6, ….
Column 1 is bank 1 at offsets 0, 3, 6, …. Column 4 is bank 0 again at 1, 4, 7, …. The first
symbol is rows 0–3 of column 0 in natural order. Symbols of column 1 hold rows (1,0,3,2)
because the pairs are swapped.

**Double buffering.** Each bank holds two blocks. The top address bit selects the half.
Each half has a *full* flag:

* The flag is set by the write of a block's last word.
* It is cleared when the block's last read address is issued.

Reading starts in the cycle after a block completes. Writing stops (`in_ready` low) only if
the half it needs is still full. That cannot happen while coded bits arrive at one per cycle
or slower: the reader also takes one bit per cycle.

**Bank sizes.** Each bank holds `2·N/Ncpc = 384` bits for every modulation with per-antenna
interleaving. Per antenna that is 384, 768, 1536 or 2304 bits. For two antennas it is
768–4608 bits, which is the minimum for double buffering. The same module holds the larger
cross-antenna block sizes (twice `N`, banks of 768) if `NCBPS` is set accordingly.

## Transmit chain, per antenna

| stage | module | what it does | rate |
|---|---|---|---|
| encoder | `conv_encoder` | K = 7, rate 1/2, generators 171/133 (octal) | one pair per data bit |
| puncturer | `puncturer` | rate 3/4 (keeps X1 Y1 Y2 X3 of three pairs) for QPSK/16-QAM/64-QAM, none for BPSK; serialises | one coded bit per cycle |
| interleaver | `interleaver` (`il_addr_gen`, `il_ram`) | as above | one symbol per `Ncpc` cycles |
| mapper | `const_mapper` | I and Q ROMs, 16-bit words with 14 fraction bits | one cycle |
| modulator buffer | `ofdm_mod` | 2 × 192 points; builds 256 IFFT bins with pilots, DC and guard carriers | 256 bins per symbol |
| IFFT | `ifft_sdf` | pipelined radix-2 SDF, 256 points, 1/N scaling | one bin per cycle |
| cyclic prefix | `cp_insert` | 2 × 256 buffer; sends samples 192…255 then 0…255 | 320 samples per symbol |

`mimo_tx` holds two such chains (parameter `NANT = 2`) and a `deinterleaver` per antenna.
The modulation is fixed when the design is built, with `NCPC` (default 6, 64-QAM). All
modules share `tx_pkg`, which defines the sample type, `cplx_t` (I and Q, 16 bits each), and
the OFDM constants.

**Sample format.** Words are two's complement with 14 fraction bits. That leaves one integer
bit, so the largest 64-QAM level, 7/√42 ≈ 1.08, fits.

**Constellations.** Levels are Gray-coded per axis: for 64-QAM, 000, 001, 011, 010, 110,
111, 101, 100 map to −7 … +7. The first half of a symbol's bits selects I and the second half
selects Q. Levels are scaled by 1, 1/√2, 1/√10 or 1/√42 for unit average power. BPSK maps
0 → −1 and 1 → +1.

**Subcarrier layout (256-point FFT).** Bin `b` carries subcarrier `b` for `b < 128`, and
`b − 256` above.

* Guard (zero): subcarriers −128…−101 and +101…+127.
* DC: zero.
* Pilots: ±13, ±38, ±63, ±88, each carrying +1.0.
* Data: the remaining 192 subcarriers, filled in ascending order from −100 to +100.

## Flow control and timing

**Handshakes.** The data input is valid/ready per antenna. The encoder, puncturer and
interleaver pass valid/ready back to it. Stages after the interleaver have no backpressure;
they are sized so that they cannot be overrun at the OFDM symbol rate:

* The modulator starts an IFFT frame only when the cyclic-prefix stage is completely empty
  (`sink_idle`). A frame therefore never overwrites a prefix buffer that has not been read.
* Modulating and sending one symbol takes about 850 cycles.
* At 64-QAM a symbol's worth of data arrives every 1152 cycles at most, because the coded
  stream is limited to one bit per cycle. This rate is always safe.
* The 802.16 symbol period is 13.82 µs, which is 2073 cycles at 150 MHz. That leaves a wide
  margin.
* At lower orders with the input at full speed, data can arrive faster than symbols leave.
  For BPSK that is a symbol every 384 cycles. The modulator buffer then drops points and
  raises the sticky `overrun` flag. Feed data at the air-interface rate.

**IFFT.** All stages advance on one shared enable. When input pauses, the whole pipe stalls.
After a frame, the pipe drains itself by pushing zeros until its last real sample is out. A
new frame may start only where the internal sample counter is at a frame boundary, or once
the pipe is empty. This keeps the butterflies aligned with their twiddles, and `in_ready`
enforces it.

**Measured latencies.** With the input at full rate (64-QAM, one coded bit per cycle):

* Interleaver: its first symbol leaves 1159 cycles after the first coded bit enters. That is
  one block of input (1152) plus `Ncpc + 1`.
* Whole chain: the first baseband sample leaves 2830 cycles after the first coded bit.
* IFFT: 263 enabled cycles from input to output (255 delay-line cycles plus one register per
  stage).

Published figures for this interleaver structure are 197, 588, 1170 and 1752 cycles for
BPSK, QPSK, 16-QAM and 64-QAM. They correspond to one data bit every second cycle. At that
pace the coded stream is one bit per cycle for BPSK and 4 bits every 6 cycles at rate 3/4.
Fed at that pace, this design measures 194, 578, 1156 and 1734 cycles, within 2% of those
figures. Once the first block is complete, it is read out at one bit per cycle with no gaps,
while the next block is still filling.

## The IFFT

`ifft_sdf` is a radix-2 decimation-in-frequency pipeline with single-path delay feedback.

* Stage `s` has a delay line of `2^(7−s)` samples.
* In the first half of each group, a stage stores its input and forwards the line's contents.
* In the second half, it forwards `(a+b)/2` and feeds back `((a−b)/2)·W^(q·2^s)`, where
  `W = e^{+j2π/256}`.

Halving in every stage gives the 1/N of the inverse transform and prevents overflow.
Twiddles are Q1.14 constants, computed with `$cos`/`$sin` while the design is elaborated. The
output comes in bit-reversed order with its time index (`out_addr`). `cp_insert` writes each
sample at that index, which restores time order at no extra cost.

Against a floating-point inverse DFT, the error stays within about 12 LSB for full-scale
random inputs. Bit growth is not tracked beyond the per-stage halving.

## Receive side: the de-interleaver

`deinterleaver` uses the same banks and the same column counters as the interleaver, with the
roles swapped:

1. A received symbol of `Ncpc` hard bits is written one bit per cycle down its column. Each
   bit is taken from its rotated place, which undoes the second permutation.
2. When a block is complete, all banks are read at one shared address.
3. Each word of `Ncpc` bits is sent out bank 0 first, which restores the coded-bit order.

In `mimo_tx` its ports (`rx_*`) are brought out, ready to sit between a demapper and a
Viterbi decoder, which this design does not contain.

## Departures and choices

These points are not fixed by the published description. They are this design's choices:

* **Cross-antenna cases not built.** The paper analyses four coding/interleaving
  combinations. Only per-antenna coding with per-antenna interleaving is built. How the
  cross-antenna variants split bits between the antennas is not specified. The interleaver
  module handles their block sizes, though.
* **Taken from the 802.16 standard:** the encoder polynomials, the puncturing pattern, the
  Gray labelling and scaling of the constellations, and the carrier layout.
* **Pilots are constant +1.** The standard's pseudo-random pilot polarity is not modelled.
* **No tail bits.** The encoder is cleared only at reset; there is no tail or tail-biting
  handling.
* **IFFT architecture and word lengths**, and the buffer organisation of the prefix stage,
  are chosen here. The paper specifies only "pipelined".
* **Interfaces and reset.** The valid/ready handshakes, the overrun flag and the synchronous
  active-low reset are chosen here.
* **Bit placement.** The interleaver places bits directly into the symbol. Its data still
  moves as described (parallel writes at a shared address, column reads with a constant
  step), but how the second permutation is applied is this design's own.

## Files

`rtl/` (one module or package per file):

* `tx_pkg.sv`: types and constants
* `mimo_tx.sv`: the top: two transmit chains and two de-interleavers
* `interleaver.sv`, `il_addr_gen.sv`, `il_ram.sv`: the interleaver, its address generator
  and a RAM bank
* `deinterleaver.sv`
* `conv_encoder.sv`, `puncturer.sv`, `const_mapper.sv`, `ofdm_mod.sv`, `ifft_sdf.sv`,
  `cp_insert.sv`

`tb/`: self-checking testbenches. Each prints `TB_RESULT checks=N failures=M`.

* `tb_<module>.sv`: one per module.
* `tx_lane_tb.sv`: a helper that drives one antenna and checks every output sample. Its
  model of the chain is written from the definitions rather than the RTL: polynomial
  parities, the permutation formulas, level tables and a floating-point inverse DFT.
* `tb_mimo_tx.sv`: the default build (64-QAM, full size), three symbols on both antennas,
  with a de-interleaver loopback. It also counts that stalls, buffer overlap, pilots and IFFT
  draining all occur.
* `tb_mimo_tx_rate.sv`: all four modulations with one data bit every second cycle. It checks
  the interleaver's initial latency against the published figures and that a block is read
  out without gaps.
* `tb_mimo_tx_modes.sv`: BPSK, QPSK and 16-QAM builds. It also shows that a too-fast BPSK
  input makes the modulator hold frames, the IFFT wait for a boundary and the overrun flag
  rise.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/tx_pkg.sv tb/tb_mimo_tx.sv --top-module tb_mimo_tx -Mdir obj
    ./obj/Vtb_mimo_tx

Replace `tb_mimo_tx` with any other testbench name to run it. Each one runs in seconds.
Change the modulation with the `NCPC` parameter of `mimo_tx` (1, 2, 4 or 6). Block sizes
follow from it.

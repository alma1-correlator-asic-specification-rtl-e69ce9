# ALMA1 correlator chip — 4096-lag 2-bit cross-correlator in SystemVerilog

A radio-interferometer correlator multiplies the sampled signal of one antenna
with time-shifted copies of another antenna's signal and integrates each
product for milliseconds. The chip described here does that for 4096 delay
values ("lags") at once, at one sample per 125 MHz clock. Each lag multiplies two
2-bit, 4-level samples with a biased (all-positive) table and sums the products
in a 25-bit accumulator. The 16 most significant bits of each lag are then
dumped to a storage register and read out over a 16-bit bus.

The lags are organised as a 4×4 matrix of 256-lag blocks. Four antennas feed the
vertical axis and four the horizontal axis. Each antenna gives two digitizer
streams (M0, M1) of 2-bit samples. Block (row r, column c) correlates vertical
antenna r with horizontal antenna c. Each block can be one 256-lag correlator,
two 128-lag correlators or four 64-lag correlators. Blocks can also be chained,
up to a single 4096-lag correlator for the whole chip.

## Source files

| file | what it is |
|---|---|
| `rtl/alma1_pkg.sv` | sizes, program-word struct `pgm_word_t`, source/center-bus enums, the product table `bprod()` |
| `rtl/alma1_chip.sv` | top level: pads, program word, bus modes, delay line, sequencer, matrix, readout |
| `rtl/alma1_matrix.sv` | 4×4 matrix, block-to-block delay chain, results bus |
| `rtl/alma1_block256.sv` | 256-lag block: input multiplexers, LEAD/CONCAT, dump/reset gating, sub-block select |
| `rtl/alma1_sub64.sv` | 64-lag sub-block: prompt register, input delay line, lag generator, 64 lags |
| `rtl/alma1_lag.sv` | one lag: multiplier, 25/21-bit accumulator, storage/readout stage |
| `rtl/alma1_ctrl.sv` | dump/reset sequencer started by BLANKING |
| `rtl/alma1_pgm.sv` | serial program word with shadow register |
| `rtl/alma1_mode.sv` | the six data buses, CENTERBUS source select, left/right output enables |
| `rtl/alma1_vdelay.sv` | 0–31 clock delay line for the vertical data and blanking |
| `rtl/alma1_readout.sv` | SEL/RDCLKENBL registers, OUT pad register and enable |
| `rtl/alma1_ringosc.sv` | behavioural model of the process-monitor ring oscillator (not synthesizable) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/alma1_ref_pkg.sv` | reference model of the matrix used by the matrix and chip testbenches |

## One lag

Every clock in which BLANKING is low, a lag adds the biased product of its
prompt sample P and its delayed sample D. The product is 0..9. It goes into a
5-bit synchronous stage. Each carry out of that stage advances the upper part
of the accumulator:

* **25-bit mode (FULLACC=1):** a 4-bit prescaler, then a 16-bit counter.
  The stored word is accumulator bits [24:9].
* **21-bit mode (FULLACC=0):** the prescaler is bypassed and held still. The
  5-bit carry drives the 16-bit counter directly. The stored word is bits
  [20:5]. This mode is for 1 ms dumps, where 25 bits are not needed.
* **RC_TSTE64=1 (test):** both bytes of the 16-bit counter count every carry,
  so a test sees the high byte move without 65536 carries.

The product table is biased because the 4-level samples are signed: the codes
00, 01, 10, 11 stand for the levels −3, −1, +1, +3. The entry is (a·b + 9)/2,
giving 0, 3, 4, 5, 6 or 9. An uncorrelated input therefore still adds about
4.5 per clock, and the accumulator overflows if the integration is too long.
The specification describes the upper stages as ripple counters. Here they are
synchronous counters that count the same sequence.

## Lag generation: prompt, delay line, LEAD and CONCAT

This is the part that needs the most care when configuring the chip.

Inside a 64-lag sub-block, the prompt sample is registered once and goes to all
64 lags. The delayed sample first passes a short **input delay line**, then the
**lag generator**. Lag 0 sees the delay-line output. Each later lag sees the
previous lag's sample one register later, or two registers later when the row
is oversampled (OVERSAMPx=1, twice-Nyquist data). Let s be 1, or 2 when
oversampled. The input delay line is:

| CONCAT | LEAD-BLK | delay line | lag 0 sees |
|---|---|---|---|
| 0 | 0 | 1 | the same clock as the prompt (zero lag) |
| 0 | 1 | 1 + s | one lag step later: lags 1..64 |
| 1 | x | s | one lag step after lag 63 of the previous sub-block |

**LEAD.** For a cross product, one block computes the lags (antenna A
delayed against B). A second block computes the leads (B delayed against A).
The two halves are then concatenated for an FFT. Without the extra step both
halves would contain lag 0. The LEAD-BLK setting moves the lead half by one
step to remove that duplicate. A block is a LEAD block when it lies below the
matrix diagonal (column < row) and LEADLL=1, or above it (column > row) and
LEADUR=1. Diagonal blocks never are.

**CONCAT.** A concatenated sub-block takes its delayed input from the chain
output of the previous sub-block, the sample entering that sub-block's lag 63.
For sub-block 0 of a block, "previous" means sub-block 3 of the block before
it. The blocks chain in index order 0..15, where index = 4·row + column. Block
0 takes the D0-X input pins, and block 15's chain leaves on D4-X. The prompt of
a concatenated sub-block must be the same signal as its predecessor's.

The BLANKING does not stop the delay chains. A blanking pulse must be long
enough to refill them: 512 clocks for four oversampled 64-lag sub-blocks in
series.

## Input multiplexers (per 256-lag block)

Each sub-block k has a 4-1 prompt multiplexer and a 5-1 delayed multiplexer.
The delayed multiplexer is a 4-1 source select plus the CONCAT bit. The four
sources are X-M0, X-M1, Y-M0, Y-M1 (codes 0..3) of the block's two antennas.
Per row, `r_m[4k+1:4k]` selects the prompt source and `r_m[4k+3:4k+2]` the
delayed source. CONCAT of sub-block 0 is the block's own `wrap_blk` bit. For
sub-blocks 1..3 it is `r_w[k-1]`, shared by the row.

## Integration control

BLANKING high stops every lag (a clock enable here; a gated clock in the
original). BLANKING travels through the same SELDLY delay line as the vertical
data, so it stays aligned with the samples. The rising edge of the delayed
blanking starts the sequencer in `alma1_ctrl`:

* 14 clocks later comes SEQ DUMP TO STORAGE.
* 2 clocks after that comes SEQ ACCUMULATOR RESET.
* From the BLANKING pin, the reset arrives 18 + SELDLY clocks after the edge.
* RESETENB=1 in the program word suppresses both pulses.

Each row passes the pulses on only when DUMP ENABLE is high, or when the row is
in 21-bit mode. The intended use is BLANKING every 1 ms and DUMP ENABLE every
16 ms. 21-bit rows then dump every millisecond and 25-bit rows every 16 ms.
The storage is loaded one clock after the gated dump (DUMP TO STORAGE'). The
reset follows one clock after that load.

## Readout

SEL[5:0] and RDCLKENBL are registered on entry. SEL[5:2] picks the 256-lag
block, and SEL[1:0] (registered once more) picks the sub-block. The storage
registers of a sub-block form a 16-bit wide, 64-deep shift register. Lag 0 is
on the bus, and each enabled clock moves the next lag up.

* OUT has a pad register and shows the selected sub-block's lag 0 three
  clocks after SEL changes.
* Each RDCLKENBL pulse advances OUT by one lag, three clocks after the pulse.
* RDCLKENBL may be high at most every other clock.
* After switching to another 256-lag block, leave one idle clock: the block
  select has no pipeline register.
* Do not read while a dump can happen.
* OUT is enabled only when XOE\ and YOE\ are both low and HIZ is low.

## Data buses and chip modes

Six 16-bit buses (4 antennas × 2 digitizers × 2 bits) meet in the chip. Antenna
a, digitizer m is at bits [4a+2m+1:4a+2m].

* **Main bus (DBL in, DTL out):** always passed up. It is also the vertical
  drive of the matrix, through the SELDLY delay line (0–31 clocks).
* **Aux bus (DBR in, DTR out):** passed up only with AUXEN=1. Otherwise DTR is
  zero, to save power.
* **Left and right buses (DL, DR):** bidirectional. DL drives out when
  LTOR-IN=0 and DR when LTOR=1. LTOR is copied to LTOR-OUT, which feeds the
  next chip's LTOR-IN, so two chips never drive the same wires.
* **Center bus:** the horizontal drive of the matrix, also sent out on DL and
  DR. CENTERBUS selects its source: 0 Left, 1 Main, 2 Aux, 3 Right. The
  decoder is break-before-make: after a change, no source is enabled for one
  clock.

Every bus input and output has a pad register, so a bus passing through the
chip is delayed two clocks. Typical settings on a self-product card are
CENTERBUS=Main on the diagonal, Left to its right and Right to its left. A
cross-product card uses the Aux bus for the horizontal antennas.

## Program word

The program word is 114 bits, listed field by field in `alma1_pkg::pgm_word_t`.
The first bit shifted in ends in bit 0, the struct's last field.

* It is shifted in on PGM CLK/PGM DATA, bit 0 first, on rising PGM CLK edges.
* PGM DATA OUT is the last stage, for chaining chips.
* A rising edge of PGM STB copies the word to the shadow register that drives
  the chip.
* PGM CLK and PGM STB are sampled by the chip clock, so PGM CLK must not exceed
  half the chip clock.
* PGM CLK OUT and PGM STB OUT are buffered copies of the inputs.
* PGM STB high also runs the ring oscillator.

C125OUT is the chip clock ANDed with the CKPINEN bit. It is an ungated AND, so
change CKPINEN only while the clock is low.

## Departures and choices

The following are this design's own choices, made where the specification
does not fix the detail.

* **Product table:** its level assignment.
* **Program word:** the bit layout, and the bit assignment of the multiplexer
  selects.
* **LEAD-BLK:** its triangle rule.
* **Buses:** the bit order and the block numbering.
* **Sequencer delays:** the dump and reset delays.
* **Input delay line:** its encoding, which here is the delay value instead of
  two M0/M1 bits.
* **Reset pin:** `rst_n`, added to clear the program word and the sequencer.
  Accumulators are cleared by the first blanking sequence, which needs
  RESETENB=0.
* **Clocking:** all counters are synchronous, the accumulator clear is
  synchronous, and clock gating is done with clock enables.
* **Tri-state outputs:** modelled as value plus enable (`*_oe` ports,
  `pads_oe`). The tri-stated block outputs inside the chip form an AND-OR
  multiplexer.
* **Not built:** the SETOUT test-output select, whose alternate outputs are
  not defined. Nor the pads, the 1.8 V I/O and the package.
* **Ring oscillator:** a timing model only. Synthesis sees its loop.
* **8192-lag variant:** 128-lag sub-blocks. The parameter `N` of `alma1_chip`
  (lags per sub-block, default 64) sizes the lag generator and storage, but the
  block-level plumbing is unchanged and this size is untested.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
A module testbench needs the package, the module and the modules below it, for
example:

```
verilator --binary --timing -Irtl -Itb -y rtl +libext+.sv \
  rtl/alma1_pkg.sv tb/tb_alma1_sub64.sv --top-module tb_alma1_sub64
./obj_dir/Vtb_alma1_sub64
```

The matrix and chip testbenches also need `tb/alma1_ref_pkg.sv` after the
package. They run the matrix with 4 lags per sub-block (256 lags). Everything
else, including multiplexers, chaining across all 64 sub-blocks, bus modes,
sequencing and readout, is the same as at full size. The lag generator and
readout at the full 64 lags are covered by `tb_alma1_sub64` and
`tb_alma1_block256`.

The full 4096-lag chip elaborates and lints quickly. A verilator build of it
takes well over 20 minutes of C++ compilation because every lag is flattened.
For that reason no full-size end-to-end simulation is included. The largest
configuration simulated end to end is the chip with 8 lags per sub-block
(512 lags), which passes the same checks; set `NL` in `tb_alma1_chip` to
change the size.

The chip testbench checks, from the pins only:

* every stored lag against an independent reference model, for each
  center-bus source;
* LEAD, CONCAT (one 4096-lag-style chain through all blocks), OVERSAMP and
  both accumulator modes;
* RC_TSTE64;
* the dump held off by DUMP ENABLE and by RESETENB;
* bus pass-through and output enables, C125OUT gating, PGM STB OUT and the
  ring oscillator;
* XOE\/YOE\ and HIZ.

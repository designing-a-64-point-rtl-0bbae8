# 64-point FFT/IFFT processor for OFDM wireless LAN

An IEEE 802.11a OFDM modem spends much of its effort in one block: the
64-point IFFT in the transmitter and the 64-point FFT in the receiver. This
design is a small, low-power processor for that transform. Three ideas carry
it:

* **No complex multiplier.** Twiddle factors are fixed constants, so every
  multiplication is done by shift-and-add constant multipliers in canonical
  signed-digit (CSD) form. Only nine (cos, sin) pairs are needed; all 32
  twiddles a 64-point transform uses come from them by swapping real and
  imaginary parts and choosing signs.
* **Eight two-port memory banks with a skewed map.** The 64 samples are
  spread over eight banks so that any 8-point group the radix-8 algorithm
  needs can be read, or written, in a single cycle.
* **One pipelined radix-2 butterfly, two register banks.** A group is
  copied from memory into a register bank, its three butterfly levels run
  there, and it is written back. Two groups are in flight at once, so the
  butterfly starts a new operation every cycle.

A transform takes 196 clock cycles, 192 of which start a butterfly;
`done_fft` rises on the next edge, 197 cycles after `en_fft`. The result
is the DFT scaled by 1/64. Setting
`ifft` gives the inverse transform on the same hardware.

## Arithmetic

A complex sample is one 32-bit word: real part in bits 31:16, imaginary part
in bits 15:0, both 16-bit two's complement (`fft_pkg::cplx_t`).

The transform is radix-2 decimation in frequency (DIF) over six levels. Each
butterfly computes

```
A' = (A + B) / 2
B' = ((A - B) / 2) * W64^e ,   W64 = exp(-j 2 pi / 64),  e in 0..31
```

The halving is an arithmetic right shift, so it truncates. The output is
`X(k) = (1/64) * sum_n x(n) W64^(nk)`. The testbenches measured at most 2 LSB
difference from a floating-point DFT for inputs up to +-12000.

The parameter `WIDE_SUM` (on `fft64_top`, `fft_processor` and `butterfly`)
sets the adder width:

| `WIDE_SUM` | adders | behaviour |
|---|---|---|
| 1 (default) | 17-bit | The sum and difference are halved without loss. No butterfly can overflow, for any input. |
| 0 | 16-bit, carry out dropped | Reproduces the arithmetic of the originally published example run. The sum wraps when the inputs are large (roughly beyond half scale). |

Twiddle constants are Q1.14: `round(2^14 * cos(2 pi e/64))` and the same for
sin. A product is summed exactly, shifted right by 14 (truncation) and
saturated to 16 bits. A rotation can make one component up to sqrt(2) times
larger, so saturation only matters for inputs near full scale.

## Memory map

Sample `n` lives in bank `(n mod 8 + n div 8) mod 8`, at address `n div 8`:

| address | bank 0 | bank 1 | bank 2 | bank 3 | bank 4 | bank 5 | bank 6 | bank 7 |
|---|---|---|---|---|---|---|---|---|
| 0 | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
| 1 | 15 | 8 | 9 | 10 | 11 | 12 | 13 | 14 |
| 2 | 22 | 23 | 16 | 17 | 18 | 19 | 20 | 21 |
| ... | | | | | | | | |
| 7 | 57 | 58 | 59 | 60 | 61 | 62 | 63 | 56 |

Each row is rotated by its own index. Because of this, a **column**
`{g, g+8, ..., g+56}` and a **row** `{8g, ..., 8g+7}` each occupy all eight
banks once. Element `q` of group `g` is in bank `(g + q) mod 8` in both
cases. The only difference is the address:

* a column uses address `(b - g) mod 8` in bank `b`;
* a row uses address `g` in every bank.

Each bank has its own read address and write address (`agu`). A rotation
crossbar moves a group between bank order and group order (`fft_processor`).

## The transform as two radix-8 passes

The six DIF levels split into two passes of three levels:

| pass | groups | levels | span inside the group | twiddle exponent for upper element at group position q |
|---|---|---|---|---|
| 0 | columns g = 0..7 | 1, 2, 3 | 4, 2, 1 | g + 8q;  2g + 16(q mod 2);  4g |
| 1 | rows g = 0..7 | 4, 5, 6 | 4, 2, 1 | 8q;  16(q mod 2);  0 |

Each group is an 8-point radix-2 sub-transform with 4 butterflies per level
(12 in all). Pass 0 computes `sum_m x(l+8m) W8^(sm)` together with the
`W64^(sl)` inter-pass rotation of the radix-8 formula. Pass 1 computes the
final 8-point DFTs. The result stays in place, in bit-reversed order:
memory position `p` holds `X(bitrev6(p))`.

### Schedule

The butterfly has two register stages, and its results are written into the
register bank on the following edge. A result can therefore be used 3
cycles after its butterfly starts. A single group cannot keep the butterfly
busy: level 2 would wait on level 1. So groups run in pairs: group A in
register bank 1, group B in register bank 2, with their levels interleaved.

```
slot (cycle in pair)   0-3    4-7    8-11   12-15  16-19  20-23
butterflies            A L1   B L1   A L2   B L2   A L3   B L3
```

Memory traffic fits around the slots (times relative to slot 0 of pair p):

```
r = 3    load B(p)      memory -> register bank 2
r = 22   store A(p)     register bank 1 -> memory
r = 23   load A(p+1)
r = 26   store B(p)     (= r 2 of the next pair)
```

Loads and stores never fall in the same cycle, so no bank is read and
written at once. A register bank is loaded only after its last write-back,
and stored only after it.

The pass boundary needs one extra path. A row of pass 1 holds one sample
from every column of pass 0. When row 0 is loaded (pair 3, r = 23), the last
column (group 7, in register bank 2) is not yet back in memory; it is stored
at r = 2 of pair 4. Row 0 needs only one sample from it, sample 7, which sits
in register 0 of bank 2 and is final by then. In that one cycle the load
takes this sample from the register bank instead of memory (`bypass`). The
other rows are loaded after group 7 is stored. No wait cycles are needed:

```
1 preload + 7*24 + 27 (last pair ends with its B store) = 196 cycles
```

`done_fft` rises on the following edge.

## Butterfly and CSD multipliers

`butterfly` splits each twiddle as `W64^e = W64^(e mod 8) * W64^(8*(e div 8))`
and applies the two factors in series:

```
A,B -> adders, /2 -> [reg] -> CSD bank 1: wire, W64^1..W64^7      (csdb1, 3 bit) -> [reg]
                           -> CSD bank 2: wire, W64^8, W64^16, W64^24 (csdb2, 2 bit) -> out
```

`W64^16 = -j` needs no adders: it is a swap and a negation. The `scm` module
is one constant multiplier. It recodes C and S into canonical signed digits
at elaboration (digits in {-1, 0, +1}, never two non-zero digits next to
each other). It then adds or subtracts one shifted copy of the input per
non-zero digit. `fft_pkg::tw_cos / tw_sin` derive every exponent 0..31 from
the nine stored pairs for e = 0..8:

```
e  9..16: cos(e) =  sin(16-e)   sin(e) = cos(16-e)
e 17..24: cos(e) = -sin(e-16)   sin(e) = cos(e-16)
e 25..31: cos(e) = -cos(32-e)   sin(e) = sin(32-e)
```

## Control and addressing

* `mcsm` is the control unit. It is a state enum (idle, preload, run, done)
  with a pair counter and a cycle-in-pair counter. Every control signal is
  decoded from these counters: loads and stores, the register-bank select,
  the operand selects `rs1` and `rs2`, and the twiddle selects `csdb1` and
  `csdb2`. It also delays the selects by the butterfly latency to steer the
  write-back.
* `en_fft` clears all counters and starts the transform. This works at any
  time, including in the middle of a transform, which then restarts on
  whatever the memory holds.
* `done_fft` stays high until the next start.
* `agu` has a read counter and a write counter. Each counts {pass, group} and
  advances after every group load or store. The bank addresses are decoded
  from the counters, as described under "Memory map".

## Host port and inverse transform

`fft64_top` adds a host port to the processor and its eight banks:

* `host_we`, `host_widx` and `host_wdata` write sample n.
* `host_ridx` and `host_rdata` read result k. The read is combinational.
* The read port maps k to memory position `bitrev6(k)`, so results come out
  in natural order.
* The host port is ignored while `busy` is high.

With `ifft` = 1, the port swaps the real and imaginary parts of every word
written and every word read. The engine then returns
`x(n) = (1/64) sum_k X(k) exp(+j 2 pi n k/64)`. Hold `ifft` steady from the
first write to the last read.

Use:

1. Write the 64 samples.
2. Pulse `en_fft` for one cycle.
3. Wait for `done_fft`.
4. Read the 64 results.

## Files

| file | contents |
|---|---|
| `rtl/fft_pkg.sv` | types (`cplx_t`), sizes, twiddle table, memory-map functions |
| `rtl/scm.sv` | CSD shift-add multiplier by one W64^E |
| `rtl/butterfly.sv` | pipelined radix-2 butterfly with the two CSD banks |
| `rtl/register_bank.sv` | 8-register group store with RS1/RS2 read ports |
| `rtl/memory_bank.sv` | 8 x 32-bit two-port bank |
| `rtl/agu.sv` | read/write address counters |
| `rtl/mcsm.sv` | control unit and schedule |
| `rtl/fft_processor.sv` | engine: control, AGU, register banks, butterfly, crossbars |
| `rtl/fft64_top.sv` | engine + eight banks + host port + IFFT swap |
| `tb/fft_ref_pkg.sv` | bit-exact fixed-point model and floating-point DFT |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fft64_example` |
| `tb/example_*.hex` | memory images before and after the published example run |

## Simulation

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fft64_top \
    -y rtl -y tb +libext+.sv rtl/fft_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft64_top.sv
obj_dir/Vtb_fft64_top
```

Replace `tb_fft64_top` with any other testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself.

* `tb_fft64_top` runs the design at its full, default size. It covers a
  tone, random data, full-scale random data, an inverse transform, and a
  restart in mid-transform.
* Every result is compared bit for bit with the fixed-point model. Where no
  saturation can occur, it is also compared with a floating-point DFT (within
  6 LSB; the measured maximum is 2).
* It checks the 197-cycle latency from `en_fft` to `done_fft`.
* It counts each mechanism and fails if one never happens: forward and
  inverse runs, the restart, pass-boundary bypass loads, every CSD select
  value, loads into both register banks, and a host write ignored while busy.
* `tb_fft64_example` repeats the example run published with the original
  design. It loads a given 64-word memory image of random full-scale words
  (`tb/example_before.hex`) and runs one forward transform with
  `WIDE_SUM = 0`. It then compares the memory with the published result
  (`tb/example_after.hex`, one word per line, line = 8*bank + address).
  59 of the 64 published words agree within 3 LSB; the largest difference
  comes from the exact twiddle constants, which are not known. The other 5
  words do not agree with the rest of the image and are not compared.
* `tb_mcsm` checks the schedule against an abstract data-flow model. Every
  butterfly must pair the right samples with the right twiddle, no operand
  may be read before it is written back, and no group may be loaded before
  the previous pass has stored it.
* `tb_fft_processor` checks the in-place, bit-reversed memory image directly.

## Departures and open points

* **Cycle count.** The original design quotes 196 cycles per transform but
  gives no schedule. The schedule here (one preload cycle, 192 butterflies,
  3 drain cycles) is this design's own and also takes 196 cycles. It relies
  on the pass-boundary bypass described above. `done_fft` follows one
  edge later.
* **Real-time rate.** The original targets a 40 MHz clock. At 40 MHz, 196
  cycles take 4.9 us, more than the 4 us 802.11a symbol. With one engine,
  real time needs at least 49 MHz. The original's claim of a result in
  2 us is not reached by this cycle count at 40 MHz.
* **Adder width.** The original is described as halving butterfly outputs
  to prevent overflow. Its published example run, however, only comes out
  with 16-bit adders that wrap before the halving. The default here is the
  overflow-free 17-bit sum; `WIDE_SUM = 0` gives the original behaviour.
* **Numerics chosen here.** These are this design's choices: Q1.14 twiddles,
  truncation after halving and after each multiplier bank, and saturation.
  The 16+16-bit split of the 32-bit word (real part high) agrees with the
  published example run. Results agree with that run to within 3 LSB, not
  bit for bit.
* **Which constant sits in which CSD box.** The original shows two banks
  with eight and four inputs (3-bit and 2-bit selects). Using them for
  W64^(e mod 8) and W64^(8*(e div 8)) is this design's reading.
* **Register banks.** Both banks are identical, and each can load from and
  store to memory. Results are written back in place. In the original data
  path, bank 1 takes the memory input and bank 2 drives the memory output.
* **Host port, `ifft` pin, natural-order read-out and synchronous active-high
  reset** are additions needed to use the engine on its own. The original
  leaves the memory to the surrounding system. It describes the output as
  bit-reversed and the inverse transform as a real/imaginary swap of input
  and output.
* **Not included:** the rest of the 802.11a baseband around the FFT
  (scrambler, coder, interleaver, mapper, guard interval, Viterbi decoder,
  converters, analog front end).

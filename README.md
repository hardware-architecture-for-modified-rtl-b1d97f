# Modified sequential LDPC decoder (4-dimensional code, 1024 data bits)

This RTL decodes a rate-1/2 low-density parity-check code with 1024 data bits
and 1024 parity bits. It is built for small area, not for throughput. One
finite state machine walks through the whole decoding schedule. It uses one
single-port RAM, one arithmetic unit made of a look-up ROM plus a small
combinational "f" circuit, and one interleaver ROM. Every soft value is a 5-bit
sign-magnitude index in the log domain.

Two simplifications keep the design small:

* **Extrinsic clipping.** The extrinsic values a dimension passes on are
  clipped to ±7, while every other sum saturates at ±15. So 5 bits are enough,
  and 15 decoding iterations per block are enough.
* **Step merging.** The horizontal backward recursion is merged into the
  extrinsic calculation. The backward metric is never stored: it lives in a
  register for one row and is used right away.

With these two, all the storage is 151 552 bits: RAM 16384×5, look-up ROM
4096×5 and interleaver ROM 4096×12. One block takes 744 448 clock cycles.

## The code

The 1024 data bits are arranged four times, once for each of four
*dimensions*. Each arrangement has 256 rows of 4 bits. Each dimension puts the
bits in a different order. Position `i = 4*row + col` of dimension `k` holds
data bit `P_k(i)`:

| dim | P_k(i) (mod 1024) |
|-----|-------------------|
| 0   | i (natural order) |
| 1   | 31 i + 64 i²      |
| 2   | 127 i + 288 i²    |
| 3   | 63 i + 160 i²     |

Each of these is a permutation of 0..1023, because the linear coefficient is
odd and the square coefficient is even.

Each dimension has one parity bit per row, chained from row to row:
`p[k][r] = p[k][r-1] ^ d(r,0) ^ d(r,1) ^ d(r,2) ^ d(r,3)`, with `p[k][-1] = 0`.
So check `r` of dimension `k` covers 4 data bits and two neighbouring parity
bits. The decoder works on the chain with a forward and a backward recursion
over the rows. This gives 256 checks per dimension and 1024 parity bits in all.

Every row holds an even number (4) of data bits, so flipping all data bits
leaves every parity bit unchanged: the complement of any codeword's data, with
the same parity, is also a codeword. This matters for
the decoder's numerics (see "Extrinsic bookkeeping").

## Number format and the arithmetic unit

A soft value is `{sign, magnitude[3:0]}`. Sign 1 means the bit is more likely
a 1. The index `k` stands for a log-likelihood ratio of `k/2`. The hard
decision is simply the sign bit.

`lut_unit` does one operation per cycle. It is selected by a 2-bit opcode,
and the look-up address is `{opcode, operand1, operand2}`:

| opcode | ROM region | operation |
|--------|-----------|-----------|
| 00 | 000h–3FFh | f(a,b), the parity combination (box-plus) |
| 01 | 400h–7FFh | a + b, saturating at ±15 |
| 10 | 800h–BFFh | a + b, clipped to ±7 (used with b = 0 to clip extrinsics) |
| 11 | C00h–FFFh | a − b, saturating at ±15 |

For opcode 00 the output multiplexer takes the result of `f_unit`, not the
ROM. `f_unit` computes:

* the sign is `sa ^ sb`;
* the magnitude is `floor((8·min(|a|,|b|) + c(|a|+|b|) − c(||a|−|b||)) / 8)`,
  floored at 0;
* `c(d) = round(8·ln(1+e^(−d/2)))`, which is 6, 4, 3, 2, 1, 1 for d = 0..5 and
  0 above.

The result is always within one index of the exact box-plus. The ROM is filled
at elaboration from the same formulas, so there is no data file.

## Memory map

The RAM address is `{dim[13:12], var[11:10], col[9:8], row[7:0]}`. There is no
iteration field: every iteration reuses the same words.

| var | col | contents (per dimension, per row) |
|-----|-----|-----------------------------------|
| 00 | 0–3 | data value of the bit at (row, col). It holds the prior during a dimension's forward pass and the a-posteriori value after it |
| 01 | 0–3 | extrinsic information of this dimension |
| 10 | 0 | `D_r`: f of the row's four priors |
| 10 | 1 | `F_r`: the forward metric |
| 10 | 3 | `P_r`: the received parity value |
| 11 | 0–3 | `TMP`: f of the other three priors of the row |

The word at var 10, col 2 is never used, because the backward metric is not
stored.

### Interleaver ROM

The interleaver ROM's address is a position `{dim, col, row}` in the current
dimension. Its data is the position of the same data bit in the previous
dimension. For dimension 0, the previous dimension is dimension 3 of the
previous iteration.

The controller puts the ROM data straight into the RAM address. So a dimension
reads the values the previous dimension just wrote, in its own order, with no
shuffle pass in between.

Dimension 0 is the natural order. So the dimension-0 entries map a natural bit
index to that bit's place in dimension 3. The same table therefore acts as the
deinterleaver when a block is written in and when its decisions are read out.

## Decoding schedule

A block takes `ITERS` = 16 iterations. The first one is for input and output.
The other 15 decode.

**Input/output iteration** (`first_iter` = 1):

1. **OUTPUT**, 1024 cycles. The previous block's final dimension-3 values are
   read through the deinterleaver and their sign bits are sent out in natural
   order. This state is skipped before the first block.
2. **INPUT**, 2048 words. The decoder takes 1024 data values in natural order,
   then 1024 parity values: dimension 0 rows 0..255, then dimensions 1, 2
   and 3.
3. **INIT**, 4096 cycles. All extrinsic words are cleared.

**Decoding iterations.** Dimensions 0, 1, 2 and 3 are handled in turn. Each
dimension makes two passes over its rows.

*Forward pass: updating step plus horizontal forward step. Rows 0 to 255,
19 cycles per row.* For each column:

```
x_c  = q_prev[interleave(k,r,c)] - e_k[r][c]       (opcode 11)
p01 = f(x0,x1)   p23 = f(x2,x3)   D_r = f(p01,p23)
TMP_0 = f(x1,p23)  TMP_1 = f(x0,p23)  TMP_2 = f(p01,x3)  TMP_3 = f(p01,x2)
F_0 = P_0 + D_0,   F_r = P_r + f(D_r, F_{r-1})
```

The pass writes `x_c`, `TMP_c`, `D_r` and `F_r` back to the RAM.

*Backward pass: horizontal backward step merged with the extrinsic
calculation. Rows 255 down to 0, 29 cycles per row.*

```
A_255 = P_255,     A_r = P_r + f(D_{r+1}, A_{r+1})      (register only)
v     = f(F_{r-1}, A_r)      (v = A_0 in row 0)
u     = clip7(f(TMP_c, v))                              (opcode 10)
q     = sat15(x_c + u)       -> data word
e_k   = q - x_c              -> extrinsic word
```

After dimension 3 of iteration 15, the controller goes back to OUTPUT.

### Extrinsic bookkeeping

The extrinsic value that is stored is `q − x`, the change actually made to the
data value. It is not the clipped `u`. The two differ only when `q`
saturated. Storing `u` makes the next iteration's `x = q − e` wrong after
saturation. In simulation this lost information made the decoder drift, within
a few iterations, to the complementary codeword. Storing the applied change
makes the subtraction exact. Its magnitude is at most 7, so it still fits the
clipped range.

### Cycle budget per block

| phase | cycles |
|-------|--------|
| output | 1024 |
| input | 2048 (if the input stream never stalls) |
| initialisation | 4096 |
| decoding | 15 × 4 × 256 × (19 + 29) = 737 280 |
| **total** | **744 448** |

The time from the last input word to the `block_done` pulse is
4096 + 737 280 cycles. The end-to-end testbench checks this exactly.

## Interface (`ldpc_seq_decoder`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock, synchronous active-low reset |
| in_valid / in_ready / in_llr | in / out / in | 1 / 1 / 5 | input stream. A word is taken when valid and ready are both high. Ready is high only in the INPUT state |
| out_valid / out_bit / out_idx | out | 1 / 1 / 10 | one hard decision per cycle, natural order, no back-pressure |
| first_iter, last_iter | out | 1 | the input/output iteration is running; the last decoding iteration is running |
| iter, dim | out | 4, 2 | current iteration (0 during input/output) and dimension |
| block_done | out | 1 | one-cycle pulse when a block is decoded |

The parameter `ITERS` (default 16, allowed range 2..16) counts the
input/output iteration too. Code sizes are constants in `ldpc_pkg`. The
address formats fix them at 4 dimensions, 256 rows and 4 columns.

Decisions for block *n* come out at the start of block *n+1*'s input/output
iteration. To flush the last block, wait for `block_done`. Its 1024 decisions
follow at once, and then the decoder waits for new input.

## Design choices and differences from the original architecture

The following are choices made in this design. They were not taken from the
original description.

* **Index meaning.** An index is read as an LLR of k/2. The f-function
  correction table and its rounding are this design's own.
* **Code structure.** The parity chain per dimension and the permutation
  polynomials are this design's choices. The original says only that each
  check covers 4 information entries, and that the interleavers are random
  and held in ROM.
* **Schedule.** The two-pass-per-dimension schedule and the exact cycle
  sequence in each row are this design's. The original states a total of
  1 298 432 cycles for its decoder, without a per-step breakdown. This design
  needs 744 448 cycles per block.
* **Memory total.** The RAM is 5 bits wide and the interleaver ROM is a single
  4096×12 table. With these choices the total memory matches the 151 552 bits
  the original gives.
* **Extrinsic value.** The stored extrinsic is the applied change (see above).
* **Interfaces.** The valid/ready input, the output without back-pressure, the
  order of the input words and the synchronous reset are this design's
  choices.
* **ROM use.** The look-up ROM and the interleaver ROM are read
  asynchronously. The look-up ROM also holds an f region that the multiplexer
  never selects.

The analog front end (ADC) is not part of the RTL. It connects to the input
stream.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M`. `tb/ldpc_ref_pkg.sv` is an independent
reference: it has integer arithmetic, an f correction table computed with
`$ln`/`$exp`, the permutations, an encoder, a channel model and a bit-exact
model of the decoder schedule.

| testbench | what it checks |
|-----------|----------------|
| tb_f_unit | all 1024 operand pairs against the reference; within 1 index of exact box-plus; no negative zero |
| tb_lut_rom, tb_lut_unit | all 4096 entries / operations |
| tb_interleaver_rom | every entry points to the previous dimension and the same data bit; each table is a permutation |
| tb_decoder_ram | random traffic against a model; one-cycle read latency; read-first on a write |
| tb_control_unit | controller with model RAM/ROM/arithmetic, `ITERS`=3; decisions vs reference; phase lengths; status flags |
| tb_ldpc_seq_decoder | full decoder at default size, three blocks with random input stalls (details below) |

`tb_ldpc_seq_decoder` runs about 2.3 M cycles and takes a few seconds. For each
block it checks:

* the decisions are bit-exact against the reference;
* the low-noise block decodes with no error;
* on the noisy blocks, the decoder leaves fewer errors than the channel made;
* the cycle count is exact.

It also counts input stalls, the skipped first output, extrinsic clipping
(which must match the reference count), saturations, dimension and iteration
changes, and overlapped output/input. It fails if any of these never happen.

Typical result:

| block | channel errors | errors after decoding |
|-------|----------------|-----------------------|
| low noise | 0 | 0 |
| LLR mean 3 | 89 | 0 |
| LLR mean 2.5 | 130 | 60 |

The last block is close to the decoding threshold of this rate-1/2 code.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_seq_decoder.sv \
    --top-module tb_ldpc_seq_decoder -o sim
./obj_dir/sim
```

Replace the testbench name to run any of the others.

## Files

* `rtl/ldpc_pkg.sv`: types (`sm5_t`, `op_e`, `var_e`, `ram_addr_t`, `pos_t`),
  constants, arithmetic and permutation functions.
* `rtl/f_unit.sv`, `rtl/lut_rom.sv`, `rtl/lut_unit.sv`: the arithmetic unit.
* `rtl/interleaver_rom.sv`: the interleavers and deinterleaver.
* `rtl/decoder_ram.sv`: the 16K×5 data RAM.
* `rtl/control_unit.sv`: the decoding FSM.
* `rtl/ldpc_seq_decoder.sv`: the top level.
* `tb/`: the reference package and one testbench per module.

# Densely Packed Decimal codec

Three decimal digits need 12 bits in BCD, but since 2^10 > 10^3 they fit in
10. Densely Packed Decimal (DPD) is a fixed 3-digits-to-10-bits code that
needs no arithmetic to pack or unpack. Packing and unpacking are a handful of
AND/OR terms per bit. Numbers 0..79 keep their BCD bits unchanged. One or two
digits use 4 or 7 bits, and a short code widens to a longer field by zero
padding.

This RTL implements a complete DPD round trip for one three-digit number:

```
 num (binary, 10 b) -> bin2bcd -> BCD (12 b) -> dpd_compress -> DPD (10 b)
 DPD (10 b) -> dpd_expand -> BCD (12 b) -> bcd2bin -> num (binary, 10 b)
```

The first line is the compression path (`dpd_compression_block`). The second
is the expansion path (`dpd_expansion_block`). `dpd_system` chains the two
behind a small register interface meant for an FPGA board with a clock, a
reset, a load and an enable switch.

## The DPD code

Call the BCD bits `a b c d | e f g h | i j k m`, where `a`, `e` and `i` are the
MSBs of the hundreds, tens and units digits. Call the declet bits
`p q r s t u v w x y`, with `p` as bit 9. A digit is *small* (0..7) when its
MSB is 0 and carries three significant bits. It is *large* (8 or 9) when its
MSB is 1 and carries one. The three MSBs choose one of eight layouts:

| a e i | p q r | s t u | v | w x y |
|-------|-------|-------|---|-------|
| 0 0 0 | b c d | f g h | 0 | j k m |
| 0 0 1 | b c d | f g h | 1 | 0 0 m |
| 0 1 0 | b c d | j k h | 1 | 0 1 m |
| 1 0 0 | j k d | f g h | 1 | 1 0 m |
| 1 1 0 | j k d | 0 0 h | 1 | 1 1 m |
| 1 0 1 | f g d | 0 1 h | 1 | 1 1 m |
| 0 1 1 | b c d | 1 0 h | 1 | 1 1 m |
| 1 1 1 | 0 0 d | 1 1 h | 1 | 1 1 m |

- Bits `r`, `u` and `y` are always the digit LSBs `d`, `h` and `m`.
- `v = 0` means that all three digits are small. That happens for 51.2% of
  numbers.
- When `v = 1`, the bits `w x` say which single digit is large. When
  `w x = 11`, the bits `s t` say which two or three digits are large.

`dpd_compress` and `dpd_expand` are not written as this table. They are flat
sum-of-products equations, one per output bit, so each bit is a two-level
function of the inputs. The testbenches check the equations against the table
on every input.

`dpd_expand` accepts all 1024 declets. The encoder never produces 24 of them:
the all-large layout with `p` or `q` set. Those 24 decode as if `p` and `q`
were 0, so the decoder never outputs an invalid BCD digit.

Examples, in the layout above:

| decimal | BCD            | DPD          |
|---------|----------------|--------------|
| 005     | 0000 0000 0101 | 000 000 0101 |
| 055     | 0000 0101 0101 | 000 101 0101 |
| 080     | 0000 1000 0000 | 000 000 1010 |
| 099     | 0000 1001 1001 | 000 101 1111 |
| 555     | 0101 0101 0101 | 101 101 0101 |
| 999     | 1001 1001 1001 | 001 111 1111 |

## Binary to BCD: the add-3 array

`bin2bcd` converts with the shift-and-add-3 method. In sequential form, the
binary number is shifted one bit at a time into three BCD columns (hundreds,
tens and units). Before each shift, every column that holds 5 or more gets 3
added. After the shift that value becomes 10 or more plus 6, which is exactly
a decimal carry into the next column.

Here the method is unrolled into twelve `add3` cells, C1 to C12:

- Each shift is wiring: a cell's top three output bits move one column left
  in the next row.
- A new binary bit enters the units column of each row: B9..B7 into C1, then
  B6, B5, B4, B3, B2 and B1.
- The tens column starts at C5 and the hundreds column at C12.
- B0 goes straight to the output LSB, because no correction follows the last
  shift.

The port comment in `rtl/bin2bcd.sv` lists the wiring of every cell.

A three-digit number needs only three bits in the hundreds column. C12
therefore gets a constant 0 as its MSB, and its carry-out is not used. Inputs
1000..1023 are outside the converter's range, and their outputs have no
meaning.

The `add3` cell adds 3 when its input is 5 or more. Inputs 10..15 never reach
a cell, and they wrap modulo 16.

## BCD to binary

`bcd2bin` computes N = 100H + 10T + O with shifts and adds only. It does this
in two identical steps: first 10H + T = 8H + 2H + T, then
N = 8(10H + T) + 2(10H + T) + O. The intermediate value needs 7 bits and the
result needs 10.

## Top level: `dpd_system`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active-high reset of every register |
| `load` | in | 1 | number register takes `num_i` at the next rising edge |
| `enable` | in | 1 | result registers take the codec outputs at the next rising edge; low = hold |
| `num_i` | in | 10 | number to encode, 0..999 |
| `num_q_o` | out | 10 | number register |
| `bcd_in_o` | out | 12 | BCD of the number (`bcd3_t`, hundreds in bits 11:8) |
| `dpd_o` | out | 10 | DPD declet |
| `bcd_out_o` | out | 12 | BCD recovered from the declet |
| `num_o` | out | 10 | binary number recovered from the declet |
| `roundtrip_ok_o` | out | 1 | high when the recovered number and BCD equal the originals |

Timing:

- The codec between the number register and the result registers is purely
  combinational.
- If a number is loaded at one edge and `enable` is high at the next edge, all
  results are valid after that second edge.
- If `load` and `enable` are held high together, the results trail the number
  register by one cycle.

The design has no parameters, because the code is fixed at three digits per
declet. The types shared by all modules are in `rtl/dpd_pkg.sv`.

## How closely this follows the original design

Taken from the original design:

- The two-path structure: converter, then DPD module, for each direction.
- The twelve-cell add-3 array: cell names, and which input bit enters which
  row.
- The encoder and decoder equations.
- The shift-and-add BCD-to-binary method.
- The board signal names: clock, reset, load, enable and a 10-bit number.

Choices made for this RTL:

- What `load` and `enable` do.
- Synchronous active-high reset.
- Registering every intermediate result.
- The `roundtrip_ok_o` flag.
- Exposing the BCD intermediates as ports.
- The treatment of add3 inputs 10..15 and binary inputs above 999.

The original design was observed on the board with a vendor logic-analyzer
core. That core, the FPGA board and its pin assignments are not part of this
RTL. On the board, most of the reported 306 flip-flops belonged to the
analyzer core. After coarse synthesis this RTL has 55 flip-flops.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`. The reference models in `tb/dpd_ref_pkg.sv`
are written from the layout table and from integer arithmetic, not from the
RTL equations.

| testbench | what it covers |
|-----------|----------------|
| `tb_add3` | all 16 inputs |
| `tb_bin2bcd` | 0..999 |
| `tb_dpd_compress` | all 1000 BCD inputs; the examples above; 0..79 unchanged from BCD |
| `tb_dpd_expand` | all 1024 declets; the round trip of all 1000 numbers |
| `tb_bcd2bin` | all 1000 BCD inputs |
| `tb_dpd_compression_block`, `tb_dpd_expansion_block` | the full input ranges of the two paths |
| `tb_dpd_system` | loads and round-trips all 0..999 through the registered top; checks the one-edge latency, hold with `enable` low, load and enable together, and reset; confirms that all eight layouts occur |

To run one of them with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_dpd_system \
    rtl/dpd_pkg.sv tb/dpd_ref_pkg.sv tb/tb_dpd_system.sv
./obj_dir/Vtb_dpd_system
```

Replace `tb_dpd_system` with any testbench name. Verilator finds the
remaining modules through `-Irtl`.

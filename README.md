# LUT-based Vedic multiplier (8x8, 16x16, 32x32)

An unsigned combinational multiplier designed around the logic slice of a
6-input-LUT FPGA. It rests on two ideas:

1. **Vertical-and-crosswise splitting (Vedic multiplication).** An NxN product
   is formed from four half-size products, all computed at once. The two
   "vertical" products (low×low, high×high) do not overlap and are simply
   placed side by side. The two "crosswise" products (high×low, low×high) land
   in the middle. Only the middle columns need real addition: a carry-save
   reduction, then one carry-chain adder.
2. **A 4x4 multiplier made of LUTs only.** The smallest products come from a
   4x4 multiplier in which every product bit is one LUT cone. The bits that
   depend on all eight inputs are split four ways on the operands' top bits
   (X3, Y3), and the slice's MUXF7/MUXF8 multiplexers pick among the four
   6-input LUTs. That makes each such bit exactly one slice, with one LUT level
   and two fast multiplexer levels.

The RTL models the LUTs and multiplexers as explicit small modules, so the
netlist has the same structure as the FPGA mapping. It is still ordinary
synthesizable SystemVerilog and runs on any tool.

## The 4x4 LUT multiplier (`mul4x4_lut`)

Product bit `Pk` of `X*Y` only depends on the operand bits at or below
position k. The multiplier uses that to size each cone:

| bit | inputs | built from |
|-----|--------|-----------|
| P0 | X0, Y0 | one LUT-2 |
| P1 | X1..X0, Y1..Y0 | one LUT-4 |
| P2 | X2..X0, Y2..Y0 | one LUT-6 |
| P3 .. P6 | all eight | four LUT-6 on X2..X0, Y2..Y0, one per (X3, Y3) case; two MUXF7 selected by X3; one MUXF8 selected by Y3 |
| P7 | all eight | one LUT-6 holding the X3 = Y3 = 1 case; MUXF7 (X3) and MUXF8 (Y3) with a constant 0 on their other input |

P7 only needs one LUT because a 4-bit product reaches 128 only when both
operands are 8 or more. The multiplexers gate that single LUT with X3 AND Y3.

In total the block uses 20 LUTs, 9 MUXF7 and 5 MUXF8.

**LUT contents are computed, not listed.** The `lut_init` function in
`mul4x4_lut.sv` builds each LUT's table at elaboration. Entry `addr` of the
LUT for bit `k` in case (X3, Y3) is

    bit k of ( ({X3, addr[2:0]}) * ({Y3, addr[5:3]}) )

For LUT-2 and LUT-4 the address holds only the low 1 or 2 bits of each
operand. The address order is X bits low, Y bits high: `i = {y[2:0], x[2:0]}`.

**Multiplexer polarity.** A `muxf` takes `i1` when its select is 1. In
`g_wide`, `f[{y3,x3}]` is the LUT for that case. The two MUXF7s give
`f7[0]` (Y3 = 0) and `f7[1]` (Y3 = 1), and the MUXF8 picks between them with
Y3. This polarity is the only one under which the gated P7 path gives the
right answer.

## Merging four sub-products (`vedic_combine`)

Split the operands at H = N/2: `a = {aH, aL}`, `b = {bH, bL}`. The inputs are
LL = aL·bL, HL = aH·bL, LH = aL·bH and HH = aH·bH, each N bits. For N = 8, by
column:

    column      15 14 13 12 | 11 10  9  8  7  6  5  4 |  3  2  1  0
    row-0       HH HH HH HH | HH HH HH HH LL LL LL LL | LL LL LL LL
    row-1                   | HL HL HL HL HL HL HL HL |
    row-2                   | LH LH LH LH LH LH LH LH |
                            '---- carry-save (3:2) ---'
    sum row                   s7 s6 s5 s4 s3 s2 s1 s0
    carry row           c7 c6 c5 c4 c3 c2 c1 c0          (one column up)

    product[3:0]  = LL[3:0]                     (no addition)
    product[4]    = s0                          (no addition)
    product[15:5] = {HH[7:4], s7..s1} + {000, c7..c0}   11-bit carry chain

In general:
* The CSA covers columns H .. H+N-1 (N bits).
* The final adder is 2N-H-1 bits wide and covers columns H+1 .. 2N-1.
* Its carry out is always 0 for true sub-products, because the product fits
  in 2N bits. An assertion checks this.

The carry-save step (`csa_reduce`) is one full adder per column and has no
carry travelling along the row. The final adder (`carry_chain_adder`) is
written as an FPGA carry chain:

    p[i]   = a[i] ^ b[i]
    c[i+1] = p[i] ? c[i] : a[i]
    s[i]   = p[i] ^ c[i]

## Building 16x16 and 32x32 (`vedic_mul`)

`vedic_mul #(N)` repeats the same step. Level 0 multiplies every 4-bit chunk
of `a` by every 4-bit chunk of `b`: (N/4)² instances of `mul4x4_lut`. Each
further level doubles the chunk width S. The product of S-bit chunks (i, j)
is a `vedic_combine #(S)` of the level-below products (2i, 2j), (2i+1, 2j),
(2i, 2j+1) and (2i+1, 2j+1). The last level holds the single product a·b.

| N | 4x4 multipliers | combine steps | logic depth |
|---|---|---|---|
| 8  | 4  | 1 (8-bit) | LUT + 2 MUX + CSA + 11-bit chain |
| 16 | 16 | 4 (8-bit) + 1 (16-bit) | + CSA + 23-bit chain |
| 32 | 64 | 16 + 4 + 1 | + CSA + 47-bit chain |

Each doubling of N adds one CSA level and one longer carry chain. That is why
the delay grows slowly with N.

The tree is written as a generate loop over levels, not as a module that
instantiates itself, because some tools do not elaborate self-instantiation
at the top level. `N` must be a power of two, at least 4. Any other value
stops elaboration with an error.

## Module hierarchy and interfaces

    vedic_mult_top           three independent multipliers side by side
      vedic_mul #(8)         a8,  b8  -> p8  [15:0]
      vedic_mul #(16)        a16, b16 -> p16 [31:0]
      vedic_mul #(32)        a32, b32 -> p32 [63:0]
        mul4x4_lut           x, y [3:0] -> p [7:0]
          lut_k #(K, INIT)   i [K-1:0] -> o = INIT[i]
          muxf               o = s ? i1 : i0   (MUXF7 / MUXF8)
        vedic_combine #(S)   pp_ll, pp_hl, pp_lh, pp_hh [S-1:0] -> p [2S-1:0]
          csa_reduce #(W)    a, b, c -> sum, carry
          carry_chain_adder #(W)  a, b, cin -> s, cout

All blocks are purely combinational. There is no clock, no reset, no
handshake and no register. The product is valid one propagation delay after
the operands change. To pipeline the design, register the operands and the
product around `vedic_mul`. The natural internal cut is between two
combine levels (`g_lvl[k].prod`).

Operands and products are unsigned.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it covers |
|---|---|
| `tb_lut_k` | every address of a 6-input and a 2-input LUT |
| `tb_muxf` | all 8 input combinations |
| `tb_mul4x4_lut` | all 256 operand pairs; every (X3, Y3) multiplexer path and P7 = 1 seen |
| `tb_csa_reduce` | per-column sum/carry and `a+b+c == sum+2·carry`, random and extreme rows |
| `tb_carry_chain_adder` | 11-bit random plus full-length ripple; 4-bit exhaustive with both carry-ins |
| `tb_vedic_combine` | all 65536 8-bit operand pairs, 16-bit random; middle-column overflow and multi-column carry ripple seen |
| `tb_vedic_mul` | 4x4 and 8x8 exhaustive, 16x16 random and extreme |
| `tb_vedic_mult_top` | all three sizes at their built widths |

`tb_vedic_mult_top` starts with the values of the original design's own
simulation, for example 255·255 = 65025, 6535·6554 = 42830390 and
4294295·67295 = 288984582025. It then runs corner and 20 000 random operand
pairs per size. The reference is 64-bit integer multiplication. It also
counts the multiplexer paths and the middle-column carries it exercised.

With plain Verilator, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl +libext+.sv \
        --top-module tb_vedic_mult_top tb/tb_vedic_mult_top.sv
    ./obj_dir/Vtb_vedic_mult_top

Replace the testbench name to run any other test. Each runs in well under a
second.

To change the width, set `N` on `vedic_mul` (4, 8, 16, 32, 64, ...). To
change the LUT tables, edit `lut_init`. A different split of a product bit
across LUTs only needs a new generate branch in `mul4x4_lut`.

## How far it follows the original design

Taken directly from the original description:
* the 4x4 multiplier's structure: LUT-2/4/6 per bit, four LUT-6s with
  MUXF7/MUXF8 on X3/Y3 for the middle bits, the gated single LUT for P7
* the 8x8 arrangement of four 4x4 products into three rows, with CSA
  reduction of columns 4..11 and a final carry-chain addition over
  columns 5..15
* the three sizes 8, 16 and 32 bits
* the test values

This design's own choices, where the description is silent:
* the LUT contents (computed from the product they must give), the LUT
  address order, and the multiplexer data-input polarity (deduced from the P7
  path)
* building 16x16 and 32x32 by repeating the 8x8 combine step
* the full-adder CSA and the mux-XOR form of the carry chain
* unsigned operands, no registers anywhere, and port names with a width
  suffix

Not reproduced:
* placement of each cone into one slice (a physical constraint)
* the reported area and speed of the original design on Virtex-5 (23 or 24 / 105 / 433
  slices and 6.59/10.67/15.54 ns for 8/16/32 bits) and on Virtex-6. Those
  figures depend on the FPGA tools and device, and nothing here
  re-measures them. A generic synthesis tool may restructure the explicit
  LUTs and multiplexers, so the one-slice-per-bit mapping is only guaranteed
  when the LUT and MUXF instances are mapped to the device's own primitives.

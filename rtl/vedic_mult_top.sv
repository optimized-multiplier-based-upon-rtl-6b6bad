// vedic_mult_top: the three implemented sizes of the LUT-based Vedic
// multiplier, side by side: 8x8, 16x16 and 32x32.
//
// Each size is a separate combinational multiplier with its own operands and
// product; they share nothing. The 8x8 one is four LUT-based 4x4
// multipliers with a carry-save reduction and a carry-chain final adder; the
// 16x16 and 32x32 ones repeat the same arrangement with half-size Vedic
// multipliers as their four sub-products. Operands and products are
// unsigned. Holding the three sizes in one top mirrors how the design is
// evaluated, size by size; the port names (width suffix) are this design's.
//
// Interface: aW, bW W-bit operands, pW = aW*bW of 2W bits, for W = 8, 16, 32.
// No clock: the product follows the operands after the combinational delay.
module vedic_mult_top (
  input  logic [7:0]  a8,
  input  logic [7:0]  b8,
  output logic [15:0] p8,
  input  logic [15:0] a16,
  input  logic [15:0] b16,
  output logic [31:0] p16,
  input  logic [31:0] a32,
  input  logic [31:0] b32,
  output logic [63:0] p32
);
  vedic_mul #(.N(8))  u_mul8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mul #(.N(16)) u_mul16 (.a(a16), .b(b16), .p(p16));
  vedic_mul #(.N(32)) u_mul32 (.a(a32), .b(b32), .p(p32));
endmodule

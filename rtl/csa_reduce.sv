// csa_reduce: carry-save (3:2) reduction of three rows of partial products.
//
// Every column adds its three bits in a full adder: the sum bit stays in the
// column (sum[i]) and the carry bit belongs to the next column up
// (carry[i], weight 2^(i+1)). So a + b + c == sum + 2*carry, with no carry
// travelling along the row: the delay is one full adder whatever W is.
// The multiplier uses it to merge the middle columns of its three partial
// product rows before the single final addition. The reduction step follows
// the design description; the full-adder make-up is this design's choice.
//
// Interface: a, b, c W-bit rows; sum W bits; carry W bits, one column up.
// Purely combinational.
module csa_reduce #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  always_comb begin
    sum   = a ^ b ^ c;
    carry = (a & b) | (a & c) | (b & c);
  end
endmodule

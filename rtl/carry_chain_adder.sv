// carry_chain_adder: W-bit adder laid out as an FPGA carry chain.
//
// Each bit forms the propagate signal p = a ^ b. The carry into the next bit
// is a 2:1 multiplexer: the incoming carry if p = 1, otherwise a (which then
// equals b, so it is the generated carry). The sum bit is p ^ carry. This is
// the multiplexer-and-XOR chain that runs through the slices from CIN to
// COUT, so a ripple of W bits costs one fast multiplexer per bit.
// The design description names only a carry chain adder for the final
// addition; the per-bit structure is this design's own choice.
//
// Interface: a, b W bits, cin; s = (a + b + cin) mod 2^W, cout the carry out.
// Purely combinational.
module carry_chain_adder #(
  parameter int unsigned W = 11
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0]   c;
  logic [W-1:0] prop;

  assign c[0] = cin;
  assign prop = a ^ b;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign c[i+1] = prop[i] ? c[i] : a[i];   // carry multiplexer
    assign s[i]   = prop[i] ^ c[i];          // sum XOR
  end

  assign cout = c[W];
endmodule

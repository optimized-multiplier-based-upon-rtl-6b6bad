// vedic_combine: merges the four half-size sub-products of an NxN Vedic
// multiplication into the 2N-bit product.
//
// With a = {aH, aL} and b = {bH, bL}, split at H = N/2 bits, the inputs are
// the vertical products LL = aL*bL and HH = aH*bH and the crosswise products
// HL = aH*bL and LH = aL*bH, each N bits. LL and HH do not overlap, so they
// form one 2N-bit row, row-0 = {HH, LL}. HL and LH are rows 1 and 2, both
// starting at column H. Only the middle N columns (H .. H+N-1) hold three
// bits: a carry-save reduction turns them into a sum row and a carry row
// (one column up) without any carry propagation. Columns 0 .. H-1 of row-0
// and the lowest sum bit are then final. One carry-chain adder of 2N-H-1
// bits adds the rest: the upper H columns of row-0 beside the upper sum
// bits, plus the carry row. For N = 8 that is an 8-column reduction over
// columns 4..11 and an 11-bit addition over columns 5..15. This arrangement
// follows the design description of the 8x8 multiplier. Using the same step
// for 16x16 and 32x32 is this design's reading of how the larger sizes are
// built.
//
// The product of two N-bit numbers fits in 2N bits, so the final adder never
// carries out when the inputs are true sub-products; an assertion checks it.
//
// Interface: pp_ll, pp_hl, pp_lh, pp_hh N bits each; p 2N bits.
// Purely combinational.
module vedic_combine #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   pp_ll,
  input  logic [N-1:0]   pp_hl,
  input  logic [N-1:0]   pp_lh,
  input  logic [N-1:0]   pp_hh,
  output logic [2*N-1:0] p
);
  localparam int unsigned H  = N / 2;          // half width
  localparam int unsigned FW = 2 * N - H - 1;  // final adder width

  logic [2*N-1:0] row0;
  logic [N-1:0]   csa_sum, csa_carry;
  logic [FW-1:0]  fin_a, fin_b, fin_s;
  logic           fin_cout;

  assign row0 = {pp_hh, pp_ll};

  // middle columns H .. H+N-1: row-0, row-1 (HL), row-2 (LH)
  csa_reduce #(.W(N)) u_csa (
    .a(row0[H +: N]), .b(pp_hl), .c(pp_lh),
    .sum(csa_sum), .carry(csa_carry)
  );

  // final addition over columns H+1 .. 2N-1
  assign fin_a = {row0[2*N-1 -: H], csa_sum[N-1:1]};
  assign fin_b = {{(H-1){1'b0}}, csa_carry};

  carry_chain_adder #(.W(FW)) u_final (
    .a(fin_a), .b(fin_b), .cin(1'b0), .s(fin_s), .cout(fin_cout)
  );

  assign p = {fin_s, csa_sum[0], row0[H-1:0]};

  always_comb begin
    assert (fin_cout == 1'b0) else $error("vedic_combine: final adder overflow");
  end
endmodule

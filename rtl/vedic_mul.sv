// vedic_mul: unsigned NxN multiplier in the vertical-and-crosswise (Vedic)
// arrangement, tiled from LUT-based 4x4 multipliers.
//
// Both operands are cut into 4-bit chunks. Level 0 multiplies every chunk of
// a with every chunk of b in a 4x4 LUT multiplier (mul4x4_lut), all at once.
// Each following level doubles the chunk width S: the product of S-bit
// chunks i of a and j of b is merged (vedic_combine) from the four level
// below products of its half chunks, LL = (2i, 2j), HL = (2i+1, 2j),
// LH = (2i, 2j+1) and HH = (2i+1, 2j+1). The single product at the last
// level, where S = N, is a*b. An 8x8 multiplier is therefore four 4x4
// multipliers and one combine step, as in the reference 8x8 design; 16x16 is
// sixteen 4x4 multipliers, four 8-bit combine steps and one 16-bit one.
// Seen from any level, an NxN multiplier is four (N/2)x(N/2) multipliers and
// one combine step.
//
// The 4x4 multiplier and the 8x8 combine step follow the design description;
// building 16x16 and 32x32 by repeating the step, and writing the repetition
// as levels of a generate loop rather than a recursive module, are this
// design's own choices. N must be a power of two, at least 4.
//
// Interface: a, b N-bit unsigned; p = a*b, 2N bits. Purely combinational,
// no clock; each doubling of N adds one CSA and one carry chain of depth.
module vedic_mul #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned LEVELS = $clog2(N / 4);  // combine levels above the 4x4 ones

  if (N < 4 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("vedic_mul: N must be a power of two, at least 4");
  end

  for (genvar k = 0; k <= LEVELS; k++) begin : g_lvl
    localparam int unsigned S = 4 << k;   // chunk width at this level
    localparam int unsigned C = N / S;    // chunks per operand
    logic [2*S-1:0] prod [C][C];          // prod[i][j] = (a chunk i) * (b chunk j)

    for (genvar i = 0; i < C; i++) begin : g_i
      for (genvar j = 0; j < C; j++) begin : g_j
        if (k == 0) begin : g_lut
          mul4x4_lut u_mul4 (.x(a[4*i +: 4]), .y(b[4*j +: 4]), .p(prod[i][j]));
        end else begin : g_comb
          vedic_combine #(.N(S)) u_comb (
            .pp_ll(g_lvl[k-1].prod[2*i][2*j]),
            .pp_hl(g_lvl[k-1].prod[2*i+1][2*j]),
            .pp_lh(g_lvl[k-1].prod[2*i][2*j+1]),
            .pp_hh(g_lvl[k-1].prod[2*i+1][2*j+1]),
            .p(prod[i][j])
          );
        end
      end
    end
  end

  assign p = g_lvl[LEVELS].prod[0][0];
endmodule

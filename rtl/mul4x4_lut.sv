// mul4x4_lut: unsigned 4x4 multiplier built from LUTs and slice multiplexers.
//
// This is the sub-multiplier from which every larger multiplier is tiled.
// Each product bit is its own small logic cone, sized to the inputs it
// really depends on:
//   P0  one LUT-2 of (X0,Y0)
//   P1  one LUT-4 of (X0,X1,Y0,Y1)
//   P2  one LUT-6 of (X0..X2,Y0..Y2)
//   P3..P6  four LUT-6 of (X0..X2,Y0..Y2), one per value of (X3,Y3); two
//       MUXF7 selected by X3 and one MUXF8 selected by Y3 pick the right one,
//       which makes each of these bits exactly one slice
//   P7  one LUT-6 holding the X3=Y3=1 case; MUXF7 (select X3) and MUXF8
//       (select Y3) force it to 0 otherwise, since a product of 128 or more
//       needs both operands to be at least 8.
// This structure follows the design description. The LUT contents are not
// listed there: they are computed here at elaboration from the product they
// must produce, so the tables are the truth table of x*y. LUT address bit
// order (X bits low, Y bits high) and which LUT serves which (X3,Y3) case are
// this design's own choice.
//
// Interface: x, y 4-bit unsigned; p = x*y, 8 bits. Purely combinational.
module mul4x4_lut (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [7:0] p
);
  // Contents of a LUT whose address is {y[KB-1:0], x[KB-1:0]}: bit PBIT of
  // the product with the upper operand bit x3, y3 fixed and any address bit
  // at or above position KB of each operand taken as zero.
  function automatic logic [63:0] lut_init(int kb, int pbit, logic x3, logic y3);
    logic [63:0] t;
    logic [3:0]  xv, yv;
    logic [7:0]  prod;
    t = '0;
    for (int addr = 0; addr < (1 << (2 * kb)); addr++) begin
      xv = 4'(addr % (1 << kb));
      yv = 4'(addr / (1 << kb));
      xv[3] = xv[3] | x3;
      yv[3] = yv[3] | y3;
      prod = xv * yv;
      t[addr] = |((prod >> pbit) & 8'd1);
    end
    return t;
  endfunction

  localparam logic [63:0] INIT_F0  = lut_init(1, 0, 1'b0, 1'b0);
  localparam logic [63:0] INIT_F1  = lut_init(2, 1, 1'b0, 1'b0);
  localparam logic [63:0] INIT_F2  = lut_init(3, 2, 1'b0, 1'b0);
  localparam logic [63:0] INIT_F7A = lut_init(3, 7, 1'b1, 1'b1);

  // P0..P2: LUTs only
  lut_k #(.K(2), .INIT(INIT_F0[3:0]))  u_f0 (.i({y[0],   x[0]}),   .o(p[0]));
  lut_k #(.K(4), .INIT(INIT_F1[15:0])) u_f1 (.i({y[1:0], x[1:0]}), .o(p[1]));
  lut_k #(.K(6), .INIT(INIT_F2))       u_f2 (.i({y[2:0], x[2:0]}), .o(p[2]));

  // P3..P6: four LUT-6, indexed by {y3, x3}, two MUXF7, one MUXF8
  for (genvar b = 3; b <= 6; b++) begin : g_wide
    logic [3:0] f;     // f[{y3,x3}] = candidate for that case
    logic [1:0] f7;    // f7[y3] = MUXF7 output for that Y3 value
    for (genvar c = 0; c < 4; c++) begin : g_case
      localparam logic [63:0] INIT_C = lut_init(3, b, c[0], c[1]);
      lut_k #(.K(6), .INIT(INIT_C)) u_lut (.i({y[2:0], x[2:0]}), .o(f[c]));
    end
    muxf u_muxf7_y1 (.i0(f[2]),  .i1(f[3]),  .s(x[3]), .o(f7[1]));
    muxf u_muxf7_y0 (.i0(f[0]),  .i1(f[1]),  .s(x[3]), .o(f7[0]));
    muxf u_muxf8    (.i0(f7[0]), .i1(f7[1]), .s(y[3]), .o(p[b]));
  end

  // P7: one LUT-6, gated to 0 unless X3 = Y3 = 1
  logic f7a, f7a_x;
  lut_k #(.K(6), .INIT(INIT_F7A)) u_f7a (.i({y[2:0], x[2:0]}), .o(f7a));
  muxf u_f7_muxf7 (.i0(1'b0), .i1(f7a),   .s(x[3]), .o(f7a_x));
  muxf u_f7_muxf8 (.i0(1'b0), .i1(f7a_x), .s(y[3]), .o(p[7]));
endmodule

// tb_vedic_mult_top: end-to-end test of the three multiplier sizes (8x8,
// 16x16, 32x32) at their built sizes, with no parameter changed.
// Each size gets the published simulation values first (75*122, 123*102,
// 255*255; 7543*25987, 65355*65535, 6535*6554; 483649*214745,
// 4294967295*4294967295, 4294295*67295), then zero, one, extreme and random
// operands. Products are compared with 64-bit integer multiplication.
//
// It also counts, per size, how often each mechanism of the multiplier was
// exercised, and fails if any never was:
//   - every (X3,Y3) multiplexer path of the 4x4 LUT multipliers
//     (seen at the 8x8 size, whose four sub-products are 4x4 ones)
//   - the top bit P7 of a 4x4 sub-product being set (its gated LUT path)
//   - the carry-save middle columns carrying into the upper columns, so that
//     the final carry chain adds into the HH-only part of the product.
// Prints one TB_RESULT line.
module tb_vedic_mult_top;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [31:0] a32, b32;
  logic [63:0] p32;
  int checks = 0, failures = 0;
  int muxf_path[4];
  int p7_set = 0;
  int mid_carry[3];

  vedic_mult_top dut (
    .a8(a8), .b8(b8), .p8(p8),
    .a16(a16), .b16(b16), .p16(p16),
    .a32(a32), .b32(b32), .p32(p32)
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Does the middle-column sum of an n x n Vedic step overflow n bits?
  function automatic bit middle_carries(int n, longint unsigned x, longint unsigned y);
    int h;
    longint unsigned mask_h, xl, xh, yl, yh, row0_mid;
    h = n / 2;
    mask_h = (64'd1 << h) - 1;
    xl = x & mask_h;  xh = x >> h;
    yl = y & mask_h;  yh = y >> h;
    // row-0 columns h .. h+n-1: upper half of LL, lower half of HH
    row0_mid = ((xl * yl) >> h) + (((xh * yh) & mask_h) << h);
    return ((row0_mid + xh * yl + xl * yh) >> n) != 0;
  endfunction

  task automatic check8(input logic [7:0] x, input logic [7:0] y);
    logic [3:0] nx[2], ny[2];
    a8 = x;
    b8 = y;
    #1;
    checks++;
    if (int'(p8) != int'(x) * int'(y)) begin
      failures++;
      $display("FAIL 8x8 %0d*%0d got %0d", x, y, p8);
    end
    nx[0] = x[3:0]; nx[1] = x[7:4];
    ny[0] = y[3:0]; ny[1] = y[7:4];
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        muxf_path[{ny[j][3], nx[i][3]}]++;
        if (int'(nx[i]) * int'(ny[j]) >= 128) p7_set++;
      end
    if (middle_carries(8, 64'(x), 64'(y))) mid_carry[0]++;
  endtask

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    a16 = x;
    b16 = y;
    #1;
    checks++;
    if (longint'(p16) != longint'(x) * longint'(y)) begin
      failures++;
      $display("FAIL 16x16 %0d*%0d got %0d", x, y, p16);
    end
    if (middle_carries(16, 64'(x), 64'(y))) mid_carry[1]++;
  endtask

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    longint unsigned expected;
    a32 = x;
    b32 = y;
    #1;
    expected = longint'(x) * longint'(y);
    checks++;
    if (p32 != expected) begin
      failures++;
      $display("FAIL 32x32 %0d*%0d got %0d expected %0d", x, y, p32, expected);
    end
    if (middle_carries(32, 64'(x), 64'(y))) mid_carry[2]++;
  endtask

  initial begin
    for (int k = 0; k < 4; k++) muxf_path[k] = 0;
    for (int k = 0; k < 3; k++) mid_carry[k] = 0;

    // published simulation values
    check8(8'd75, 8'd122);
    check8(8'd123, 8'd102);
    check8(8'd255, 8'd255);
    check16(16'd7543, 16'd25987);
    check16(16'd65355, 16'd65535);
    check16(16'd6535, 16'd6554);
    check32(32'd483649, 32'd214745);
    check32(32'd4294967295, 32'd4294967295);
    check32(32'd4294295, 32'd67295);
    // the published products themselves
    checks += 3;
    if (p8  != 16'd65025)       failures++;
    if (p16 != 32'd42830390)    failures++;
    if (p32 != 64'd288984582025) failures++;

    // corners
    check8('0, '1);   check8('1, 8'd1);   check8(8'h80, 8'h80);
    check16('0, '1);  check16('1, 16'd1); check16(16'h8000, 16'hFFFF);
    check32('0, '1);  check32('1, 32'd1); check32(32'h8000_0000, 32'hFFFF_FFFF);
    check32(32'h0000_FFFF, 32'hFFFF_0000);

    for (int n = 0; n < 20000; n++) begin
      check8(8'($urandom), 8'($urandom));
      check16(16'($urandom), 16'($urandom));
      check32($urandom, $urandom);
    end

    for (int k = 0; k < 4; k++) begin
      $display("4x4 MUXF path X3=%0d Y3=%0d taken %0d times", k % 2, k / 2, muxf_path[k]);
      checks++;
      if (muxf_path[k] == 0) failures++;
    end
    $display("4x4 P7 set %0d times", p7_set);
    checks++;
    if (p7_set == 0) failures++;
    for (int k = 0; k < 3; k++) begin
      $display("%0dx%0d middle columns carried into the upper columns %0d times",
               8 << k, 8 << k, mid_carry[k]);
      checks++;
      if (mid_carry[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

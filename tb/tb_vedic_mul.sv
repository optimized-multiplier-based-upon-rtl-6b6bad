// tb_vedic_mul: checks the recursive Vedic multiplier against integer
// multiplication: every operand pair at the default 8x8 size, the smallest
// size (4x4, the LUT multiplier alone) exhaustively, and 16x16 on the
// published 16-bit test values plus random and extreme operands.
// At 8x8 it also counts how often the carry-save middle columns carried into
// the upper (HH-only) columns, which the final carry chain must then add,
// and fails if that never happened. Prints one TB_RESULT line.
module tb_vedic_mul;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;
  int mid_carry = 0;

  vedic_mul          dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mul #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  vedic_mul #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    longint unsigned expected;
    a16 = x;
    b16 = y;
    #1;
    expected = longint'(x) * longint'(y);
    checks++;
    if (longint'(p16) != expected) begin
      failures++;
      $display("FAIL 16x16 %0d*%0d got %0d expected %0d", x, y, p16, expected);
    end
  endtask

  initial begin
    int expected, mid;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x);
        b4 = 4'(y);
        #1;
        checks++;
        if (int'(p4) != x * y) begin
          failures++;
          $display("FAIL 4x4 %0d*%0d got %0d", x, y, p4);
        end
      end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x);
        b8 = 8'(y);
        #1;
        expected = x * y;
        checks++;
        if (int'(p8) != expected) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d*%0d got %0d expected %0d", x, y, p8, expected);
        end
        // middle columns 4..11: row-0 bits plus the two crosswise products
        mid = (((x / 16) * (y / 16) * 256 + (x % 16) * (y % 16)) / 16) % 256
              + (x / 16) * (y % 16) + (x % 16) * (y / 16);
        if (mid >= 256) mid_carry++;
      end
    check16(16'd7543, 16'd25987);
    check16(16'd65355, 16'd65535);
    check16(16'd6535, 16'd6554);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h0000, 16'hFFFF);
    check16(16'h8000, 16'h8000);
    for (int n = 0; n < 20000; n++) check16(16'($urandom), 16'($urandom));
    $display("8x8 middle columns carried into the upper columns %0d times", mid_carry);
    checks++;
    if (mid_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

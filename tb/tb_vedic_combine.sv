// tb_vedic_combine: checks the combine step of the Vedic multiplier. The
// four sub-products are computed here from random half-size operands
// (LL = aL*bL, HL = aH*bL, LH = aL*bH, HH = aH*bH) and the merged result is
// compared with the full product a*b, at the default N = 8 (all 65536
// operand pairs) and at N = 16 (random and extreme operands). It also counts
// how often the middle columns carried into the HH-only columns and how
// often a carry generated in the final carry chain travelled through 4 more
// columns,
// failing if either never happened. Prints one TB_RESULT line.
module tb_vedic_combine;
  logic [7:0]  ll8, hl8, lh8, hh8;
  logic [15:0] p8;
  logic [15:0] ll16, hl16, lh16, hh16;
  logic [31:0] p16;
  int checks = 0, failures = 0;
  int mid_carry = 0, long_ripple = 0;

  vedic_combine           dut8  (.pp_ll(ll8),  .pp_hl(hl8),  .pp_lh(lh8),  .pp_hh(hh8),  .p(p8));
  vedic_combine #(.N(16)) dut16 (.pp_ll(ll16), .pp_hl(hl16), .pp_lh(lh16), .pp_hh(hh16), .p(p16));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    longint unsigned xl, xh, yl, yh;
    xl = longint'(x[7:0]); xh = longint'(x[15:8]);
    yl = longint'(y[7:0]); yh = longint'(y[15:8]);
    ll16 = 16'(xl * yl); hl16 = 16'(xh * yl);
    lh16 = 16'(xl * yh); hh16 = 16'(xh * yh);
    #1;
    checks++;
    if (longint'(p16) != longint'(x) * longint'(y)) begin
      failures++;
      $display("FAIL N=16 %0d*%0d got %0d", x, y, p16);
    end
  endtask

  initial begin
    int xl, xh, yl, yh, mid;
    logic [7:0]  r0m, rs, rc;
    logic [10:0] fa, fb;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        xl = x % 16; xh = x / 16; yl = y % 16; yh = y / 16;
        ll8 = 8'(xl * yl); hl8 = 8'(xh * yl);
        lh8 = 8'(xl * yh); hh8 = 8'(xh * yh);
        #1;
        checks++;
        if (int'(p8) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 %0d*%0d got %0d", x, y, p8);
        end
        mid = (xl * yl) / 16 + ((xh * yh) % 16) * 16 + xh * yl + xl * yh;
        if (mid >= 256) mid_carry++;
        // final adder operands (columns 5..15), rebuilt from the three rows
        r0m = 8'((((xh * yh) % 16) * 16) + (xl * yl) / 16);
        rs  = r0m ^ 8'(xh * yl) ^ 8'(xl * yh);
        rc  = (r0m & 8'(xh * yl)) | (r0m & 8'(xl * yh)) | (8'(xh * yl) & 8'(xl * yh));
        fa  = {4'((xh * yh) / 16), rs[7:1]};
        fb  = {3'b000, rc};
        // a carry generated in one column that travels through 4 more
        for (int c = 0; c + 4 < 11; c++)
          if (fa[c] & fb[c] && (fa[c+1 +: 4] ^ fb[c+1 +: 4]) == 4'hF) begin
            long_ripple++;
            break;
          end
      end
    check16(16'd7543, 16'd25987);
    check16(16'd65355, 16'd65535);
    check16(16'hFFFF, 16'hFFFF);
    for (int n = 0; n < 20000; n++) check16(16'($urandom), 16'($urandom));
    $display("middle columns carried into the upper columns %0d times", mid_carry);
    $display("final-adder carries rippling 4 or more columns %0d times", long_ripple);
    checks += 2;
    if (mid_carry == 0) failures++;
    if (long_ripple == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

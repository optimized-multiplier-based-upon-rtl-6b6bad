// tb_mul4x4_lut: exhaustive check of the LUT-based 4x4 multiplier (all 256
// operand pairs) against integer multiplication. It also counts how often
// each (X3,Y3) multiplexer path was taken and how often the top bit P7 was
// set, and fails if any of them never happened. Prints one TB_RESULT line.
module tb_mul4x4_lut;
  logic [3:0] x, y;
  logic [7:0] p;
  int checks = 0, failures = 0;
  int path_cnt[4];
  int p7_cnt = 0;

  mul4x4_lut dut (.x(x), .y(y), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    for (int k = 0; k < 4; k++) path_cnt[k] = 0;
    for (int xv = 0; xv < 16; xv++) begin
      for (int yv = 0; yv < 16; yv++) begin
        x = 4'(xv);
        y = 4'(yv);
        #1;
        expected = xv * yv;
        checks++;
        if (int'(p) != expected) begin
          failures++;
          $display("FAIL %0d*%0d got %0d expected %0d", xv, yv, p, expected);
        end
        path_cnt[{y[3], x[3]}]++;
        if (expected >= 128) p7_cnt++;
      end
    end
    for (int k = 0; k < 4; k++) begin
      $display("MUXF path X3=%0d Y3=%0d taken %0d times", k % 2, k / 2, path_cnt[k]);
      checks++;
      if (path_cnt[k] == 0) failures++;
    end
    $display("P7 set %0d times", p7_cnt);
    checks++;
    if (p7_cnt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

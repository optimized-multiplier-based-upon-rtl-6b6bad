// tb_csa_reduce: checks the carry-save reduction column by column (each
// column's sum and carry are the two bits of the count of ones among its
// three inputs) and as a whole (a + b + c == sum + 2*carry), on all-zero,
// all-one and random rows at the default width. Prints one TB_RESULT line.
module tb_csa_reduce;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, c, sum, carry;
  int checks = 0, failures = 0;

  csa_reduce dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int ones;
    longint unsigned total, reduced;
    #1;
    for (int i = 0; i < int'(W); i++) begin
      ones = int'(a[i]) + int'(b[i]) + int'(c[i]);
      checks++;
      if (sum[i] !== ones[0] || carry[i] !== ones[1]) begin
        failures++;
        $display("FAIL column %0d a=%h b=%h c=%h sum=%h carry=%h", i, a, b, c, sum, carry);
      end
    end
    total   = longint'(a) + longint'(b) + longint'(c);
    reduced = longint'(sum) + 2 * longint'(carry);
    checks++;
    if (total != reduced) begin
      failures++;
      $display("FAIL total a=%h b=%h c=%h: %0d vs %0d", a, b, c, total, reduced);
    end
  endtask

  initial begin
    a = '0; b = '0; c = '0; check_one();
    a = '1; b = '1; c = '1; check_one();
    a = '1; b = '0; c = '1; check_one();
    for (int n = 0; n < 3000; n++) begin
      a = W'($urandom);
      b = W'($urandom);
      c = W'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_carry_chain_adder: checks the carry-chain adder against integer
// addition at the default width (random operands plus carries that ripple
// the whole length) and exhaustively at 4 bits, with both carry-in values.
// Prints one TB_RESULT line.
module tb_carry_chain_adder;
  localparam int unsigned W = 11;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  logic [3:0]   a4, b4, s4;
  logic         cin4, cout4;
  int checks = 0, failures = 0;
  int full_ripple = 0;

  carry_chain_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  carry_chain_adder #(.W(4)) dut4 (.a(a4), .b(b4), .cin(cin4), .s(s4), .cout(cout4));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_w();
    int expected;
    #1;
    expected = int'(a) + int'(b) + int'(cin);
    checks++;
    if ({cout, s} !== (W + 1)'(expected)) begin
      failures++;
      $display("FAIL %0d+%0d+%0d got %0d", a, b, cin, {cout, s});
    end
    if ((a ^ b) == '1 && cin) full_ripple++;
  endtask

  initial begin
    // a carry that travels through every stage
    a = '1; b = '0; cin = 1'b1; check_w();
    a = 11'h555; b = 11'h2AA; cin = 1'b1; check_w();
    a = '1; b = '1; cin = 1'b1; check_w();
    for (int n = 0; n < 5000; n++) begin
      a   = W'($urandom);
      b   = W'($urandom);
      cin = 1'($urandom);
      check_w();
    end
    for (int v = 0; v < 512; v++) begin
      {cin4, b4, a4} = 9'(v);
      #1;
      checks++;
      if ({cout4, s4} !== 5'(int'(a4) + int'(b4) + int'(cin4))) begin
        failures++;
        $display("FAIL W=4 %0d+%0d+%0d got %0d", a4, b4, cin4, {cout4, s4});
      end
    end
    checks++;
    if (full_ripple == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_muxf: checks the 2:1 slice multiplexer for all eight input
// combinations. Self-checking; prints one TB_RESULT line.
module tb_muxf;
  logic i0, i1, s, o;
  int checks = 0, failures = 0;

  muxf dut (.i0(i0), .i1(i1), .s(s), .o(o));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, i1, i0} = 3'(v);
      #1;
      checks++;
      if (o !== (s ? i1 : i0)) begin
        failures++;
        $display("FAIL s=%b i1=%b i0=%b got %b", s, i1, i0, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

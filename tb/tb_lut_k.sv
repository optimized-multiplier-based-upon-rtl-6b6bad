// tb_lut_k: checks the K-input look-up table at K = 6 and K = 2 against its
// INIT constant for every address. Self-checking; prints one TB_RESULT line.
module tb_lut_k;
  localparam logic [63:0] PAT6 = 64'hDEAD_BEEF_0123_4567;
  localparam logic [3:0]  PAT2 = 4'b0110;   // XOR of the two inputs

  logic [5:0] i6;
  logic [1:0] i2;
  logic       o6, o2;
  int checks = 0, failures = 0;

  lut_k #(.K(6), .INIT(PAT6)) dut6 (.i(i6), .o(o6));
  lut_k #(.K(2), .INIT(PAT2)) dut2 (.i(i2), .o(o2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      i6 = 6'(a);
      #1;
      checks++;
      if (o6 !== PAT6[a]) begin
        failures++;
        $display("FAIL K=6 addr=%0d got %b expected %b", a, o6, PAT6[a]);
      end
    end
    for (int a = 0; a < 4; a++) begin
      i2 = 2'(a);
      #1;
      checks++;
      if (o2 !== (i2[0] ^ i2[1])) begin
        failures++;
        $display("FAIL K=2 addr=%0d got %b", a, o2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

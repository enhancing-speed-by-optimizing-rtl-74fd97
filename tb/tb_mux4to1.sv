// tb_mux4to1: all 64 input patterns against
// z = S1'S0'I0 + S1'S0 I1 + S1 S0'I2 + S1 S0 I3.
module tb_mux4to1;
  int checks = 0, failures = 0;
  logic s0, s1, i0, i1, i2, i3, z;

  mux4to1 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 64; v++) begin
      {s1, s0, i3, i2, i1, i0} = 6'(v);
      #1;
      exp = (~s1 & ~s0 & i0) | (~s1 & s0 & i1) | (s1 & ~s0 & i2) | (s1 & s0 & i3);
      checks++;
      if (z !== exp) begin
        failures++;
        $display("FAIL s1s0=%b%b i=%b%b%b%b z=%b", s1, s0, i3, i2, i1, i0, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

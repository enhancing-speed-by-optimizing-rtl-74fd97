// tb_comparator4: the eight cases of the published waveform (a < b gives
// c = a), then all 256 operand pairs: word flags, per-bit flags and c, the
// smaller operand.
module tb_comparator4;
  int checks = 0, failures = 0;
  logic [3:0] a, b, c, bit_eq, bit_gt, bit_lt;
  logic       eq, gt, lt;

  comparator4 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      a = 4'(k);
      b = 4'(k + 2);
      #1;
      checks++;
      if (c !== 4'(k)) begin
        failures++;
        $display("FAIL waveform case a=%0d b=%0d c=%0d", a, b, c);
      end
    end
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      checks++;
      if ({eq, gt, lt} !== {a == b, a > b, a < b}) begin
        failures++;
        $display("FAIL a=%0d b=%0d eq/gt/lt=%b%b%b", a, b, eq, gt, lt);
      end
      checks++;
      if (bit_eq !== ~(a ^ b) || bit_gt !== (a & ~b) || bit_lt !== (~a & b)) begin
        failures++;
        $display("FAIL per-bit flags a=%0d b=%0d", a, b);
      end
      checks++;
      if (c !== ((a <= b) ? a : b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tsg_csa: exhaustive check of the 4-bit carry-skip adder, and a count of
// the cases where the skip path carries the carry (all bits propagate).
module tb_tsg_csa;
  int checks = 0, failures = 0, skips = 0;
  logic [3:0] x, y, sum;
  logic       cin, cout;

  tsg_csa dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int v = 0; v < 512; v++) begin
      {cin, x, y} = 9'(v);
      #1;
      exp = int'(x) + int'(y) + int'(cin);
      if ((x ^ y) == 4'hF && cin) skips++;
      checks++;
      if ({cout, sum} !== 5'(exp)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d = %0d expected %0d", x, y, cin, {cout, sum}, exp);
      end
    end
    checks++;
    if (skips == 0) failures++;
    $display("skip cases: %0d", skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

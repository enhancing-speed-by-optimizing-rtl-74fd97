// tb_tsg_rca: exhaustive check of the 4-bit TSG ripple-carry adder:
// {cout, sum} = x + y + cin, garbage g_p = x and g_q = x ^ y.
module tb_tsg_rca;
  int checks = 0, failures = 0;
  logic [3:0] x, y, sum, g_p, g_q;
  logic       cin, cout;

  tsg_rca dut (.*);

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
      checks++;
      if ({cout, sum} !== 5'(exp)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d = %0d expected %0d", x, y, cin, {cout, sum}, exp);
      end
      checks++;
      if (g_p !== x || g_q !== (x ^ y)) begin
        failures++;
        $display("FAIL garbage x=%h y=%h g_p=%h g_q=%h", x, y, g_p, g_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

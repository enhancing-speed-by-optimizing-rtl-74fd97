// tb_bw_mult5: all 1024 pairs of 5-bit two's-complement operands against
// signed integer multiplication; counts products of each sign.
module tb_bw_mult5;
  int checks = 0, failures = 0, neg = 0, pos = 0;
  logic [4:0] x, y;
  logic [9:0] z;

  bw_mult5 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int v = 0; v < 1024; v++) begin
      {x, y} = 10'(v);
      #1;
      exp = int'($signed(x)) * int'($signed(y));
      if (exp < 0) neg++;
      if (exp > 0) pos++;
      checks++;
      if ($signed(z) != exp) begin
        failures++;
        $display("FAIL %0d*%0d = %0d", $signed(x), $signed(y), $signed(z));
      end
    end
    checks++;
    if (neg == 0 || pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

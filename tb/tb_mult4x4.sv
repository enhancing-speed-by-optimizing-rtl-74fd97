// tb_mult4x4: the worked example 1010 x 0010 = 00010100, then all 256
// operand pairs against integer multiplication.
module tb_mult4x4;
  int checks = 0, failures = 0;
  logic [3:0] x1, x2;
  logic [7:0] y1;

  mult4x4 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x1 = 4'b1010;
    x2 = 4'b0010;
    #1;
    checks++;
    if (y1 !== 8'b00010100) begin
      failures++;
      $display("FAIL example: y1=%b", y1);
    end
    for (int v = 0; v < 256; v++) begin
      {x1, x2} = 8'(v);
      #1;
      checks++;
      if (y1 !== 8'(int'(x1) * int'(x2))) begin
        failures++;
        $display("FAIL %0d*%0d = %0d", x1, x2, y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

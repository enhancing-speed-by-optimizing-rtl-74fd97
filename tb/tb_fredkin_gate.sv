// tb_fredkin_gate: exhaustive check of the controlled-swap gate: P copies A,
// Q/R are B/C swapped when A = 1, and the mapping is one-to-one.
module tb_fredkin_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;

  fredkin_gate dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen;
    logic [2:0] exp;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      exp = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== exp) begin
        failures++;
        $display("FAIL abc=%3b pqr=%3b expected %3b", 3'(v), {p, q, r}, exp);
      end
      checks++;
      if (seen[{p, q, r}]) failures++;
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

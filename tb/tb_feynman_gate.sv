// tb_feynman_gate: exhaustive check of the controlled-NOT gate.
module tb_feynman_gate;
  int checks = 0, failures = 0;
  logic a, b, p, q;

  feynman_gate dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Expected PQ for AB = 00, 01, 10, 11.
    logic [1:0] exp [4];
    exp = '{2'b00, 2'b01, 2'b11, 2'b10};
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({p, q} !== exp[v]) begin
        failures++;
        $display("FAIL ab=%2b pq=%2b expected %2b", 2'(v), {p, q}, exp[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

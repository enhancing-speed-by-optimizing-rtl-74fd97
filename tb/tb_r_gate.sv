// tb_r_gate: exhaustive check of the R gate against its truth table
// (P = A^B, Q = A, R = AB ^ C') and of reversibility.
module tb_r_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;

  // PQR for ABC = 0..7.
  localparam logic [2:0] TT [8] = '{
    3'b001, 3'b000, 3'b101, 3'b100, 3'b111, 3'b110, 3'b010, 3'b011
  };

  r_gate dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== TT[v]) begin
        failures++;
        $display("FAIL abc=%3b pqr=%3b expected %3b", 3'(v), {p, q, r}, TT[v]);
      end
      checks++;
      if (seen[{p, q, r}]) failures++;
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

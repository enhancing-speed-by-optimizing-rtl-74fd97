// tb_tsg_gate: checks the TSG gate against its 16-row truth table, entered
// as a constant here, and checks that no two input patterns share an output
// pattern (reversibility).
module tb_tsg_gate;
  int checks = 0, failures = 0;
  logic a, b, c, d, p, q, r, s;

  // PQRS for input ABCD = 0..15.
  localparam logic [3:0] TT [16] = '{
    4'b0000, 4'b0010, 4'b0111, 4'b0100, 4'b0110, 4'b0101, 4'b0001, 4'b0011,
    4'b1110, 4'b1101, 4'b1111, 4'b1100, 4'b1001, 4'b1011, 4'b1000, 4'b1010
  };

  tsg_gate dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seen;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks++;
      if ({p, q, r, s} !== TT[v]) begin
        failures++;
        $display("FAIL abcd=%4b pqrs=%4b expected %4b", 4'(v), {p, q, r, s}, TT[v]);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %4b repeated", {p, q, r, s});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cmp_cell: the four input pairs of the one-bit comparator cell.
module tb_cmp_cell;
  int checks = 0, failures = 0;
  logic a, b, eq, gt, lt;

  cmp_cell dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // {eq, gt, lt} for ab = 00, 01, 10, 11
    logic [2:0] exp [4];
    exp = '{3'b100, 3'b001, 3'b010, 3'b100};
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({eq, gt, lt} !== exp[v]) begin
        failures++;
        $display("FAIL ab=%b%b eq/gt/lt=%b expected %b", a, b, {eq, gt, lt}, exp[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_addsub4: exhaustive check of the adder/subtractor in both modes, for the
// default ripple chain and for the carry-skip variant.
//   a = 0: {cout, s0} = x + y + cin
//   a = 1: s0 = (x - y - cin) mod 16, cout = 1 when x >= y + cin
module tb_addsub4;
  int checks = 0, failures = 0;
  logic [3:0] x, y, s_rca, s_csa;
  logic       a, cin, c_rca, c_csa;

  addsub4 dut (
    .x(x), .y(y), .a(a), .cin(cin), .s0(s_rca), .cout(c_rca)
  );
  addsub4 #(.USE_CARRY_SKIP(1'b1)) dut_csa (
    .x(x), .y(y), .a(a), .cin(cin), .s0(s_csa), .cout(c_csa)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int      diff;
    logic [4:0] exp;
    for (int v = 0; v < 1024; v++) begin
      {a, cin, x, y} = 10'(v);
      #1;
      if (!a) begin
        exp = 5'(int'(x) + int'(y) + int'(cin));
      end else begin
        diff = int'(x) - int'(y) - int'(cin);
        exp  = {diff >= 0, 4'(diff)};
      end
      checks++;
      if ({c_rca, s_rca} !== exp) begin
        failures++;
        $display("FAIL rca a=%0d x=%0d y=%0d cin=%0d got %b expected %b",
                 a, x, y, cin, {c_rca, s_rca}, exp);
      end
      checks++;
      if ({c_csa, s_csa} !== exp) begin
        failures++;
        $display("FAIL csa a=%0d x=%0d y=%0d cin=%0d got %b expected %b",
                 a, x, y, cin, {c_csa, s_csa}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ralu4: end-to-end test of the 4-bit reversible ALU at its default size.
//
// Walks every operation select {s2, s1}, both values of a1 and cin1 and all
// 256 operand pairs, and compares q3, q3_hi, cout1 and the comparator flags
// with a reference computed here from integer arithmetic. At the same time it
// walks all 1024 operand pairs of the signed 5x5 multiplier. It counts how
// often each mechanism happened (addition, subtraction, carry out, borrow,
// each multiplexer input, each comparator outcome, a product wider than four
// bits, a negative signed product) and counts a failure for one that never did.
module tb_ralu4;
  import ralu_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0] q1, q2, q3, q3_hi;
  logic       a1, cin1, s1, s2, cout1, cmp_eq, cmp_gt, cmp_lt;
  logic [4:0] sx, sy;
  logic [9:0] sz;

  ralu4 dut (.*);

  typedef enum int {
    EV_ADD, EV_SUB, EV_CARRY, EV_BORROW, EV_MUX_Q1, EV_MUX_Q2,
    EV_CMP_EQ, EV_CMP_GT, EV_CMP_LT, EV_MUL_WIDE, EV_SMUL_NEG, EV_COUNT
  } event_e;
  int seen [EV_COUNT];

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: op=%0d a1=%0d cin1=%0d q1=%0d q2=%0d q3=%0d q3_hi=%0d cout1=%0d",
               what, {s2, s1}, a1, cin1, q1, q2, q3, q3_hi, cout1);
    end
  endfunction

  initial begin
    int      sum, prod, sprod, n;
    logic [3:0] exp_q3;
    alu_op_e op;

    foreach (seen[k]) seen[k] = 0;
    n = 0;
    for (int o = 0; o < 4; o++) begin
      for (int v = 0; v < 1024; v++) begin
        op = alu_op_e'(o);
        {s2, s1} = op;
        {a1, cin1, q1, q2} = 10'(v);
        {sx, sy} = 10'(n);
        n = (n + 1) % 1024;
        #1;
        sum  = a1 ? int'(q1) - int'(q2) - int'(cin1) : int'(q1) + int'(q2) + int'(cin1);
        prod = int'(q1) * int'(q2);
        case (op)
          OP_ADDSUB: exp_q3 = 4'(sum);
          OP_MUX:    exp_q3 = a1 ? q2 : q1;
          OP_CMP:    exp_q3 = (q1 <= q2) ? q1 : q2;
          default:   exp_q3 = 4'(prod);
        endcase
        check(q3 === exp_q3, "q3");
        check(q3_hi === 4'(prod >> 4), "q3_hi");
        check(cout1 === (a1 ? (sum >= 0) : (sum > 15)), "cout1");
        check({cmp_eq, cmp_gt, cmp_lt} === {q1 == q2, q1 > q2, q1 < q2}, "flags");
        sprod = int'($signed(sx)) * int'($signed(sy));
        check($signed(sz) == sprod, "signed product");

        if (op == OP_ADDSUB) begin
          if (!a1) seen[EV_ADD]++; else seen[EV_SUB]++;
          if (!a1 && cout1) seen[EV_CARRY]++;
          if (a1 && !cout1) seen[EV_BORROW]++;
        end
        if (op == OP_MUX) begin
          if (!a1) seen[EV_MUX_Q1]++; else seen[EV_MUX_Q2]++;
        end
        if (op == OP_CMP) begin
          if (cmp_eq) seen[EV_CMP_EQ]++;
          if (cmp_gt) seen[EV_CMP_GT]++;
          if (cmp_lt) seen[EV_CMP_LT]++;
        end
        if (op == OP_MUL && q3_hi != 0) seen[EV_MUL_WIDE]++;
        if (sz[9]) seen[EV_SMUL_NEG]++;
      end
    end

    for (int k = 0; k < EV_COUNT; k++) begin
      $display("event %-12s happened %0d times", event_e'(k), seen[k]);
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL event %s never happened", event_e'(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

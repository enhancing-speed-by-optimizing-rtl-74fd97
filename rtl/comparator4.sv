// comparator4: 4-bit reversible magnitude comparator.
//
// One cmp_cell per bit gives per-bit flags bit_eq, bit_gt, bit_lt. They are
// combined serially from the most significant bit down: the first bit that
// differs decides, so
//   eq = all bits equal
//   gt = bit_gt[k] for the highest k with bit_eq[k] = 0 (a > b)
//   lt = bit_lt[k] for that k                               (a < b)
// The word output c carries the smaller operand (a when a <= b, b otherwise),
// picked by a 2:1 multiplexer under gt. The per-bit cell and the a, b, c port
// names follow the published comparator; every case its waveform shows
// (a < b) gives c = a. What c holds when a > b is not shown, and returning the
// smaller operand is this design's choice, as is the MSB-first combination of
// the cells. Purely combinational.
module comparator4 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] c,
  output logic             eq,
  output logic             gt,
  output logic             lt,
  output logic [WIDTH-1:0] bit_eq,
  output logic [WIDTH-1:0] bit_gt,
  output logic [WIDTH-1:0] bit_lt
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    cmp_cell u_cell (
      .a(a[i]), .b(b[i]), .eq(bit_eq[i]), .gt(bit_gt[i]), .lt(bit_lt[i])
    );
  end

  // Serial combination, MSB first: stage k has seen bits WIDTH-1 .. k.
  always_comb begin
    logic e, g, l;
    e = 1'b1;
    g = 1'b0;
    l = 1'b0;
    for (int k = WIDTH - 1; k >= 0; k--) begin
      g = g | (e & bit_gt[k]);
      l = l | (e & bit_lt[k]);
      e = e & bit_eq[k];
    end
    eq = e;
    gt = g;
    lt = l;
  end

  mux2_word #(.WIDTH(WIDTH)) u_min (.w1(a), .w2(b), .ss1(gt), .w3(c));
endmodule

// mux2_word: 4-bit 2:1 reversible multiplexer.
//
// w3 = w1 when ss1 = 0, w2 when ss1 = 1. The port names and the select
// sense follow the published block and its waveform. Each bit is one
// controlled-swap (Fredkin) gate with the select on A; its P output passes the
// select to the next bit's gate, so the select line has no fan-out, as
// reversible logic requires. The published unit is described as built from R
// gates, but the R gate's equations give no 2:1 selection in one gate, so the
// controlled-swap gate is this design's choice. Purely combinational.
module mux2_word #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] w1,
  input  logic [WIDTH-1:0] w2,
  input  logic             ss1,
  output logic [WIDTH-1:0] w3
);
  logic [WIDTH:0]   sel;     // select, handed from gate to gate
  logic [WIDTH-1:0] unused_r;

  assign sel[0] = ss1;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    fredkin_gate u_sw (
      .a(sel[i]), .b(w1[i]), .c(w2[i]),
      .p(sel[i+1]), .q(w3[i]), .r(unused_r[i])
    );
  end
endmodule

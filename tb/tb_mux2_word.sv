// tb_mux2_word: the seven select cases shown in the published waveform
// (w1, w2, ss1 -> w3), then all operand pairs with both select values.
module tb_mux2_word;
  int checks = 0, failures = 0;
  logic [3:0] w1, w2, w3;
  logic       ss1;

  mux2_word dut (.*);

  // {w1, w2, ss1, expected w3}
  localparam logic [12:0] WAVE [7] = '{
    {4'd0, 4'd2, 1'b1, 4'd2}, {4'd1, 4'd3, 1'b1, 4'd3}, {4'd2, 4'd4, 1'b0, 4'd2},
    {4'd3, 4'd5, 1'b0, 4'd3}, {4'd4, 4'd6, 1'b1, 4'd6}, {4'd5, 4'd7, 1'b1, 4'd7},
    {4'd6, 4'd8, 1'b0, 4'd6}
  };

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 7; k++) begin
      {w1, w2, ss1} = WAVE[k][12:4];
      #1;
      checks++;
      if (w3 !== WAVE[k][3:0]) begin
        failures++;
        $display("FAIL waveform case %0d: w3=%0d expected %0d", k, w3, WAVE[k][3:0]);
      end
    end
    for (int v = 0; v < 512; v++) begin
      {ss1, w1, w2} = 9'(v);
      #1;
      checks++;
      if (w3 !== (ss1 ? w2 : w1)) begin
        failures++;
        $display("FAIL ss1=%0d w1=%0d w2=%0d w3=%0d", ss1, w1, w2, w3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// decoder_3to8_tb: exhaustive check that input k raises exactly output k.
module decoder_3to8_tb;

  int checks = 0, failures = 0;
  logic [2:0] sel;
  logic [7:0] y;

  decoder_3to8 dut (.sel_i(sel), .onehot_o(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      sel = 3'(k);
      #1;
      checks++;
      if (y != (8'd1 << k)) begin
        failures++; $display("FAIL sel %0d: %b", k, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

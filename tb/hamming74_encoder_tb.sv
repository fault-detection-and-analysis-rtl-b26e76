// hamming74_encoder_tb: all 16 data words through the (7,4) encoder, compared
// with the reference built from the code's definition, plus the worked
// example 0101 -> 0101101 and a check that every pair of codewords differs in
// at least three bits.
module hamming74_encoder_tb;
  import secded_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] d;
  logic [6:0] c;
  logic [6:0] table_c [16];

  hamming74_encoder dut (.data_i(d), .code_o(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      d = 4'(v);
      #1;
      table_c[v] = c;
      checks++;
      if (c != ref_ham_encode(d)) begin
        failures++; $display("FAIL data %b: code %b, expected %b", d, c, ref_ham_encode(d));
      end
    end
    checks++;
    if (table_c[5] != 7'b0101101) begin
      failures++; $display("FAIL worked example 0101 -> %b", table_c[5]);
    end
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++) begin
        checks++;
        if ($countones(table_c[a] ^ table_c[b]) < 3) begin
          failures++; $display("FAIL distance %0d-%0d below 3", a, b);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

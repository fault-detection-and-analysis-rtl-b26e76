// secded_encoder_tb: all 16 data words through the (8,4) encoder, against the
// reference; each word must have even parity and every pair of codewords
// must differ in at least four bits (the distance that allows single
// correction and double detection).
module secded_encoder_tb;
  import secded_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] d;
  logic [7:0] c;
  logic [7:0] table_c [16];

  secded_encoder dut (.data_i(d), .code_o(c));

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
      checks += 2;
      if (c != ref_encode(d)) begin
        failures++; $display("FAIL data %b: code %b, expected %b", d, c, ref_encode(d));
      end
      if ($countones(c) % 2 != 0) begin
        failures++; $display("FAIL data %b: code %b has odd parity", d, c);
      end
    end
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++) begin
        checks++;
        if ($countones(table_c[a] ^ table_c[b]) < 4) begin
          failures++; $display("FAIL distance %0d-%0d below 4", a, b);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

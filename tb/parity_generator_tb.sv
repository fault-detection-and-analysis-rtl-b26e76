// parity_generator_tb: exhaustive check of the even-parity generator at the
// 7-bit width (overall parity bit d7) and the 8-bit width (receive-side
// parity check), against a population count.
module parity_generator_tb;

  int checks = 0, failures = 0;
  logic [6:0] d7;
  logic [7:0] d8;
  logic       p7, p8;

  parity_generator #(.WIDTH(7)) dut7 (.data_i(d7), .parity_o(p7));
  parity_generator #(.WIDTH(8)) dut8 (.data_i(d8), .parity_o(p8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      d8 = 8'(v);
      d7 = 7'(v);
      #1;
      checks += 2;
      if (p8 != ($countones(d8) % 2 == 1)) begin
        failures++; $display("FAIL 8-bit parity of %b: got %b", d8, p8);
      end
      if (p7 != ($countones(d7) % 2 == 1)) begin
        failures++; $display("FAIL 7-bit parity of %b: got %b", d7, p7);
      end
      // the word plus its parity bit must hold an even number of ones
      checks++;
      if ($countones({p7, d7}) % 2 != 0) begin
        failures++; $display("FAIL word %b with parity %b is odd", d7, p7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

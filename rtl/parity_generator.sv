// parity_generator: even-parity bit over a word.
//
// The output is the XOR of all input bits, so that the input together with
// the output always holds an even number of ones. The same block serves as
// the parity producer on the write side of the SECDED code (the overall bit
// d7 = d0 ^ d1 ^ ... ^ d6) and, fed with all eight received bits, as the
// parity checker on the read side (result 1 = odd number of flipped bits).
// Purely combinational, no clock.
module parity_generator #(
  parameter int unsigned WIDTH = 7
) (
  input  logic [WIDTH-1:0] data_i,
  output logic             parity_o
);

  always_comb begin
    parity_o = 1'b0;
    for (int unsigned i = 0; i < WIDTH; i++) parity_o ^= data_i[i];
  end

endmodule

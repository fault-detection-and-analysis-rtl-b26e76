// secded_encoder: (8,4) single-error-correcting, double-error-detecting encoder.
//
// The (7,4) Hamming codeword is extended by one bit, d7, the even parity of
// all seven Hamming bits, so that the full 8-bit word has even parity. The
// decoder can then tell one flipped bit (odd parity) from two (even parity).
// Output layout: code_o[6:0] is the Hamming codeword (position k in bit
// k-1), code_o[7] is d7; the position of d7 is this design's choice.
// Purely combinational.
module secded_encoder
  import secded_pkg::*;
(
  input  data_t data_i,
  output code_t code_o
);

  ham_t ham;
  logic d7;

  hamming74_encoder u_ham (.data_i(data_i), .code_o(ham));
  parity_generator #(.WIDTH(HAM_W)) u_par (.data_i(ham), .parity_o(d7));

  assign code_o = {d7, ham};

endmodule

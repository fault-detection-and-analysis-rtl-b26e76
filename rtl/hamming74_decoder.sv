// hamming74_decoder: (7,4) Hamming syndrome decoder with single-bit correction.
//
// The three check bits are recomputed over the received word, each including
// the parity bit of its group (indices are codeword positions):
//   C1 = b1 ^ b3 ^ b5 ^ b7,  C2 = b2 ^ b3 ^ b6 ^ b7,  C3 = b4 ^ b5 ^ b6 ^ b7.
// The syndrome {C3,C2,C1} is the position of a single flipped bit, or 0 when
// no group fails. A 3-to-8 decoder turns it into a one-hot word; its output 0
// is the error-free line and outputs 1..7 are XORed with codeword bits 1..7,
// inverting the faulty bit. The check equations and the decoder-and-XOR
// structure follow the described Hamming decoder; C1 is written by analogy
// with C2 and C3. With two flipped bits the syndrome points at a wrong
// position; telling that case apart is left to the SECDED layer.
// Purely combinational.
module hamming74_decoder
  import secded_pkg::*;
(
  input  ham_t  code_i,      // code_i[k-1] = position k
  output syn_t  syndrome_o,  // {C3, C2, C1}
  output ham_t  code_o,      // corrected codeword
  output data_t data_o,      // corrected D4..D1
  output logic  no_error_o   // decoder line 0: all check groups pass
);

  logic       c1, c2, c3;
  logic [7:0] line;

  parity_generator #(.WIDTH(4)) u_c1 (.data_i({code_i[6], code_i[4], code_i[2], code_i[0]}), .parity_o(c1));
  parity_generator #(.WIDTH(4)) u_c2 (.data_i({code_i[6], code_i[5], code_i[2], code_i[1]}), .parity_o(c2));
  parity_generator #(.WIDTH(4)) u_c3 (.data_i({code_i[6], code_i[5], code_i[4], code_i[3]}), .parity_o(c3));

  assign syndrome_o = {c3, c2, c1};

  decoder_3to8 u_dec (.sel_i(syndrome_o), .onehot_o(line));

  // line[0] is the error-free output and takes part in no correction.
  assign no_error_o = line[0];
  assign code_o = code_i ^ line[7:1];
  assign data_o = {code_o[6], code_o[5], code_o[4], code_o[2]};

endmodule

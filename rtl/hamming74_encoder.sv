// hamming74_encoder: (7,4) Hamming encoder.
//
// Three parity bits are added to the four data bits so that each of the
// three check groups of the code has even parity:
//   P1 covers positions 1,3,5,7  -> P1 = D1 ^ D2 ^ D4
//   P2 covers positions 2,3,6,7  -> P2 = D1 ^ D3 ^ D4
//   P4 covers positions 4,5,6,7  -> P4 = D2 ^ D3 ^ D4
// and the codeword is laid out P1 P2 D1 P4 D2 D3 D4 over positions 1..7
// (position k in bit k-1), which turns data 0101 into 0101101 when printed
// with position 7 on the left. Each parity bit is formed by a
// parity_generator over its three data bits. Purely combinational.
module hamming74_encoder
  import secded_pkg::*;
(
  input  data_t data_i,   // data_i[0] = D1 ... data_i[3] = D4
  output ham_t  code_o    // code_o[k-1] = Hamming position k
);

  logic p1, p2, p4;

  parity_generator #(.WIDTH(3)) u_p1 (.data_i({data_i[3], data_i[1], data_i[0]}), .parity_o(p1));
  parity_generator #(.WIDTH(3)) u_p2 (.data_i({data_i[3], data_i[2], data_i[0]}), .parity_o(p2));
  parity_generator #(.WIDTH(3)) u_p4 (.data_i({data_i[3], data_i[2], data_i[1]}), .parity_o(p4));

  assign code_o = {data_i[3], data_i[2], data_i[1], p4, data_i[0], p2, p1};

endmodule

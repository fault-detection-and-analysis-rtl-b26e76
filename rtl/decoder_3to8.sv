// decoder_3to8: 3-to-8 line decoder used by the Hamming decoder.
//
// Exactly one of the eight outputs is high: output k for input value k.
// Fed with the syndrome, output 0 means the word is error-free and output k
// (k = 1..7) marks Hamming position k as the bit to invert. Combinational.
module decoder_3to8 (
  input  logic [2:0] sel_i,
  output logic [7:0] onehot_o
);

  always_comb begin
    onehot_o = '0;
    onehot_o[sel_i] = 1'b1;
  end

endmodule

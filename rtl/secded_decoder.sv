// secded_decoder: (8,4) SECDED decoder.
//
// Two checks are made on the received word: the Hamming syndrome sh over
// bits 6:0, and the overall parity sp over all eight bits. Their combination
// selects the action, as in the code's operation table:
//   sh = 0, sp = 0  no error; data passed on.
//   sh = 0, sp = 1  the overall parity bit d7 flipped; it is corrected
//                   (parity_err_o) and the data is good.
//   sh /= 0, sp = 1 one Hamming bit flipped; it is inverted at the position
//                   the syndrome gives (single_err_o).
//   sh /= 0, sp = 0 two bits flipped: detected (double_err_o) but not
//                   corrected; data and codeword are passed on as received.
// Three flipped bits look like a single error and are miscorrected, which is
// the limit of any SECDED code. code_o is the corrected word, ready to be
// written back to memory; kind_o gives the outcome as one value. Leaving a
// double-error word uncorrected, rather than applying the syndrome, is this
// design's choice and reproduces the described example (0101 with two
// flipped bits read as 1001). Purely combinational.
module secded_decoder
  import secded_pkg::*;
(
  input  code_t     code_i,
  output data_t     data_o,
  output code_t     code_o,
  output syn_t      syndrome_o,
  output logic      single_err_o,
  output logic      parity_err_o,
  output logic      double_err_o,
  output err_kind_t kind_o
);

  ham_t  ham_fixed;
  data_t data_fixed;
  logic  sp;
  logic  sh_zero;

  hamming74_decoder u_ham (
    .code_i    (code_i[HAM_W-1:0]),
    .syndrome_o(syndrome_o),
    .code_o    (ham_fixed),
    .data_o    (data_fixed),
    .no_error_o(sh_zero)
  );

  parity_generator #(.WIDTH(CODE_W)) u_chk (.data_i(code_i), .parity_o(sp));

  always_comb begin
    unique case ({~sh_zero, sp})
      2'b00:   kind_o = ERR_NONE;
      2'b01:   kind_o = ERR_PARITY;
      2'b10:   kind_o = ERR_DOUBLE;
      default: kind_o = ERR_SINGLE;
    endcase
  end

  assign single_err_o = (kind_o == ERR_SINGLE);
  assign parity_err_o = (kind_o == ERR_PARITY);
  assign double_err_o = (kind_o == ERR_DOUBLE);

  always_comb begin
    unique case (kind_o)
      ERR_SINGLE: begin
        code_o = {code_i[7], ham_fixed};
        data_o = data_fixed;
      end
      ERR_PARITY: begin
        code_o = {~code_i[7], code_i[HAM_W-1:0]};
        data_o = {code_i[6], code_i[5], code_i[4], code_i[2]};
      end
      default: begin  // ERR_NONE, ERR_DOUBLE
        code_o = code_i;
        data_o = {code_i[6], code_i[5], code_i[4], code_i[2]};
      end
    endcase
  end

endmodule

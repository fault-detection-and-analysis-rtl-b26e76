// secded_codec: SECDED encoder, noise channel and decoder in series.
//
// The 4-bit input is encoded into an 8-bit SECDED word, a noise mask is XORed
// onto it (each 1 in noise_i flips that codeword bit, standing for a soft
// error or channel noise) and the result is decoded. The outputs show the
// clean, the noisy and the corrected codeword, the decoded data and which kind of error the
// decoder saw, so that the three cases of the code can be demonstrated on
// switches and LEDs: no noise (data comes back), one flipped bit (corrected),
// two flipped bits (flagged, data left wrong). An 8-bit noise mask over the
// whole word is this design's choice. Purely combinational.
module secded_codec
  import secded_pkg::*;
(
  input  data_t     data_i,
  input  code_t     noise_i,
  output code_t     code_o,
  output code_t     noisy_code_o,
  output code_t     fixed_code_o,
  output data_t     data_o,
  output syn_t      syndrome_o,
  output logic      single_err_o,
  output logic      parity_err_o,
  output logic      double_err_o,
  output err_kind_t kind_o
);

  secded_encoder u_enc (.data_i(data_i), .code_o(code_o));

  assign noisy_code_o = code_o ^ noise_i;

  secded_decoder u_dec (
    .code_i      (noisy_code_o),
    .data_o      (data_o),
    .code_o      (fixed_code_o),
    .syndrome_o  (syndrome_o),
    .single_err_o(single_err_o),
    .parity_err_o(parity_err_o),
    .double_err_o(double_err_o),
    .kind_o      (kind_o)
  );

endmodule

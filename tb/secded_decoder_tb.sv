// secded_decoder_tb: all 256 possible received words through the (8,4)
// SECDED decoder, compared with a nearest-codeword reference: decoded data,
// corrected word, the three error flags and the error kind. Then the worked
// example: 0101 with two flipped data bits reads back as 1001, flagged.
module secded_decoder_tb;
  import secded_pkg::*;
  import secded_ref_pkg::*;

  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};
  code_t     cin, cout;
  data_t     dout;
  syn_t      syn;
  logic      s_err, p_err, d_err;
  err_kind_t kind;

  secded_decoder dut (.code_i(cin), .data_o(dout), .code_o(cout), .syndrome_o(syn),
                      .single_err_o(s_err), .parity_err_o(p_err), .double_err_o(d_err),
                      .kind_o(kind));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [3:0] ed;
      logic [7:0] ef;
      ref_kind_t  ek;
      cin = 8'(v);
      #1;
      ref_decode(cin, ed, ef, ek);
      seen[ek]++;
      checks += 6;
      if (dout != ed) begin
        failures++; $display("FAIL %b: data %b expected %b", cin, dout, ed);
      end
      if (cout != ef) begin
        failures++; $display("FAIL %b: fixed %b expected %b", cin, cout, ef);
      end
      if (s_err != (ek == REF_SINGLE)) begin
        failures++; $display("FAIL %b: single flag %b", cin, s_err);
      end
      if (p_err != (ek == REF_PARITY)) begin
        failures++; $display("FAIL %b: parity flag %b", cin, p_err);
      end
      if (d_err != (ek == REF_DOUBLE)) begin
        failures++; $display("FAIL %b: double flag %b", cin, d_err);
      end
      if ((ek == REF_NONE   && kind != ERR_NONE)   || (ek == REF_PARITY && kind != ERR_PARITY) ||
          (ek == REF_SINGLE && kind != ERR_SINGLE) || (ek == REF_DOUBLE && kind != ERR_DOUBLE)) begin
        failures++; $display("FAIL %b: kind %0d", cin, kind);
      end
    end
    // 16 clean, 16 parity-bit errors, 16*7 single errors, the rest double
    checks++;
    if (seen[REF_NONE] != 16 || seen[REF_PARITY] != 16 || seen[REF_SINGLE] != 112 ||
        seen[REF_DOUBLE] != 112) begin
      failures++; $display("FAIL class counts %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3]);
    end
    // worked example: 0101 -> 0101101 (d7 = 0), bits at positions 6 and 7 flipped
    cin = {1'b0, 7'b0101101} ^ 8'b0110_0000;
    #1;
    checks++;
    if (dout != 4'b1001 || !d_err) begin
      failures++; $display("FAIL worked double-error example: %b flag %b", dout, d_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

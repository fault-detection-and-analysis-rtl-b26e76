// hamming74_decoder_tb: every codeword, clean and with each of its seven
// bits flipped, through the (7,4) decoder. The syndrome must name the
// flipped position (0 when clean), and the corrected codeword and data must
// equal the clean ones.
module hamming74_decoder_tb;
  import secded_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [6:0] cin, cout;
  logic [2:0] syn;
  logic [3:0] dout;
  logic       no_err;

  hamming74_decoder dut (.code_i(cin), .syndrome_o(syn), .code_o(cout), .data_o(dout),
                         .no_error_o(no_err));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int pos = 0; pos <= 7; pos++) begin
        logic [6:0] clean;
        clean = ref_ham_encode(4'(v));
        cin = (pos == 0) ? clean : clean ^ (7'd1 << (pos - 1));
        #1;
        checks += 4;
        if (syn != 3'(pos)) begin
          failures++; $display("FAIL data %0d pos %0d: syndrome %0d", v, pos, syn);
        end
        if (cout != clean) begin
          failures++; $display("FAIL data %0d pos %0d: code %b", v, pos, cout);
        end
        if (dout != 4'(v)) begin
          failures++; $display("FAIL data %0d pos %0d: data %b", v, pos, dout);
        end
        if (no_err != (pos == 0)) begin
          failures++; $display("FAIL data %0d pos %0d: no_error %b", v, pos, no_err);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

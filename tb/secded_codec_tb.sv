// secded_codec_tb: the demonstration sequence of the code, run through the
// encoder / noise / decoder channel.
//   TEST1  all 16 data words without noise: data comes back, no flag.
//   TEST2  all 16 words with one random Hamming bit flipped: corrected,
//          single-error flag; and one word with only d7 flipped: parity flag.
//   TEST3  all 16 words with two random bits flipped: double-error flag,
//          data left as received.
//   TEST4  d7 plus two more bits flipped (three errors): seen as a single
//          error and miscorrected, which SECDED cannot avoid.
//   TEST5  one clean word again.
// Then the three rows of the summary example for data 0101. Expected values
// come from the reference package.
module secded_codec_tb;
  import secded_pkg::*;
  import secded_ref_pkg::*;

  int checks = 0, failures = 0;
  data_t d, dout;
  code_t noise, c, nc, fc;
  syn_t  syn;
  logic  s_err, p_err, d_err;

  secded_codec dut (.data_i(d), .noise_i(noise), .code_o(c), .noisy_code_o(nc),
                    .fixed_code_o(fc), .data_o(dout), .syndrome_o(syn),
                    .single_err_o(s_err), .parity_err_o(p_err), .double_err_o(d_err),
                    .kind_o());

  task automatic run(input data_t data, input code_t n, input ref_kind_t want,
                     input logic want_data_ok);
    logic [3:0] ed;
    logic [7:0] ef;
    ref_kind_t  ek;
    d = data;
    noise = n;
    #1;
    ref_decode(ref_encode(data) ^ n, ed, ef, ek);
    checks += 6;
    if (c != ref_encode(data))  begin failures++; $display("FAIL code %b for %b", c, data); end
    if (nc != (c ^ n))          begin failures++; $display("FAIL noisy code %b", nc); end
    if (ek != want)             begin failures++; $display("FAIL test vector class %0d", ek); end
    if (dout != ed)             begin failures++; $display("FAIL data %b expected %b", dout, ed); end
    if ({s_err, p_err, d_err} != {ek == REF_SINGLE, ek == REF_PARITY, ek == REF_DOUBLE}) begin
      failures++; $display("FAIL flags %b%b%b for %b noise %b", s_err, p_err, d_err, data, n);
    end
    if ((dout == data) != want_data_ok) begin
      failures++; $display("FAIL data %b for input %b noise %b", dout, data, n);
    end
  endtask

  function automatic code_t two_bits();
    int a, b;
    a = $urandom_range(0, 7);
    do b = $urandom_range(0, 7); while (b == a);
    return (8'd1 << a) | (8'd1 << b);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) run(4'(v), 8'h00, REF_NONE, 1'b1);
    for (int v = 0; v < 16; v++) run(4'(v), 8'd1 << $urandom_range(0, 6), REF_SINGLE, 1'b1);
    run(4'b0000, 8'h80, REF_PARITY, 1'b1);
    for (int v = 0; v < 16; v++) begin
      code_t n;
      n = two_bits();
      // data is wrong after a double error only if a data bit was hit
      run(4'(v), n, REF_DOUBLE, (n & 8'b0111_0100) == 0);
    end
    for (int v = 0; v < 16; v++) begin
      code_t n;
      n = 8'h80 | (8'd1 << 4) | (8'd1 << 6);  // d7, D2 and D4: miscorrected
      run(4'(v), n, REF_SINGLE, 1'b0);
    end
    run(4'b1010, 8'h00, REF_NONE, 1'b1);
    // summary example for 0101: no noise / one flipped bit / two flipped bits
    run(4'b0101, 8'h00, REF_NONE, 1'b1);
    run(4'b0101, 8'b0000_0010, REF_SINGLE, 1'b1);
    run(4'b0101, 8'b0110_0000, REF_DOUBLE, 1'b0);
    checks++;
    if (dout != 4'b1001) begin failures++; $display("FAIL summary example gave %b", dout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// secded_ref_pkg: reference model of the (8,4) SECDED code for the
// testbenches, written independently of the RTL.
//
// The encoder is built from the definition of the Hamming code rather than
// from fixed equations: data bits go to positions 3, 5, 6, 7 and the parity
// bit at position 2^j is the XOR of every other position whose index has
// bit j set. The decoder is a minimum-distance search over all 16
// codewords: distance 0 is clean, distance 1 is a single error (in d7 if the
// differing bit is bit 7), and distance 2 is a double error, for which the
// data bits are taken from the received word unchanged.
package secded_ref_pkg;

  typedef enum int {REF_NONE, REF_PARITY, REF_SINGLE, REF_DOUBLE} ref_kind_t;

  function automatic logic [6:0] ref_ham_encode(input logic [3:0] d);
    logic [7:1] pos;
    int unsigned dpos[4] = '{3, 5, 6, 7};
    pos = '0;
    for (int i = 0; i < 4; i++) pos[dpos[i]] = d[i];
    for (int j = 0; j < 3; j++) begin
      logic p;
      p = 1'b0;
      for (int k = 1; k <= 7; k++)
        if (((k >> j) & 1) == 1 && k != (1 << j)) p ^= pos[k];
      pos[1 << j] = p;
    end
    return pos[7:1];
  endfunction

  function automatic logic [7:0] ref_encode(input logic [3:0] d);
    logic [6:0] h;
    h = ref_ham_encode(d);
    return {^h, h};
  endfunction

  function automatic logic [3:0] raw_data(input logic [7:0] c);
    return {c[6], c[5], c[4], c[2]};
  endfunction

  // Decode by nearest codeword.
  function automatic void ref_decode(input logic [7:0] c, output logic [3:0] d,
                                     output logic [7:0] fixed, output ref_kind_t kind);
    int best_dist;
    logic [3:0] best;
    best_dist = 99;
    best = '0;
    for (int v = 0; v < 16; v++) begin
      int hd;
      hd = $countones(c ^ ref_encode(4'(v)));
      if (hd < best_dist) begin
        best_dist = hd;
        best = 4'(v);
      end
    end
    if (best_dist == 0) begin
      kind = REF_NONE;   d = best; fixed = c;
    end else if (best_dist == 1) begin
      fixed = ref_encode(best);
      d = best;
      kind = ((c ^ fixed) == 8'h80) ? REF_PARITY : REF_SINGLE;
    end else begin
      kind = REF_DOUBLE; d = raw_data(c); fixed = c;
    end
  endfunction

endpackage

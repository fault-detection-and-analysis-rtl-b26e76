// secded_pkg: widths and types shared by the (8,4) SECDED codec, the 8T SRAM
// and its self-refresh controller.
//
// A data word is 4 bits (D1..D4, D1 in bit 0). The (7,4) Hamming codeword is
// held with Hamming position k in bit k-1, so bit 0 is P1, bit 1 is P2, bit 2
// is D1, bit 3 is P4, bit 4 is D2, bit 5 is D3 and bit 6 is D4. The extended
// SECDED word adds the overall even-parity bit d7 in bit 7. These widths and
// the bit order follow the worked example 0101 -> 0101101; placing d7 above
// the Hamming bits is this design's choice.
package secded_pkg;

  localparam int unsigned DATA_W = 4;
  localparam int unsigned HAM_W  = 7;
  localparam int unsigned CODE_W = 8;
  localparam int unsigned SYN_W  = 3;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [HAM_W-1:0]  ham_t;
  typedef logic [CODE_W-1:0] code_t;
  typedef logic [SYN_W-1:0]  syn_t;

  // Outcome of one SECDED decode, following the operation table of the code:
  // syndrome sh, overall parity check sp.
  typedef enum logic [1:0] {
    ERR_NONE   = 2'd0,  // sh = 0, sp = 0
    ERR_PARITY = 2'd1,  // sh = 0, sp = 1: the overall parity bit flipped
    ERR_DOUBLE = 2'd2,  // sh /= 0, sp = 0: two bits flipped, not corrected
    ERR_SINGLE = 2'd3   // sh /= 0, sp = 1: one Hamming bit flipped, corrected
  } err_kind_t;

endpackage

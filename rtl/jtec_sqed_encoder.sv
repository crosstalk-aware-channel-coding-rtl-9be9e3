// jtec_sqed_encoder: JTEC with simultaneous quadruple-error detection (JTEC-SQED).
//
// The codeword is the 77-bit JTEC codeword with a second copy of the last Hsiao
// check bit appended on wire 77. Both halves are then full (39,32) Hsiao SEC-DED
// words (distance 4 each), so two codewords differ in at least 8 wires: three
// errors can still be corrected and every four-error pattern can be detected.
// The JTEC wires 0..76 are unchanged, so a JTEC decoder can still be used on
// them.
//
// Interface: data_i (32 bits) in, code_o (78 bits) out. Combinational.
//
// The extra bit and its meaning follow the published scheme; its position as the
// last wire (next to the other copy of the same bit) is this design's choice.
module jtec_sqed_encoder
  import jtec_pkg::*;
(
  input  data_t      data_i,
  output sqed_word_t code_o
);

  jtec_word_t jtec_code;

  jtec_encoder u_jtec (
    .data_i (data_i),
    .code_o (jtec_code)
  );

  assign code_o = {jtec_code[N_JTEC-1], jtec_code};

endmodule

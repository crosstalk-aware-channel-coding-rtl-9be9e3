// jtec_sqed_decoder: JTEC-SQED decoder; corrects up to three wire errors in the
// 78-bit codeword and flags every four-error pattern it cannot correct.
//
// Wires 0..76 are decoded exactly as a JTEC codeword (jtec_decoder). Wire 77, the
// second copy of the last check bit, completes copy B to a full Hsiao SEC-DED
// word, so B also gets a 7-bit syndrome S_B. With both copies distance-4 words, a
// four-error pattern is one of:
//   2+2 errors : both syndromes even and non-zero             -> flagged
//   1+3 / 3+1  : both syndromes odd (three errors in a Hsiao
//                word always give an odd syndrome); each copy
//                is corrected with its own syndrome and the
//                two results differ                            -> flagged
//   4+0 / 0+4  : the bad copy has a non-zero (even) syndrome:
//                JTEC picks the clean copy, nothing to flag;
//                or a zero syndrome: both syndromes zero but
//                the copies differ                             -> flagged
// quad_err_o marks a flit whose corrected value must be discarded (and resent by
// whatever link-level recovery is used). With three or fewer errors it is never
// set.
//
// Interface: code_i (78 bits) in; data_o, sel_o as in jtec_decoder, quad_err_o.
// Purely combinational.
//
// The three detection cases follow the published scheme; computing each copy's
// correction in parallel and comparing the corrected data words is this design's
// way of implementing the "decoded copies do not match" test.
module jtec_sqed_decoder
  import jtec_pkg::*;
(
  input  sqed_word_t code_i,
  output data_t      data_o,
  output sel_e       sel_o,
  output logic       quad_err_o
);

  syn_t         s_a;
  logic [R-2:0] s_b_short;
  syn_t         s_b;       // full 7-bit syndrome of copy B
  data_t        a_corr;
  data_t        b_data;
  data_t        b_corr;
  syn_t         b_checks;
  logic         both_even;
  logic         both_odd;
  logic         both_zero;

  jtec_decoder u_jtec (
    .code_i        (code_i[N_JTEC-1:0]),
    .data_o        (data_o),
    .sel_o         (sel_o),
    .syn_a_o       (s_a),
    .syn_b_o       (s_b_short),
    .data_a_corr_o (a_corr),
    .data_b_o      (b_data)
  );

  always_comb begin
    b_checks  = hsiao_checks(b_data);
    s_b       = {b_checks[R-1] ^ code_i[N_SQED-1], s_b_short};
    b_corr    = correct_data(b_data, s_b, '1);
    both_even = (s_a != '0) && !(^s_a) && (s_b != '0) && !(^s_b);
    both_odd  = (^s_a) && (^s_b);
    both_zero = (s_a == '0) && (s_b == '0);
    quad_err_o = both_even
               || (both_odd  && (a_corr != b_corr))
               || (both_zero && (a_corr != b_data));  // S_A = 0: a_corr is A as received
  end

endmodule

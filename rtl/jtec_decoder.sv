// jtec_decoder: decoder of the optimized JTEC code; corrects any pattern of up to
// three wire errors in the 77-bit codeword.
//
// The codeword is split into copy A (even wires plus wire 76: a full 39-bit Hsiao
// SEC-DED word) and copy B (odd wires: the 38-bit shortened Hsiao code). Both
// syndromes are computed in parallel, S_A over all seven check rows and S_B over
// rows 0..5, and the output is chosen as in the optimized decoding flowchart:
//   S_A = 0                     -> A is accepted (A has no error; three errors
//                                  in A would give an odd, non-zero syndrome)
//   S_A odd,  S_B = 0           -> B is accepted (A holds one or three errors,
//                                  B is clean)
//   S_A odd,  S_B /= 0          -> A is corrected with S_A (single error in A)
//   S_A even, non-zero          -> B is corrected with S_B (two errors in A, so
//                                  at most one in B)
// No local recomputation of an overall parity and no separate Hamming decoding
// stage are needed; both single-error corrections run in parallel with the
// selection.
//
// Interface: code_i (77 bits) in; data_o is the corrected flit and sel_o the
// branch taken. syn_a_o, syn_b_o, data_a_corr_o (A corrected with S_A) and
// data_b_o (B's data as received) are brought out so that the JTEC-SQED decoder
// can build its error detection on top of this block. Purely combinational; the
// pipeline register is in the port wrapper.
//
// The decision rules are those of the published optimized flowchart; the check
// matrix and the bit numbering are this design's (see jtec_pkg).
module jtec_decoder
  import jtec_pkg::*;
(
  input  jtec_word_t          code_i,
  output data_t               data_o,
  output sel_e                sel_o,
  output syn_t                syn_a_o,
  output logic [R-2:0]        syn_b_o,
  output data_t               data_a_corr_o,
  output data_t               data_b_o
);

  localparam syn_t MASK_A = '1;
  localparam syn_t MASK_B = {1'b0, {(R-1){1'b1}}};

  logic [N_HSIAO-1:0] cw_a;   // copy A: {p[6:0], d[31:0]}
  logic [N_SHORT-1:0] cw_b;   // copy B: {p[5:0], d[31:0]}
  syn_t               s_a;
  syn_t               s_b;    // row 6 kept at zero
  data_t              a_corr;
  data_t              b_corr;

  always_comb begin
    for (int unsigned i = 0; i < N_SHORT; i++) begin
      cw_a[i] = code_i[2*i];
      cw_b[i] = code_i[2*i+1];
    end
    cw_a[N_HSIAO-1] = code_i[N_JTEC-1];

    s_a = hsiao_checks(cw_a[K-1:0]) ^ cw_a[N_HSIAO-1:K];
    s_b = (hsiao_checks(cw_b[K-1:0]) & MASK_B) ^ {1'b0, cw_b[N_SHORT-1:K]};

    a_corr = correct_data(cw_a[K-1:0], s_a, MASK_A);
    b_corr = correct_data(cw_b[K-1:0], s_b, MASK_B);

    if (s_a == '0) begin
      sel_o  = SEL_ACCEPT_A;
      data_o = cw_a[K-1:0];
    end else if (^s_a) begin
      if (s_b == '0) begin
        sel_o  = SEL_ACCEPT_B;
        data_o = cw_b[K-1:0];
      end else begin
        sel_o  = SEL_CORRECT_A;
        data_o = a_corr;
      end
    end else begin
      sel_o  = SEL_CORRECT_B;
      data_o = b_corr;
    end
  end

  assign syn_a_o       = s_a;
  assign syn_b_o       = s_b[R-2:0];
  assign data_a_corr_o = a_corr;
  assign data_b_o      = cw_b[K-1:0];

endmodule

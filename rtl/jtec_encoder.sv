// jtec_encoder: joint crosstalk-avoidance and triple-error-correction (JTEC)
// encoder, in its optimized (Hsiao-based) form.
//
// The 32-bit flit is encoded with a (39,32) Hsiao SEC-DED code (see jtec_pkg).
// The data and the first six check bits (38 bits) are each driven onto two
// adjacent wires, and the seventh check bit is appended once, giving a 77-bit
// codeword. The first copy plus the seventh check bit is a full Hsiao SEC-DED
// word (distance 4); the second copy is the shortened Hsiao code (distance 3);
// together every two codewords differ in at least 7 wires, so any three wire
// errors can be corrected. Because every bit is duplicated on neighbouring wires,
// a wire never sees both neighbours switch against it, which lowers the worst
// case coupling from (1+4*lambda)*C_L to (1+2*lambda)*C_L.
//
// Interface: data_i (32 bits) in, code_o (77 bits) out, wire order as in
// jtec_pkg. Purely combinational; the pipeline register that makes the encoder
// one clock stage lives in the port wrapper (jtec_link_port).
//
// The code construction, the 77-bit size and the duplicated wire order follow the
// published scheme; the exact Hsiao columns and the bit numbering are this
// design's own.
module jtec_encoder
  import jtec_pkg::*;
(
  input  data_t      data_i,
  output jtec_word_t code_o
);

  logic [N_HSIAO-1:0] cw_a;   // full Hsiao SEC-DED word: {p[6:0], d[31:0]}

  always_comb begin
    cw_a = {hsiao_checks(data_i), data_i};
    for (int unsigned i = 0; i < N_SHORT; i++) begin
      code_o[2*i]   = cw_a[i];
      code_o[2*i+1] = cw_a[i];
    end
    code_o[N_JTEC-1] = cw_a[N_HSIAO-1];
  end

endmodule

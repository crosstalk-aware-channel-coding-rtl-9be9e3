// tb_jtec_sqed_decoder: exhaustive error-pattern test of the JTEC-SQED decoder.
//
// Flits are encoded with the independent reference model (tb_jtec_ref.svh).
//   * Every pattern of 0..3 errors on the 78 wires, for three data words: the
//     flit must come out unchanged and the quadruple-error flag must stay low.
//   * Every pattern of exactly 4 errors (1,426,425 patterns), for one data word:
//     whenever the flag is low the flit must be correct; a 2+2 split between the
//     copies must always raise the flag; a 0+4 split that turns one copy into
//     another codeword must raise it. Each of the three detection cases (2+2,
//     1+3, 4 errors forming a codeword) must be seen raising the flag.
module tb_jtec_sqed_decoder;
  import jtec_pkg::*;

  sqed_word_t code;
  data_t      data_o;
  sel_e       sel;
  logic       quad;
  int checks = 0, failures = 0;
  int flag_22 = 0, flag_13 = 0, flag_04 = 0, unflagged_4 = 0;

  jtec_sqed_decoder dut (.code_i(code), .data_o(data_o), .sel_o(sel), .quad_err_o(quad));

  `include "tb_jtec_ref.svh"

  // is the 39-bit copy (A: even wires + 76, B: odd wires + 77) of w a codeword?
  function automatic bit copy_is_codeword(input logic [77:0] w, input bit copy_b);
    logic [31:0] d;
    logic [6:0]  p;
    logic [77:0] r;
    for (int i = 0; i < 32; i++) d[i] = w[2*i + int'(copy_b)];
    for (int i = 0; i < 6; i++)  p[i] = w[2*(32+i) + int'(copy_b)];
    p[6] = copy_b ? w[77] : w[76];
    r = ref_encode(d);
    return {r[76], r[74], r[72], r[70], r[68], r[66], r[64]} == p;
  endfunction

  task automatic apply_small(input logic [31:0] d, input logic [77:0] cw, input int i, input int j, input int k);
    logic [77:0] e = '0;
    if (i >= 0) e[i] = 1'b1;
    if (j >= 0) e[j] = 1'b1;
    if (k >= 0) e[k] = 1'b1;
    code = cw ^ e;
    #1;
    checks++;
    if (data_o !== d || quad !== 1'b0) begin
      failures++;
      if (failures < 10) $display("FAIL d=%h err=%0d,%0d,%0d got=%h quad=%b", d, i, j, k, data_o, quad);
    end
  endtask

  task automatic apply4(input logic [31:0] d, input logic [77:0] cw, input int i, input int j, input int k, input int l);
    logic [77:0] e = '0;
    int ea = 0;
    bit bad_cw;
    e[i] = 1'b1; e[j] = 1'b1; e[k] = 1'b1; e[l] = 1'b1;
    for (int w = 0; w < 78; w++) if (e[w] && ref_in_a(w)) ea++;
    code = cw ^ e;
    #1;
    checks++;
    if (!quad && data_o !== d) begin
      failures++;
      if (failures < 10) $display("FAIL unflagged wrong flit err=%0d,%0d,%0d,%0d", i, j, k, l);
    end
    if (!quad) unflagged_4++;
    if (ea == 2) begin
      checks++;
      if (!quad) begin
        failures++;
        if (failures < 10) $display("FAIL 2+2 not flagged err=%0d,%0d,%0d,%0d", i, j, k, l);
      end else flag_22++;
    end else if (ea == 1 || ea == 3) begin
      if (quad) flag_13++;
    end else begin
      bad_cw = copy_is_codeword(cw ^ e, ea == 0);
      if (bad_cw) begin
        checks++;
        if (!quad) begin
          failures++;
          if (failures < 10) $display("FAIL 0+4 codeword not flagged err=%0d,%0d,%0d,%0d", i, j, k, l);
        end else flag_04++;
      end
    end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [77:0] cw;
    ref_build_cols();
    for (int t = 0; t < 3; t++) begin
      d  = (t == 0) ? 32'h0 : $urandom;
      cw = ref_encode(d);
      apply_small(d, cw, -1, -1, -1);
      for (int i = 0; i < 78; i++) begin
        apply_small(d, cw, i, -1, -1);
        for (int j = i + 1; j < 78; j++) begin
          apply_small(d, cw, i, j, -1);
          for (int k = j + 1; k < 78; k++) apply_small(d, cw, i, j, k);
        end
      end
    end
    d  = $urandom;
    cw = ref_encode(d);
    for (int i = 0; i < 78; i++)
      for (int j = i + 1; j < 78; j++)
        for (int k = j + 1; k < 78; k++)
          for (int l = k + 1; l < 78; l++) apply4(d, cw, i, j, k, l);
    checks += 3;
    if (flag_22 == 0) begin failures++; $display("FAIL no 2+2 detection seen"); end
    if (flag_13 == 0) begin failures++; $display("FAIL no 1+3 detection seen"); end
    if (flag_04 == 0) begin failures++; $display("FAIL no 4-error codeword detection seen"); end
    $display("4-error patterns: flagged 2+2=%0d 1+3=%0d 0+4=%0d, unflagged (corrected)=%0d",
             flag_22, flag_13, flag_04, unflagged_4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_jtec_decoder: exhaustive error-pattern test of the JTEC decoder.
//
// Flits are encoded with the independent reference model (tb_jtec_ref.svh). For
// each of several data words every error pattern of weight 0..3 on the 77 wires
// (76,153 patterns) is applied; the decoder must return the original flit, and
// the branch it reports must be the one implied by how the errors fall:
//   no error in A            -> accept A
//   1 or 3 errors in A, B ok  -> accept B
//   1 error in A, B not ok    -> correct A
//   2 errors in A             -> correct B
// Each branch must occur. A sample of random weight-4 patterns is also applied to
// show that some of them are beyond the code (counted, not checked).
module tb_jtec_decoder;
  import jtec_pkg::*;

  jtec_word_t code;
  data_t      data_o;
  sel_e       sel;
  syn_t       syn_a;
  logic [5:0] syn_b;
  data_t      a_corr, b_data;
  int checks = 0, failures = 0;
  int sel_count [4];
  int w4_wrong = 0;

  jtec_decoder dut (
    .code_i(code), .data_o(data_o), .sel_o(sel), .syn_a_o(syn_a),
    .syn_b_o(syn_b), .data_a_corr_o(a_corr), .data_b_o(b_data)
  );

  `include "tb_jtec_ref.svh"

  task automatic apply(input logic [31:0] d, input logic [76:0] cw, input int i, input int j, input int k);
    logic [76:0] e = '0;
    int ea = 0, eb = 0;
    sel_e exp_sel;
    if (i >= 0) e[i] = 1'b1;
    if (j >= 0) e[j] = 1'b1;
    if (k >= 0) e[k] = 1'b1;
    for (int w = 0; w < 77; w++) if (e[w]) begin
      if (ref_in_a(w)) ea++; else eb++;
    end
    if (ea == 0)                   exp_sel = SEL_ACCEPT_A;
    else if (ea == 2)              exp_sel = SEL_CORRECT_B;
    else if (eb == 0)              exp_sel = SEL_ACCEPT_B;
    else                           exp_sel = SEL_CORRECT_A;
    code = cw ^ e;
    #1;
    checks++;
    if (data_o !== d || sel !== exp_sel) begin
      failures++;
      if (failures < 10)
        $display("FAIL d=%h err=%0d,%0d,%0d got=%h sel=%0d exp_sel=%0d", d, i, j, k, data_o, sel, exp_sel);
    end
    sel_count[sel]++;
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [77:0] cw;
    ref_build_cols();
    for (int t = 0; t < 4; t++) begin
      d  = (t == 0) ? 32'h0 : (t == 1) ? 32'hffff_ffff : $urandom;
      cw = ref_encode(d);
      apply(d, cw[76:0], -1, -1, -1);
      for (int i = 0; i < 77; i++) begin
        apply(d, cw[76:0], i, -1, -1);
        for (int j = i + 1; j < 77; j++) begin
          apply(d, cw[76:0], i, j, -1);
          for (int k = j + 1; k < 77; k++) apply(d, cw[76:0], i, j, k);
        end
      end
    end
    // four errors: not always correctable
    repeat (20000) begin
      logic [76:0] e = '0;
      d  = $urandom;
      cw = ref_encode(d);
      while ($countones(e) < 4) e[$urandom_range(76, 0)] = 1'b1;
      code = cw[76:0] ^ e;
      #1;
      if (data_o !== d) w4_wrong++;
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (sel_count[s] == 0) begin
        failures++;
        $display("FAIL decoder branch %0d never taken", s);
      end
    end
    $display("branches: acceptA=%0d correctA=%0d acceptB=%0d correctB=%0d; 4-error patterns decoded wrongly: %0d of 20000",
             sel_count[0], sel_count[1], sel_count[2], sel_count[3], w4_wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_jtec_encoder: self-checking test of the JTEC and JTEC-SQED encoders.
//
// The reference check matrix is rebuilt here from its defining rule (weight-3
// columns over 7 rows in ascending order, without 0000111, 0111000, 1001001),
// independently of the design's table. Checks:
//   * codewords equal a reference encoding (data, check bits, duplicated wire
//     order, appended last check bit) for random and walking-one data;
//   * each check bit covers 13 or 14 data bits (balanced Hsiao rows);
//   * adjacent wire pairs carry equal values (crosstalk avoidance);
//   * minimum distance: every non-zero data word of weight 1..3 gives a
//     codeword of weight >= 7 (JTEC) and >= 8 (JTEC-SQED); weights >= 4 exceed
//     this from the duplicated data wires alone, so this proves the distances.
module tb_jtec_encoder;
  import jtec_pkg::*;

  data_t      data;
  jtec_word_t code;
  sqed_word_t code_q;
  int checks = 0, failures = 0;

  jtec_encoder      dut   (.data_i(data), .code_o(code));
  jtec_sqed_encoder dut_q (.data_i(data), .code_o(code_q));

  `include "tb_jtec_ref.svh"

  task automatic check_word(input logic [31:0] d);
    logic [77:0] r;
    data = d;
    #1;
    r = ref_encode(d);
    checks++;
    if (code !== r[76:0]) begin
      failures++;
      if (failures < 10) $display("FAIL jtec  d=%h code=%h exp=%h", d, code, r[76:0]);
    end
    checks++;
    if (code_q !== r) begin
      failures++;
      if (failures < 10) $display("FAIL sqed  d=%h code=%h exp=%h", d, code_q, r);
    end
    for (int i = 0; i < 38; i++) begin
      checks++;
      if (code_q[2*i] !== code_q[2*i+1]) failures++;
    end
  endtask

  task automatic check_weight(input logic [31:0] d);
    data = d;
    #1;
    checks++;
    if ($countones(code) < 7) begin
      failures++;
      if (failures < 10) $display("FAIL distance jtec d=%h weight=%0d", d, $countones(code));
    end
    checks++;
    if ($countones(code_q) < 8) begin
      failures++;
      if (failures < 10) $display("FAIL distance sqed d=%h weight=%0d", d, $countones(code_q));
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_build_cols();
    // balanced rows of the reference matrix
    for (int r = 0; r < 7; r++) begin
      automatic int w = 0;
      for (int j = 0; j < 32; j++) w += int'(ref_col[j][r]);
      checks++;
      if (w != 13 && w != 14) begin
        failures++;
        $display("FAIL row %0d covers %0d data bits", r, w);
      end
    end
    check_word('0);
    check_word('1);
    for (int j = 0; j < 32; j++) check_word(32'h1 << j);
    repeat (2000) check_word($urandom);
    for (int i = 0; i < 32; i++) begin
      check_weight(32'h1 << i);
      for (int j = i + 1; j < 32; j++) begin
        check_weight((32'h1 << i) | (32'h1 << j));
        for (int k = j + 1; k < 32; k++)
          check_weight((32'h1 << i) | (32'h1 << j) | (32'h1 << k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

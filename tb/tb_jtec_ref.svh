// Reference model shared by the JTEC testbenches, written independently of the
// design's package: it rebuilds the Hsiao check matrix from its rule (weight-3
// columns over 7 rows in ascending order, without 0000111, 0111000 and 1001001)
// and encodes a flit into the 78-wire JTEC-SQED order (the JTEC word is the low
// 77 wires): wires 2i and 2i+1 carry codeword bit i (i = 0..37), wires 76 and 77
// carry the last check bit. Copy A is the even wires plus wire 76, copy B the odd
// wires plus wire 77.

logic [6:0] ref_col [32];

function automatic void ref_build_cols();
  automatic int n = 0;
  for (int v = 0; v < 128; v++) begin
    if ($countones(v) == 3 && v != 32'h07 && v != 32'h38 && v != 32'h49) begin
      ref_col[n] = 7'(v);
      n++;
    end
  end
endfunction

function automatic logic [77:0] ref_encode(input logic [31:0] d);
  logic [6:0]  p = '0;
  logic [38:0] a;
  logic [77:0] w;
  for (int j = 0; j < 32; j++) if (d[j]) p ^= ref_col[j];
  a = {p, d};
  for (int i = 0; i < 38; i++) begin
    w[2*i] = a[i]; w[2*i+1] = a[i];
  end
  w[76] = p[6]; w[77] = p[6];
  return w;
endfunction

// true for wires that belong to copy A
function automatic bit ref_in_a(input int wire_idx);
  return (wire_idx == 76) || (wire_idx < 76 && wire_idx % 2 == 0);
endfunction

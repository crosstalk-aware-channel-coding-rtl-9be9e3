// jtec_pkg: constants, types and the parity-check matrix shared by the JTEC and
// JTEC-SQED encoders and decoders.
//
// The base code is a (39,32) Hsiao SEC-DED code. Its check matrix is H = [D | I7]:
// every data column of D is a distinct weight-3 column over the 7 check rows, and
// the check bits carry the identity. All columns have odd weight and no three add
// to zero, which is what makes the code SEC-DED. The 32 data columns are the 35
// weight-3 columns of 7 bits in ascending order, leaving out 0000111, 0111000 and
// 1001001. With those three left out, rows 0 and 3 cover 13 data bits and the
// other five rows 14, so each check bit is the XOR of 13 or 14 data bits (14 or
// 15 ones per row counting the identity), the balanced row weights a Hsiao code
// is chosen for. The particular columns are this design's choice; the code size,
// the use of a Hsiao code and the balanced rows follow the published scheme.
//
// Codeword layout used throughout (copy A, 39 bits):
//   A[31:0]  = data d[31:0]
//   A[38:32] = check bits p[6:0]
// Copy B is A[37:0]: the data plus p[5:0]. p[6] is the "last parity bit" that is
// sent once in JTEC and twice in JTEC-SQED.
//
// Wire order on the link (JTEC, 77 wires; JTEC-SQED, 78 wires):
//   link[2i]   = A[i]  (copy A)   for i = 0..37
//   link[2i+1] = A[i]  (copy B)   for i = 0..37
//   link[76]   = p[6]  (copy A's last check bit)
//   link[77]   = p[6]  (second copy, JTEC-SQED only)
// Both copies of a bit sit on adjacent wires, so neighbours never switch in
// opposite directions around a victim wire.
package jtec_pkg;

  localparam int unsigned K       = 32;           // information bits per flit
  localparam int unsigned R       = 7;            // Hsiao check bits
  localparam int unsigned N_HSIAO = K + R;        // 39, full SEC-DED copy
  localparam int unsigned N_SHORT = N_HSIAO - 1;  // 38, duplicated part
  localparam int unsigned N_JTEC  = 2 * N_SHORT + 1;  // 77 wires
  localparam int unsigned N_SQED  = 2 * N_SHORT + 2;  // 78 wires

  typedef logic [K-1:0]       data_t;
  typedef logic [R-1:0]       syn_t;
  typedef logic [N_JTEC-1:0]  jtec_word_t;
  typedef logic [N_SQED-1:0]  sqed_word_t;

  // Which branch of the optimized decoding flowchart produced the output flit.
  typedef enum logic [1:0] {
    SEL_ACCEPT_A  = 2'd0,  // syndrome of A is zero: A taken as is
    SEL_CORRECT_A = 2'd1,  // odd syndrome of A, B not clean: A corrected with S_A
    SEL_ACCEPT_B  = 2'd2,  // odd syndrome of A, syndrome of B zero: B taken as is
    SEL_CORRECT_B = 2'd3   // even non-zero syndrome of A: B corrected with S_B
  } sel_e;

  // Data columns of H, column j belongs to data bit j; bit r of an entry is row r.
  localparam syn_t HCOL [K] = '{
    7'b0001011, 7'b0001101, 7'b0001110, 7'b0010011,
    7'b0010101, 7'b0010110, 7'b0011001, 7'b0011010,
    7'b0011100, 7'b0100011, 7'b0100101, 7'b0100110,
    7'b0101001, 7'b0101010, 7'b0101100, 7'b0110001,
    7'b0110010, 7'b0110100, 7'b1000011, 7'b1000101,
    7'b1000110, 7'b1001010, 7'b1001100, 7'b1010001,
    7'b1010010, 7'b1010100, 7'b1011000, 7'b1100001,
    7'b1100010, 7'b1100100, 7'b1101000, 7'b1110000
  };

  // The seven Hsiao check bits of a data word: check bit r is the XOR of the data
  // bits whose column has a 1 in row r.
  function automatic syn_t hsiao_checks(input data_t d);
    syn_t p;
    p = '0;
    for (int unsigned j = 0; j < K; j++) begin
      if (d[j]) p = p ^ HCOL[j];
    end
    return p;
  endfunction

  // Single-error correction of the data part of a copy. `mask` selects the rows
  // that take part (all seven for a full copy, rows 0..5 for the shortened copy B).
  // A data bit is flipped when its column, restricted to those rows, equals the
  // syndrome; a syndrome that matches no data column leaves the data unchanged.
  function automatic data_t correct_data(input data_t d, input syn_t s, input syn_t mask);
    data_t c;
    c = d;
    for (int unsigned j = 0; j < K; j++) begin
      if ((HCOL[j] & mask) == s) c[j] = ~d[j];
    end
    return c;
  endfunction

endpackage

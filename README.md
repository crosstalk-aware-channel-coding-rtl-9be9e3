# JTEC and JTEC-SQED: crosstalk-avoiding triple-error-correcting link codes for NOC interconnects

Links between network-on-chip switches suffer from two kinds of trouble as wires get
thinner and closer together. One is **crosstalk**: when a wire switches one way while both
neighbours switch the other way (`010 -> 101`), it sees about `(1 + 4λ)·C_L` of effective
capacitance, where `λ` is the ratio of coupling to bulk capacitance. That makes the wire
slow and costs energy. The other is **transient bit errors** from noise, particle hits and
low supply voltage. Lowering the swing on the wires saves energy quadratically but raises
the error rate, so single-error correction stops being enough.

This RTL implements a coding scheme that deals with both at once:

* **JTEC** (joint crosstalk avoidance and triple error correction) is a (77,32) code. It
  corrects any 3 wire errors in a flit. Because every bit is driven onto two adjacent
  wires, the worst-case coupling drops to `(1 + 2λ)·C_L`.
* **JTEC-SQED** (JTEC with simultaneous quadruple-error detection) adds one wire to make a
  (78,32) code. It still corrects any 3 errors, and it flags every 4-error pattern it
  cannot correct, so the flit can be thrown away and sent again.

The codecs are combinational. `jtec_link_port` wraps them into the pipeline stages of one
switch port: an encoder stage, one or two link stages and a decoder stage.

## The code

### Base code: a (39,32) Hsiao SEC-DED code

The 32 data bits `d` get 7 check bits `p`. Check bit `r` is the XOR of the data bits whose
column in the check matrix has a 1 in row `r`. The check matrix is `H = [D | I7]`:

* Every data column of `D` has weight 3. This gives odd-weight columns, no three of which
  add to zero, so the code corrects single errors and detects double errors (SEC-DED).
* The 32 columns are the 35 weight-3 columns of 7 bits, taken in ascending order, minus
  `0000111`, `0111000` and `1001001`.
* With those three left out, each row covers 13 or 14 data bits. No check bit is a long
  XOR chain. In a Hamming SEC-DED code, by contrast, the overall parity covers all 38 bits.

The table is `jtec_pkg::HCOL`. Any balanced choice of odd-weight columns works equally
well. This particular choice is this design's own.

### Duplication and the wire map

The 39-bit Hsiao word is `A = {p[6:0], d[31:0]}`. Its first 38 bits (the data plus
`p[5:0]`) form copy B, a shortened Hsiao code. Dropping one check row and column leaves no
two columns equal, so copy B can still correct one error.

| wires                   | content                                        |
|-------------------------|------------------------------------------------|
| `2i`, `2i+1` (i = 0..37) | bit `i` of A (even wire: copy A, odd wire: copy B) |
| 76                      | `p[6]`, completes copy A to the full Hsiao word |
| 77 (JTEC-SQED only)     | second copy of `p[6]`, completes copy B        |

Adjacent pairs always carry equal values. A wire therefore never has both neighbours
switching against it, and a `010`/`101` pattern cannot appear on the bus.

Distance: two different data words differ in at least 4 bits of copy A and at least 3 bits
of copy B. That makes at least 7 wires for JTEC, enough to correct 3 errors. With wire 77,
copy B is a full Hsiao word too. The distance becomes 8, which corrects 3 errors and
detects 4.

## Decoding JTEC (`jtec_decoder`)

The decoder splits the wires into copy A (even wires plus wire 76) and copy B (odd wires).
It computes two syndromes in parallel: `S_A` over all 7 rows, and `S_B` over rows 0..5
(the shortened code). It also corrects each copy's data in parallel, flipping the data bit
whose column matches the syndrome. It then picks the output from the syndromes alone:

| `S_A`            | `S_B`   | conclusion (at most 3 errors in total)                   | output             |
|------------------|---------|----------------------------------------------------------|--------------------|
| zero             | –       | A has no error. Three errors in A would give an odd, non-zero `S_A`. | A as received |
| odd              | zero    | A has 1 or 3 errors, B has none                          | B as received      |
| odd              | non-zero| A has exactly 1 error, which `S_A` locates               | A corrected by `S_A` |
| even, non-zero   | –       | A has 2 errors, so B has at most 1                        | B corrected by `S_B` |

This is the *optimized* form of the scheme. Copy A and the extra wire together make a
SEC-DED word, so no overall parity has to be recomputed. The SEC-DED syndrome already tells
one error from two, and the final Hamming decoding step disappears. The branch taken comes
out on `sel_o` (enum `jtec_pkg::sel_e`), which is useful for debug and coverage.

A syndrome that matches no data column leaves the data unchanged. This is the right result
when the single error sits in a check bit. With 3 or fewer errors, no other case reaches
a branch that uses a corrected copy.

## Detecting four errors (`jtec_sqed_decoder`)

Wires 0..76 go through the unchanged JTEC decoder, which produces the output flit. Wire 77
gives copy B a full 7-bit syndrome. A 4-error pattern falls in one of three groups:

* **2 + 2**: both syndromes are even and non-zero. The flag is raised.
* **1 + 3 or 3 + 1**: three errors in a Hsiao word always give an odd syndrome, because
  they are the sum of three odd-weight columns. So both syndromes are odd. Each copy is
  corrected with its own syndrome. If the two results differ, the flag is raised.
* **4 + 0 or 0 + 4**: if the damaged copy still has a non-zero (even) syndrome, JTEC picks
  the clean copy and the flit is correct. If the four errors turned it into another
  codeword, both syndromes are zero but the copies differ. The flag is raised.

`quad_err_o` marks a flit whose corrected value must be discarded. It is never raised with
3 or fewer errors. The flag can also be raised on some 1+3 patterns where JTEC happened to
deliver the right flit. It is conservative, never optimistic: an unflagged flit with 4
errors is always correct. Every one of the 1,426,425 four-error patterns has been checked
for this.

## The switch-port pipeline (`jtec_link_port`, top level)

The switch pipeline is decoder, input arbitration, routing/traversal, output arbitration,
encoder. Each codec and each link traversal takes one clock stage. This block holds the
stages that belong to the code, for both directions of one port:

```
 tx_flit_i ─▶ encoder ─▶ [reg] ─▶ link_o  ══ interswitch wires ══▶ link_i ─▶ [reg]×LINK_STAGES ─▶ decoder ─▶ [reg] ─▶ rx_flit_o
                                                                                               rx_sel_o, rx_quad_err_o
```

* Latency, from a flit on `tx_flit_i` to the same flit on `rx_flit_o` of the receiving port:
  `LINK_STAGES + 2` cycles. That is 3 at the default setting. Throughput is one flit per
  cycle, with no stalls.
* `SQED` (default 1): 1 selects JTEC-SQED with 78 wires. 0 selects JTEC with 77 wires and
  ties `rx_quad_err_o` low. The width of `link_o`/`link_i` follows this setting.
* `LINK_STAGES` (default 1): set it to 2 for links longer than a clock period. The top-level
  links of a 64-core butterfly fat tree are the case in mind.
* `tx_valid_i`/`link_valid_*`/`rx_valid_o` travel uncoded next to the flit. The reset
  `rst_n` is synchronous and active-low and clears every register.
* An assertion checks that the two wires of every pair on `link_o` are always equal.

Not in this block, and not in this RTL: the switch stages themselves, the low-swing
level-converting drivers on the wires (analog), and a retransmission scheme. For a
retransmission scheme, `rx_quad_err_o` is the request point.

## Where this RTL makes its own choices

The construction follows the published scheme closely: the code sizes, the duplication
and wire pairing, the optimized decoding rules, the three SQED detection cases and the
pipeline placement of the codecs. These points are this design's own:

* the exact Hsiao check matrix, and the order of data and check bits inside a codeword;
* which check bit is sent only once in JTEC (`p[6]`), and that its second copy in
  JTEC-SQED sits on wire 77, next to the first;
* how the SQED "decoded copies differ" test is built: both corrections run in parallel and
  their data words are compared;
* the valid/reset conventions and the registers at the link ends in `jtec_link_port`;
* fixed 32-bit flits. The package is written for K = 32 with 7 check bits. Another flit
  width needs a new Hsiao column table in `jtec_pkg`, and the `N_*` constants follow from
  it.

Only the optimized codec is provided. The scheme can also be built from a plain (38,32)
Hamming code whose two copies are followed by an overall parity bit over all 38 bits. That
form needs a 38-input parity tree in the encoder, plus parity recomputation on both copies
and a final Hamming decode in the decoder. It corrects the same errors with more logic and
a longer critical path, so it is left out.

The row weights of the chosen matrix (14 or 15 ones per row counting the identity, 103 in
all, 14.7 on average) match the XOR counts expected of a balanced (39,32) Hsiao code.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`. The reference
model in `tb/tb_jtec_ref.svh` rebuilds the check matrix from its rule, separately from the
design.

| testbench | what it shows |
|-----------|---------------|
| `tb_jtec_encoder` | Both encoders match the reference on 2,000+ words. Rows are balanced. Wire pairs are equal. Every codeword from data of weight 1–3 has weight ≥ 7 (JTEC) or ≥ 8 (SQED), which proves the minimum distances. |
| `tb_jtec_decoder` | All 76,153 patterns of 0–3 errors on 77 wires, for 4 data words: the flit is always recovered and the reported branch is the expected one. |
| `tb_jtec_sqed_decoder` | All 0–3 error patterns on 78 wires (flag low, flit correct). All 1,426,425 four-error patterns: 2+2 always flagged, codeword-forming 4+0 always flagged, never an unflagged wrong flit. |
| `tb_jtec_link_port` | Top level at its defaults, in loopback through an error-injecting channel. 20,000 flits with random gaps, every error class, 3-cycle latency check, a cycle-by-cycle check for `010↔101` on the wires, and coverage of every decoder branch, the flag, idle and back-to-back flits. |
| `tb_jtec_link_port_jtec` | The same test with `SQED=0, LINK_STAGES=2` (4-cycle latency). |
| `tb_jtec_ber_channel` | 200,000 flits with independent wire errors at a bit error rate of 1/64. Every wrong JTEC flit had ≥ 4 errors, and every unflagged wrong SQED flit had ≥ 5. The measured residual word error rates stay under `1 − Σ_{m≤3} P(77,m)` and `1 − Σ_{m≤4} P(78,m)`. |

Beyond its guarantee, JTEC also corrects most random 4-error patterns: none of 20,000
sampled patterns was decoded wrongly. At a bit error rate of 1/64, the measured residual
rate was about 2.1 %, against a bound of 3.3 %.

Not verified here: timing and area in a real library. The published figures are for 90 nm
at a 600 ps clock. All blocks compile with Verilator lint and the Yosys slang front end.
The only warnings are four intentionally open debug outputs in the JTEC configuration of
`jtec_link_port`.

## Simulating

Each testbench is a top module with no ports. It reads the package first and finds the
rest by file name, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_jtec_link_port rtl/jtec_pkg.sv tb/tb_jtec_link_port.sv
./obj_dir/Vtb_jtec_link_port
```

Every run takes a few seconds at most. Variables that nothing initialises may start at
random values. The design resets everything it reads, so this is harmless.

## Files

| file | content |
|------|---------|
| `rtl/jtec_pkg.sv` | sizes, types, Hsiao column table, check-bit and correction functions |
| `rtl/jtec_encoder.sv` | JTEC encoder, 32 → 77 wires |
| `rtl/jtec_sqed_encoder.sv` | JTEC-SQED encoder, 32 → 78 wires (wraps the JTEC encoder) |
| `rtl/jtec_decoder.sv` | optimized JTEC decoder |
| `rtl/jtec_sqed_decoder.sv` | JTEC-SQED decoder with quadruple-error flag (wraps the JTEC decoder) |
| `rtl/jtec_link_port.sv` | top level: encoder, link and decoder pipeline stages of one switch port |
| `tb/*.sv`, `tb/tb_jtec_ref.svh` | testbenches and their reference model |

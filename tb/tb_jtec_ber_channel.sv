// tb_jtec_ber_channel: both decoders behind a random-error channel.
//
// Each wire of every flit is flipped independently with bit error rate
// EPS = 1/64 (far above any real link, so that multi-bit errors are frequent).
// For every flit the test checks the guarantees that must hold for each single
// word, whatever the random draw:
//   * JTEC: a wrongly decoded flit had at least 4 wire errors;
//   * JTEC-SQED: the flag is never raised with 3 or fewer errors, and a wrong
//     flit that is not flagged had at least 5 wire errors.
// It then compares the measured residual word error rates with the lower bounds
// on correct decoding used for the voltage-swing analysis:
//   P_JTEC <= 1 - sum_{m=0..3} C(77,m) eps^m (1-eps)^(77-m)
//   P_SQED <= 1 - sum_{m=0..4} C(78,m) eps^m (1-eps)^(78-m)
// (undetected errors for SQED), allowing for sampling noise, and prints them
// with the small-eps approximations C(77,4) eps^4 and C(78,5) eps^5.
module tb_jtec_ber_channel;
  import jtec_pkg::*;

  localparam int NFLITS = 200000;
  localparam int EPS_NUM = 1, EPS_DEN = 64;

  sqed_word_t code;
  data_t      d_jtec, d_sqed;
  sel_e       sel_jtec, sel_sqed;
  logic       quad;
  int checks = 0, failures = 0;
  int wrong_jtec = 0, undet_sqed = 0, flagged = 0;
  int nerr_hist [8];

  jtec_decoder dut_j (
    .code_i(code[76:0]), .data_o(d_jtec), .sel_o(sel_jtec), .syn_a_o(),
    .syn_b_o(), .data_a_corr_o(), .data_b_o()
  );
  jtec_sqed_decoder dut_q (.code_i(code), .data_o(d_sqed), .sel_o(sel_sqed), .quad_err_o(quad));

  `include "tb_jtec_ref.svh"

  function automatic real binom(input int n, input int m);
    real r = 1.0;
    for (int i = 0; i < m; i++) r = r * real'(n - i) / real'(i + 1);
    return r;
  endfunction

  function automatic real p_more_than(input int n, input int t, input real eps);
    real s = 0.0;
    for (int m = 0; m <= t; m++) s += binom(n, m) * (eps ** m) * ((1.0 - eps) ** (n - m));
    return 1.0 - s;
  endfunction

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real eps, bound_j, bound_q, rate_j, rate_q, sigma_j, sigma_q;
    ref_build_cols();
    for (int f = 0; f < NFLITS; f++) begin
      logic [31:0] d;
      logic [77:0] e;
      int ne_j, ne_q;
      d = $urandom;
      e = '0;
      for (int w = 0; w < 78; w++) e[w] = ($urandom_range(EPS_DEN - 1, 0) < EPS_NUM);
      ne_j = $countones(e[76:0]);
      ne_q = $countones(e);
      nerr_hist[ne_q > 7 ? 7 : ne_q]++;
      code = ref_encode(d) ^ e;
      #1;
      checks++;
      if (d_jtec !== d) begin
        wrong_jtec++;
        if (ne_j < 4) begin
          failures++;
          if (failures < 10) $display("FAIL JTEC wrong with %0d errors", ne_j);
        end
      end
      checks++;
      if (quad) flagged++;
      if ((quad && ne_q <= 3) || (!quad && d_sqed !== d && ne_q < 5)) begin
        failures++;
        if (failures < 10) $display("FAIL SQED errors=%0d flag=%b correct=%b", ne_q, quad, d_sqed === d);
      end
      if (!quad && d_sqed !== d) undet_sqed++;
    end
    eps     = real'(EPS_NUM) / real'(EPS_DEN);
    bound_j = p_more_than(77, 3, eps);
    bound_q = p_more_than(78, 4, eps);
    rate_j  = real'(wrong_jtec) / NFLITS;
    rate_q  = real'(undet_sqed) / NFLITS;
    sigma_j = $sqrt(bound_j * (1.0 - bound_j) / NFLITS);
    sigma_q = $sqrt(bound_q * (1.0 - bound_q) / NFLITS);
    checks += 2;
    if (rate_j > bound_j + 5.0 * sigma_j) begin
      failures++;
      $display("FAIL JTEC residual rate above bound");
    end
    if (rate_q > bound_q + 5.0 * sigma_q) begin
      failures++;
      $display("FAIL SQED undetected rate above bound");
    end
    // the code must actually have been exercised beyond its correction range
    checks++;
    if (nerr_hist[4] == 0 || nerr_hist[5] == 0 || flagged == 0) begin
      failures++;
      $display("FAIL channel never produced 4/5-error words or no flag was raised");
    end
    $display("eps=%f flits=%0d errors/word 0..6,7+: %0d %0d %0d %0d %0d %0d %0d %0d", eps, NFLITS,
             nerr_hist[0], nerr_hist[1], nerr_hist[2], nerr_hist[3], nerr_hist[4],
             nerr_hist[5], nerr_hist[6], nerr_hist[7]);
    $display("JTEC residual word error %e (bound %e, approx C(77,4)eps^4 = %e)",
             rate_j, bound_j, binom(77, 4) * eps ** 4);
    $display("SQED undetected word error %e (bound %e, approx C(78,5)eps^5 = %e), flagged %0d",
             rate_q, bound_q, binom(78, 5) * eps ** 5, flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

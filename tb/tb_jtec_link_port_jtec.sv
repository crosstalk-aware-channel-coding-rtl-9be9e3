// tb_jtec_link_port_jtec: end-to-end test of one coded switch port in loopback,
// configured for plain JTEC (77 wires, no quadruple-error flag) with two link
// stages, as used on the longest links of a butterfly fat tree. Apart from the
// configuration it is the same test as tb_jtec_link_port; four-error flits are
// sent but, without the flag, are not checked.
//
// The port's link output is fed back to its link input through a channel model
// that flips chosen wires of each flit. Flits arrive with random gaps. Every flit
// is given an error pattern from one of these classes: none, single, double and
// triple errors spread over the two copies in every way, four errors split 2+2
// (must be flagged), and random four-error patterns (flagged, or delivered
// correctly). The scoreboard checks, per flit:
//   * the delivered flit equals the sent one (unless flagged as uncorrectable);
//   * the decoder branch matches the one implied by how the errors fall;
//   * the quadruple-error flag is low for up to three errors, high for 2+2;
//   * the latency from flit presentation to delivery is LINK_STAGES+2 cycles
//     (encoder stage, link stage(s), decoder stage).
// On every cycle it also checks that no link wire switches while both its
// neighbours switch the other way (the crosstalk pattern the code removes).
// Each mechanism (the four decoder branches, the flag, idle cycles between
// flits and back-to-back flits) is counted and must occur.
module tb_jtec_link_port_jtec;
  import jtec_pkg::*;

  localparam bit          SQED_L = 1'b0;
  localparam int unsigned LS     = 2;
  localparam int unsigned NWL    = SQED_L ? 78 : 77;
  localparam int          NFLITS = 20000;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           tx_valid = 1'b0;
  data_t          tx_flit = '0;
  logic           link_valid;
  logic [NWL-1:0] link_o, link_i, link_o_prev;
  logic [NWL-1:0] err_q = '0;
  logic           rx_valid;
  data_t          rx_flit;
  sel_e           rx_sel;
  logic           rx_quad;

  int checks = 0, failures = 0;
  int cycle = 0;
  int sel_count [4];
  int quad_count = 0, idle_count = 0, b2b_count = 0, rx_count = 0;

  typedef struct {
    logic [31:0]    flit;
    logic [NWL-1:0] err;
    int             cycle;
  } sent_t;
  sent_t sent_q [$];

  jtec_link_port #(.SQED(SQED_L), .LINK_STAGES(LS)) dut (
    .clk           (clk),
    .rst_n         (rst_n),
    .tx_valid_i    (tx_valid),
    .tx_flit_i     (tx_flit),
    .link_valid_o  (link_valid),
    .link_o        (link_o),
    .link_valid_i  (link_valid),
    .link_i        (link_i),
    .rx_valid_o    (rx_valid),
    .rx_flit_o     (rx_flit),
    .rx_sel_o      (rx_sel),
    .rx_quad_err_o (rx_quad)
  );

  `include "tb_jtec_ref.svh"

  always #5 clk = ~clk;

  // channel: the error mask travels with the flit on the link
  assign link_i = link_o ^ (link_valid ? err_q : '0);

  // pick a random wire of copy A (want_a) or copy B that is not yet in e
  function automatic logic [NWL-1:0] add_err(input logic [NWL-1:0] e, input bit want_a);
    int w;
    do w = $urandom_range(NWL - 1, 0); while (e[w] || (ref_in_a(w) != want_a));
    e[w] = 1'b1;
    return e;
  endfunction

  function automatic logic [NWL-1:0] pick_err(input int cls);
    logic [NWL-1:0] e = '0;
    case (cls)
      0: ;
      1: e = add_err(e, 1'b1);                                   // 1 in A
      2: e = add_err(e, 1'b0);                                   // 1 in B
      3: e = add_err(add_err(e, 1'b1), 1'b0);                    // 1 + 1
      4: e = add_err(add_err(e, 1'b1), 1'b1);                    // 2 in A
      5: e = add_err(add_err(e, 1'b0), 1'b0);                    // 2 in B
      6: e = add_err(add_err(add_err(e, 1'b1), 1'b1), 1'b1);     // 3 in A
      7: e = add_err(add_err(add_err(e, 1'b1), 1'b1), 1'b0);     // 2A + 1B
      8: e = add_err(add_err(add_err(e, 1'b1), 1'b0), 1'b0);     // 1A + 2B
      9: e = add_err(add_err(add_err(e, 1'b0), 1'b0), 1'b0);     // 3 in B
      10: e = add_err(add_err(add_err(add_err(e, 1'b1), 1'b1), 1'b0), 1'b0); // 2+2
      default: while ($countones(e) < 4) e[$urandom_range(NWL - 1, 0)] = 1'b1;
    endcase
    return e;
  endfunction

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // stimulus, driven on the falling edge
  initial begin
    int sent = 0;
    ref_build_cols();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (sent < NFLITS) begin
      @(negedge clk);
      if ($urandom_range(3, 0) != 0) begin
        sent_t s;
        s.flit  = $urandom;
        s.err   = pick_err(int'($urandom_range(11, 0)));
        s.cycle = cycle;
        sent_q.push_back(s);
        if (tx_valid) b2b_count++;
        tx_valid = 1'b1;
        tx_flit  = s.flit;
        sent++;
      end else begin
        tx_valid = 1'b0;
        idle_count++;
      end
    end
    @(negedge clk);
    tx_valid = 1'b0;
    repeat (LS + 6) @(negedge clk);
    checks += 6;
    for (int s = 0; s < 4; s++)
      if (sel_count[s] == 0) begin failures++; $display("FAIL branch %0d never taken", s); end
    if (SQED_L && quad_count == 0) begin failures++; $display("FAIL quadruple-error flag never raised"); end
    if (idle_count == 0 || b2b_count == 0) begin failures++; $display("FAIL no idle / back-to-back flits"); end
    checks++;
    if (rx_count != NFLITS || sent_q.size() != 0) begin
      failures++;
      $display("FAIL delivered %0d of %0d flits", rx_count, NFLITS);
    end
    $display("flits=%0d acceptA=%0d correctA=%0d acceptB=%0d correctB=%0d quad=%0d idle=%0d back-to-back=%0d",
             rx_count, sel_count[0], sel_count[1], sel_count[2], sel_count[3], quad_count, idle_count, b2b_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // error mask register, loaded with the flit's mask when the flit enters the link
  always @(posedge clk) begin
    if (tx_valid && rst_n) begin
      sent_t s;
      s = sent_q[$];
      err_q <= s.err;
    end
  end

  // crosstalk pattern check on the transmitted wires
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      for (int w = 1; w < NWL - 1; w++) begin
        logic [2:0] a, b;
        a = {link_o_prev[w+1], link_o_prev[w], link_o_prev[w-1]};
        b = {link_o[w+1], link_o[w], link_o[w-1]};
        checks++;
        if ((a == 3'b010 && b == 3'b101) || (a == 3'b101 && b == 3'b010)) begin
          failures++;
          if (failures < 10) $display("FAIL worst-case crosstalk transition around wire %0d", w);
        end
      end
    end
    link_o_prev = link_o;
  end

  // scoreboard
  always @(posedge clk) begin
    #2;
    if (rst_n && rx_valid) begin
      sent_t s;
      int ea, eb, eq;
      sel_e exp_sel;
      ea = 0;
      eb = 0;
      eq = 0;
      rx_count++;
      if (sent_q.size() == 0) begin
        failures++;
        $display("FAIL flit delivered that was never sent");
      end else begin
        s = sent_q.pop_front();
        // eb counts errors on copy B's first 38 bits (wire 77 is not used
        // for the JTEC copy selection); eq counts an error on wire 77
        for (int w = 0; w < NWL; w++) if (s.err[w]) begin
          if (ref_in_a(w)) ea++; else if (w != 77) eb++; else eq++;
        end
        sel_count[rx_sel]++;
        if (rx_quad) quad_count++;
        checks++;
        if (cycle - s.cycle != int'(LS) + 2) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d cycles", cycle - s.cycle);
        end
        if (ea + eb + eq <= 3) begin
          if (ea == 0)      exp_sel = SEL_ACCEPT_A;
          else if (ea == 2) exp_sel = SEL_CORRECT_B;
          else if (eb == 0) exp_sel = SEL_ACCEPT_B;
          else              exp_sel = SEL_CORRECT_A;
          checks++;
          if (rx_flit !== s.flit || rx_sel !== exp_sel || rx_quad !== 1'b0) begin
            failures++;
            if (failures < 10)
              $display("FAIL flit %h got %h sel=%0d exp=%0d quad=%b errs A=%0d B=%0d",
                       s.flit, rx_flit, rx_sel, exp_sel, rx_quad, ea, eb);
          end
        end else begin
          checks++;
          if (SQED_L && ea == 2 && !rx_quad) begin
            failures++;
            if (failures < 10) $display("FAIL 2+2 errors not flagged err=%h flit=%h got=%h cyc=%0d", s.err, s.flit, rx_flit, cycle);
          end else if (!rx_quad && SQED_L && rx_flit !== s.flit) begin
            failures++;
            if (failures < 10) $display("FAIL unflagged 4-error flit delivered wrongly");
          end
        end
      end
    end
  end
endmodule

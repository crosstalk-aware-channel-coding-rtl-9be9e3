// jtec_link_port: the coding stages of one NOC switch port, with JTEC-SQED (or
// JTEC) on the interswitch link.
//
// In the pipelined switch the decoder sits in front of the switch stages (input
// arbitration, routing/traversal, output arbitration) and the encoder behind
// them, each codec taking one clock stage of its own; the interswitch wires form
// one more stage (two for a long link). This block holds those codec and link
// stages for one direction pair of a port:
//
//   transmit: tx_flit_i --encode--> [reg] --> link_o          (1 cycle)
//   receive : link_i --> [LINK_STAGES regs] --decode--> [reg] --> rx_flit_o
//                                                       (LINK_STAGES+1 cycles)
//
// so a flit that leaves one port on link_o and enters the next on link_i is
// back in plain form LINK_STAGES+2 cycles later. The switch itself, the low-swing
// drivers of the wires and any retransmission logic are outside this block; the
// switch side is the tx_/rx_ ports and rx_quad_err_o is where a retransmission
// request would be raised.
//
// Parameters:
//   SQED        1: JTEC-SQED, 78 link wires, quadruple-error flag.
//               0: JTEC, 77 link wires, rx_quad_err_o tied low.
//   LINK_STAGES number of registers on the receive side of the link: 1 for
//               links that fit in a clock period, 2 for the longest top-level
//               links of a butterfly fat tree.
// Timing: all registers on clk, synchronous active-low reset rst_n clearing
// every register. The valid bits are sent next to the coded flit and are not
// coded themselves.
//
// The stage order and one-cycle codecs follow the published switch pipeline;
// valid bits, reset and the register placement at the link ends are this
// design's choices.
module jtec_link_port
  import jtec_pkg::*;
#(
  parameter bit          SQED        = 1'b1,
  parameter int unsigned LINK_STAGES = 1,
  localparam int unsigned NW         = SQED ? N_SQED : N_JTEC
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the switch (output arbitration) to the link
  input  logic          tx_valid_i,
  input  data_t         tx_flit_i,
  output logic          link_valid_o,
  output logic [NW-1:0] link_o,
  // from the link to the switch (input arbitration)
  input  logic          link_valid_i,
  input  logic [NW-1:0] link_i,
  output logic          rx_valid_o,
  output data_t         rx_flit_o,
  output sel_e          rx_sel_o,
  output logic          rx_quad_err_o
);

  // ---------------- transmit: encoder stage ----------------
  logic [NW-1:0] tx_code;
  data_t         rx_data;
  sel_e          rx_sel;
  logic          rx_quad;

  // ---------------- receive: link capture registers ----------------
  logic [NW-1:0] link_q [LINK_STAGES];
  logic          link_v [LINK_STAGES];

  if (SQED) begin : g_sqed
    jtec_sqed_encoder u_enc (
      .data_i (tx_flit_i),
      .code_o (tx_code)
    );
    jtec_sqed_decoder u_dec (
      .code_i     (link_q[LINK_STAGES-1]),
      .data_o     (rx_data),
      .sel_o      (rx_sel),
      .quad_err_o (rx_quad)
    );
  end else begin : g_jtec
    jtec_encoder u_enc (
      .data_i (tx_flit_i),
      .code_o (tx_code)
    );
    jtec_decoder u_dec (
      .code_i        (link_q[LINK_STAGES-1]),
      .data_o        (rx_data),
      .sel_o         (rx_sel),
      .syn_a_o       (),
      .syn_b_o       (),
      .data_a_corr_o (),
      .data_b_o      ()
    );
    assign rx_quad = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_valid_o <= 1'b0;
      link_o       <= '0;
    end else begin
      link_valid_o <= tx_valid_i;
      if (tx_valid_i) link_o <= tx_code;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < LINK_STAGES; s++) begin
        link_q[s] <= '0;
        link_v[s] <= 1'b0;
      end
    end else begin
      link_q[0] <= link_i;
      link_v[0] <= link_valid_i;
      for (int unsigned s = 1; s < LINK_STAGES; s++) begin
        link_q[s] <= link_q[s-1];
        link_v[s] <= link_v[s-1];
      end
    end
  end

  // ---------------- receive: decoder stage ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_valid_o    <= 1'b0;
      rx_flit_o     <= '0;
      rx_sel_o      <= SEL_ACCEPT_A;
      rx_quad_err_o <= 1'b0;
    end else begin
      rx_valid_o    <= link_v[LINK_STAGES-1];
      rx_flit_o     <= rx_data;
      rx_sel_o      <= rx_sel;
      rx_quad_err_o <= link_v[LINK_STAGES-1] && rx_quad;
    end
  end

  // The encoder drives both copies of each of the first 38 bits on adjacent
  // wires, so no wire can have both neighbours switching against it.
  for (genvar i = 0; i < N_SHORT; i++) begin : g_dup_chk
    a_dup : assert property (@(posedge clk) disable iff (!rst_n)
                             link_o[2*i] == link_o[2*i+1]);
  end

  initial begin
    assert (LINK_STAGES >= 1) else $error("LINK_STAGES must be at least 1");
  end

endmodule

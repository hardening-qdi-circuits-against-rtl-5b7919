// dimxs_and_top: a return-to-one (RTO) island inside a return-to-zero (RTZ)
// system, computing the AND of two 1-of-2 operands with a DIMxS gate.
//
// Glitch tolerance of the C-elements is better when their memorising states
// hold a 1. RTO logic keeps them there, so the AND is evaluated in the RTO
// domain even though the surrounding channels use RTZ. The operands enter as
// RTZ 1-of-2 channels, cross into RTO, are combined by dimxs_and2 and the
// result is converted back to RTZ. Both borders are the inverter interface of
// rtz_rto_conv (the RTO value of a wire is the inverse of its RTZ value).
// With BORDER_INV_C set, the input border is instead folded into the gate:
// its maxterm generators become inverted C-elements fed by the RTZ wires.
// The RTO result is also brought out for an RTO consumer.
//
// The 4-phase handshake (the acknowledge wire) belongs to the sender and the
// receiver around this island and is not part of it: the island is purely
// combinational logic with C-element state, and is brought to its start
// state by an RTZ spacer (all wires 0) on both operands.
//
// The construction (inverter borders, DIMxS AND) follows the document; the
// port list and the BORDER_INV_C option are this design's own.
//
// Ports: a_rtz, b_rtz operand channels (RTZ); q_rtz result (RTZ); q_rto the
// same result before the output border (RTO). Timing: no clock.
`timescale 1ps / 1ps
module dimxs_and_top
  import dual_rail_pkg::*;
#(
  parameter bit BORDER_INV_C = 1'b0
) (
  input  dr_t a_rtz,
  input  dr_t b_rtz,
  output dr_t q_rtz,
  output dr_t q_rto
);

  dr_t in_rtz [2];
  dr_t res_rto [1];
  dr_t res_rtz [1];

  assign in_rtz[0] = a_rtz;
  assign in_rtz[1] = b_rtz;

  if (BORDER_INV_C) begin : g_invc_border
    // RTZ operands go straight to inverted C-elements inside the gate.
    dimxs_and2 #(.RTZ_INPUTS(1'b1)) u_and (
      .a(in_rtz[0]), .b(in_rtz[1]), .q(res_rto[0])
    );
  end else begin : g_inv_border
    dr_t in_rto [2];
    rtz_rto_conv #(.N(2)) u_in_border (.din(in_rtz), .dout(in_rto));
    dimxs_and2 #(.RTZ_INPUTS(1'b0)) u_and (
      .a(in_rto[0]), .b(in_rto[1]), .q(res_rto[0])
    );
  end

  rtz_rto_conv #(.N(1)) u_out_border (.din(res_rto), .dout(res_rtz));

  assign q_rto = res_rto[0];
  assign q_rtz = res_rtz[0];

endmodule

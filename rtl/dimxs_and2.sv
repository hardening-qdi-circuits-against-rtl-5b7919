// dimxs_and2: two-input AND of 1-of-2 return-to-one operands in
// delay-insensitive maxterm synthesis (DIMxS).
//
// Four C-elements, one per combination of input wires, generate the maxterms
// of the two operands: C0 joins A.0 and B.0 (Mx00), C1 joins A.0 and B.1
// (Mx01), C2 joins A.1 and B.0 (Mx10) and C3 joins A.1 and B.1 (Mx11). Under
// RTO a data wire is active low, so exactly one maxterm falls once both
// operands carry data, and all four return to 1 once both operands are back
// at the all-1s spacer. The output wire Q.1 (active low: result '1') is Mx11;
// the output wire Q.0 (result '0') is the AND of Mx00, Mx01 and Mx10, so it
// falls when any of the three combinations whose AND is 0 is present. Every
// signal is the inverse of the one in the return-to-zero minterm (DIMS)
// version of the same gate, whose OR becomes an AND here. In a memorising
// state (operands differ in phase) the C-elements hold a 1, the state in
// which C-elements tolerate input glitches best; this is the reason for the
// style.
//
// Parameters (this design's own):
//   RTZ_INPUTS      0: a and b are RTO channels and plain C-elements are used
//                   (the construction the document gives).
//                   1: a and b are RTZ channels and the maxterm generators
//                   are inverted C-elements, which turn RTZ operands into RTO
//                   maxterms directly; this is the border use of inverted
//                   C-elements the document suggests. q is RTO in both cases.
//   TRANSIENT_MODEL 1 replaces the C-elements by the behavioural glitch model
//                   c_element_martin_model (simulation only, RTO inputs only).
//
// The gate has no reset: like every delay-insensitive block it is brought to
// its start state by a spacer on both operands. Timing: no clock; the output
// follows the C-elements within the same time step (or after the model's
// critical widths when TRANSIENT_MODEL is 1).
`timescale 1ps / 1ps
module dimxs_and2
  import dual_rail_pkg::*;
#(
  parameter bit RTZ_INPUTS      = 1'b0,
  parameter bit TRANSIENT_MODEL = 1'b0
) (
  input  dr_t a,
  input  dr_t b,
  output dr_t q
);

  // Maxterm index {i, j}: C-element on A.i and B.j, named Mx<i><j>.
  logic [3:0] mx;

  for (genvar i = 0; i < 2; i++) begin : g_a
    for (genvar j = 0; j < 2; j++) begin : g_b
      localparam int unsigned K = 2 * i + j;
      logic a_w, b_w;
      assign a_w = (i == 1) ? a.d1 : a.d0;
      assign b_w = (j == 1) ? b.d1 : b.d0;

      if (TRANSIENT_MODEL) begin : g_model
        c_element_martin_model #(.INIT(1'b1)) u_c (.a(a_w), .b(b_w), .q(mx[K]));
      end else if (RTZ_INPUTS) begin : g_inv
        inv_c_element u_c (.a(a_w), .b(b_w), .qn(mx[K]));
      end else begin : g_plain
        c_element u_c (.a(a_w), .b(b_w), .q(mx[K]));
      end
    end
  end

  if (TRANSIENT_MODEL && RTZ_INPUTS) begin : g_bad_cfg
    $error("dimxs_and2: TRANSIENT_MODEL models RTO inputs only");
  end

  // Protocol rule: an operand is a spacer or one active wire, never both
  // wires active (00 under RTO, 11 under RTZ). Checked in the logic
  // configurations only; the glitch model exists to inject such faults.
  if (!TRANSIENT_MODEL) begin : g_chk
    localparam dr_t INVALID = RTZ_INPUTS ? 2'b11 : 2'b00;
    always_comb begin
      assert final (a != INVALID) else $error("dimxs_and2: invalid codeword on operand A");
      assert final (b != INVALID) else $error("dimxs_and2: invalid codeword on operand B");
    end
  end

  // Function generation: Q.1 <- Mx11, Q.0 <- Mx00 & Mx01 & Mx10.
  assign q.d1 = mx[3];
  assign q.d0 = mx[0] & mx[1] & mx[2];

endmodule

// tb_dimxs_and2: self-checking testbench for the DIMxS two-input AND.
//
// The testbench acts as the two RTO senders and the receiver of a 4-phase
// return-to-one handshake: both operands start at the all-1s spacer, each
// operand then receives a bit, and both return to the spacer, in every order
// and for every pair of bits, followed by a random walk of legal sequences.
// After each step it checks:
//   - the output against a reference of the gate's protocol behaviour (data
//     when both operands carry data, spacer when both are spacers, unchanged
//     otherwise) and against the AND of the two bits;
//   - the (A, B, Q) state of each of the four C-elements against a reference
//     C-element, and, on the way from spacer to data, against the published
//     state table of the 2-input DIMxS AND (one row per operand state);
//   - that the output is never the invalid codeword (both wires at 0);
//   - that a second instance built with inverted C-elements and fed with the
//     RTZ form of the same operands produces the same maxterms and output.
// It also counts the memorising ("vulnerable") C-element states met on the
// way to data, where the C-element output is 1, and on the way back to the
// spacer, where it is 0, and requires both to occur. A watchdog ends the run
// if it stalls.
`timescale 1ps / 1ps
module tb_dimxs_and2;
  import dual_rail_pkg::*;

  // Operand symbols, in the order of the published table: spacer, '0', '1'.
  typedef enum int {SYM_SP = 0, SYM_0 = 1, SYM_1 = 2} sym_e;

  // C-element states (A, B, Q) of C0..C3 for each operand pair (A, B),
  // rows in the order (SP,SP) (SP,0) (SP,1) (0,SP) (0,0) (0,1) (1,SP) (1,0)
  // (1,1), reached from the double spacer.
  localparam logic [11:0] STATE_TABLE [9] = '{
    {3'b111, 3'b111, 3'b111, 3'b111},
    {3'b101, 3'b111, 3'b101, 3'b111},
    {3'b111, 3'b101, 3'b111, 3'b101},
    {3'b011, 3'b011, 3'b111, 3'b111},
    {3'b000, 3'b011, 3'b101, 3'b111},
    {3'b011, 3'b000, 3'b111, 3'b101},
    {3'b111, 3'b111, 3'b011, 3'b011},
    {3'b101, 3'b111, 3'b000, 3'b011},
    {3'b111, 3'b101, 3'b011, 3'b000}
  };

  dr_t a, b, q;
  dr_t a_rtz, b_rtz, q2;
  sym_e sa, sb;
  dr_t q_ref;
  logic [3:0] mx_ref;
  int checks = 0;
  int failures = 0;
  int vuln_q1 = 0;
  int vuln_q0 = 0;
  int and_results [2];

  dimxs_and2 dut (.a(a), .b(b), .q(q));
  dimxs_and2 #(.RTZ_INPUTS(1'b1)) dut_rtz (.a(a_rtz), .b(b_rtz), .q(q2));

  assign a_rtz = ~a;
  assign b_rtz = ~b;

  function automatic dr_t sym2rto(sym_e s);
    case (s)
      SYM_SP:  return RTO_SPACER;
      SYM_0:   return rto_encode(1'b0);
      default: return rto_encode(1'b1);
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (A=%0d B=%0d a=%b b=%b q=%b)", what, sa, sb, a, b, q);
    end
  endtask

  // Apply a new operand pair and check everything; from_spacer marks the way
  // from the double spacer to data, where the published table applies.
  task automatic apply(input sym_e na, input sym_e nb, input bit from_spacer);
    logic [2:0] st;
    logic aw, bw;
    sa = na;
    sb = nb;
    a  = sym2rto(na);
    b  = sym2rto(nb);
    #10;
    // Reference C-elements.
    for (int k = 0; k < 4; k++) begin
      aw = (k >= 2) ? a.d1 : a.d0;
      bw = (k % 2 == 1) ? b.d1 : b.d0;
      if (aw == bw) mx_ref[k] = aw;
    end
    // Reference protocol behaviour of the output.
    if (na != SYM_SP && nb != SYM_SP)
      q_ref = rto_encode((na == SYM_1) && (nb == SYM_1));
    else if (na == SYM_SP && nb == SYM_SP)
      q_ref = RTO_SPACER;
    check(q == q_ref, "output");
    check(q != 2'b00, "invalid output codeword");
    check(dut.mx == mx_ref, "maxterms");
    check(dut_rtz.mx == dut.mx && q2 == q, "inverted C-element variant");
    for (int k = 0; k < 4; k++) begin
      aw = (k >= 2) ? a.d1 : a.d0;
      bw = (k % 2 == 1) ? b.d1 : b.d0;
      st = {aw, bw, dut.mx[k]};
      if (from_spacer)
        check(st == STATE_TABLE[3 * int'(na) + int'(nb)][3 * (3 - k) +: 3], "state table");
      if (aw != bw) begin
        if (dut.mx[k]) vuln_q1++;
        else           vuln_q0++;
      end
    end
    if (na != SYM_SP && nb != SYM_SP) and_results[rto_value(q)]++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_e va, vb, ra, rb;
    q_ref = RTO_SPACER;
    mx_ref = 4'b1111;
    and_results = '{0, 0};
    // Start state: both operands at the spacer.
    apply(SYM_SP, SYM_SP, 1'b1);
    // Every bit pair, every arrival order, every return order.
    for (int v = 0; v < 4; v++) begin
      va = v[1] ? SYM_1 : SYM_0;
      vb = v[0] ? SYM_1 : SYM_0;
      for (int order = 0; order < 4; order++) begin
        if (order[1]) apply(SYM_SP, vb, 1'b1);
        else          apply(va, SYM_SP, 1'b1);
        apply(va, vb, 1'b1);
        if (order[0]) apply(SYM_SP, vb, 1'b0);
        else          apply(va, SYM_SP, 1'b0);
        apply(SYM_SP, SYM_SP, 1'b0);
      end
    end
    // Random walk of legal 4-phase sequences, including simultaneous changes.
    for (int n = 0; n < 500; n++) begin
      ra = $urandom_range(1) != 0 ? SYM_1 : SYM_0;
      rb = $urandom_range(1) != 0 ? SYM_1 : SYM_0;
      case ($urandom_range(2))
        0: apply(ra, SYM_SP, 1'b1);
        1: apply(SYM_SP, rb, 1'b1);
        default: ;
      endcase
      apply(ra, rb, 1'b0);
      case ($urandom_range(2))
        0: apply(SYM_SP, rb, 1'b0);
        1: apply(ra, SYM_SP, 1'b0);
        default: ;
      endcase
      apply(SYM_SP, SYM_SP, 1'b0);
    end
    $display("results: %0d x '0', %0d x '1'; memorising C-element states: %0d with Q=1, %0d with Q=0",
             and_results[0], and_results[1], vuln_q1, vuln_q0);
    check(and_results[0] > 0 && and_results[1] > 0, "both results produced");
    check(vuln_q1 > 0 && vuln_q0 > 0, "both kinds of memorising state reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_dimxs_and_top_invc: end-to-end testbench of the RTO island built with
// the inverted C-element input border (BORDER_INV_C = 1). Apart from that
// parameter it is the same test as tb_dimxs_and_top.
//
// The testbench plays the RTZ environment around the island. Two senders
// place RTZ 1-of-2 operands on a_rtz and b_rtz; a receiver watches q_rtz,
// raises its acknowledge once a valid result is present, and lowers it once
// the spacer has come back, as in a 4-phase return-to-zero handshake. The
// senders only return to the spacer after the acknowledge rose and only
// send new data after it fell. Operand bits, the order in which the operands
// arrive and the order in which they leave are random, and each of the three
// directed rounds forces every combination once.
//
// Checks: every result equals the AND of the operand bits; q_rto is always
// the bitwise inverse of q_rtz; neither output ever shows an invalid
// codeword; the result is present only after both operands are, and the
// spacer only after both operands left. Counted mechanisms, each of which
// must occur: handshakes, results '0' and '1', every one of the eight
// non-spacer operand states of the gate's transition diagram, and memorising
// C-element states with the output held at 1 inside the RTO island. A
// watchdog ends the run if the handshake stalls.
`timescale 1ps / 1ps
module tb_dimxs_and_top_invc;
  import dual_rail_pkg::*;

  localparam int unsigned ROUNDS = 400;

  dr_t  a_rtz, b_rtz, q_rtz, q_rto;
  logic ack;
  int   checks = 0;
  int   failures = 0;
  int   handshakes = 0;
  int   results [2];
  int   op_state_seen [9];
  int   vuln_q1 = 0;

  dimxs_and_top #(.BORDER_INV_C(1'b1)) dut (.a_rtz(a_rtz), .b_rtz(b_rtz), .q_rtz(q_rtz), .q_rto(q_rto));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (a=%b b=%b q_rtz=%b q_rto=%b)", what, $time, a_rtz, b_rtz, q_rtz, q_rto);
    end
  endtask

  // Operand symbol index as in the transition diagram: 0 spacer, 1 '0', 2 '1'.
  function automatic int sym(dr_t w);
    if (rtz_is_spacer(w)) return 0;
    return rtz_value(w) ? 2 : 1;
  endfunction

  // Sample after every change: output relations and operand-state coverage.
  task automatic observe();
    logic [3:0] mx;
    logic [1:0] aw, bw;
    #5;
    check(q_rto == ~q_rtz, "output borders agree");
    check(q_rtz != 2'b11, "invalid RTZ codeword");
    op_state_seen[3 * sym(a_rtz) + sym(b_rtz)]++;
    // Memorising C-elements at the border (their RTZ inputs differ).
    mx = dut.g_invc_border.u_and.mx;
    aw = ~a_rtz;
    bw = ~b_rtz;
    for (int k = 0; k < 4; k++)
      if (aw[k / 2 == 1 ? 1 : 0] != bw[k % 2] && mx[k]) vuln_q1++;
    #5;
  endtask

  // Receiver: 4-phase RTZ acknowledge with completion detection on q_rtz.
  initial begin
    ack = 1'b0;
    forever begin
      wait (q_rtz.d1 != q_rtz.d0);
      #20 ack = 1'b1;
      wait (q_rtz == 2'b00);
      #20 ack = 1'b0;
      handshakes++;
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic va, vb;
    int   first_in, first_out;
    results = '{0, 0};
    op_state_seen = '{default: 0};
    a_rtz = RTZ_SPACER;
    b_rtz = RTZ_SPACER;
    observe();
    for (int r = 0; r < ROUNDS; r++) begin
      if (r < 12) begin
        // Directed: all bit pairs with each arrival/departure order.
        va = r[0];
        vb = r[1];
        first_in  = r / 4;          // 0: A first, 1: B first, 2: together
        first_out = (r / 4 + 1) % 3;
      end else begin
        va = 1'($urandom);
        vb = 1'($urandom);
        first_in  = $urandom_range(2);
        first_out = $urandom_range(2);
      end
      wait (!ack);
      // Operands arrive.
      case (first_in)
        0: begin a_rtz = rtz_encode(va); observe();
                 check(rtz_is_spacer(q_rtz), "no result from one operand");
                 b_rtz = rtz_encode(vb); end
        1: begin b_rtz = rtz_encode(vb); observe();
                 check(rtz_is_spacer(q_rtz), "no result from one operand");
                 a_rtz = rtz_encode(va); end
        default: begin a_rtz = rtz_encode(va); b_rtz = rtz_encode(vb); end
      endcase
      observe();
      check(rtz_is_data(q_rtz) && rtz_value(q_rtz) == (va & vb), "AND result");
      if (rtz_is_data(q_rtz)) results[rtz_value(q_rtz)]++;
      wait (ack);
      // Operands return to the spacer.
      case (first_out)
        0: begin a_rtz = RTZ_SPACER; observe();
                 check(rtz_is_data(q_rtz) && rtz_value(q_rtz) == (va & vb), "result held");
                 b_rtz = RTZ_SPACER; end
        1: begin b_rtz = RTZ_SPACER; observe();
                 check(rtz_is_data(q_rtz) && rtz_value(q_rtz) == (va & vb), "result held");
                 a_rtz = RTZ_SPACER; end
        default: begin a_rtz = RTZ_SPACER; b_rtz = RTZ_SPACER; end
      endcase
      observe();
      check(rtz_is_spacer(q_rtz), "spacer restored");
    end
    wait (!ack);
    #10;
    $display("handshakes=%0d results0=%0d results1=%0d memorising_q1=%0d",
             handshakes, results[0], results[1], vuln_q1);
    check(handshakes == ROUNDS, "handshake count");
    check(results[0] > 0, "result '0' produced");
    check(results[1] > 0, "result '1' produced");
    check(vuln_q1 > 0, "memorising states with output 1 reached");
    for (int s = 1; s < 9; s++) begin
      check(op_state_seen[s] > 0, "operand state of the transition diagram visited");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

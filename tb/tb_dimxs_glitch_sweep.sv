// tb_dimxs_glitch_sweep: glitch-width sweep on the DIMxS AND built from the
// behavioural Martin C-element model.
//
// For every operand state the gate passes through in a 4-phase return-to-one
// cycle (all bit pairs, all arrival and departure orders), every C-element in
// a memorising state (its two inputs differ) receives a glitch on the input
// that still equals its output, pulling that input to the other value: a
// 1-to-0 glitch where the C-element holds 1, a 0-to-1 glitch where it holds
// 0. Glitch widths sweep 1 ps to 200 ps in 1 ps steps. An upset is a maxterm
// that differs from its value before the glitch once the circuit settled.
//
// Expected outcome: a C-element holding 1 is upset only by glitches wider
// than the model's 1-to-0 critical width (42 ps), one holding 0 already by
// glitches wider than the 0-to-1 critical width (22 ps). On the way from the
// spacer to data every memorising C-element of the DIMxS gate holds 1; the
// sweep also reports the states met on the way back to the spacer, where the
// C-element that fired holds 0 while its inputs differ. Widths equal to a
// critical width are swept but not checked, as their outcome depends on event
// ordering. Each scenario ends by returning both operands to the spacer.
`timescale 1ps / 1ps
module tb_dimxs_glitch_sweep;
  import dual_rail_pkg::*;

  localparam int unsigned W_UP  = 22;
  localparam int unsigned W_DN  = 42;
  localparam int unsigned W_MAX = 200;
  localparam int unsigned SETTLE = 300;

  dr_t a, b, q;
  int  checks = 0;
  int  failures = 0;
  int  scen_q1 = 0;
  int  scen_q0 = 0;
  int  scen_fwd_q0 = 0;
  int  upsets = 0;
  int  min_upset_q1 = W_MAX + 1;
  int  min_upset_q0 = W_MAX + 1;

  dimxs_and2 #(.TRANSIENT_MODEL(1'b1)) dut (.a(a), .b(b), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic dr_t enc(int s);
    // 0 spacer, 1 bit '0', 2 bit '1'.
    if (s == 0) return RTO_SPACER;
    return rto_encode(s == 2);
  endfunction

  // Wire of operand side (0: A, 1: B) and rail r.
  function automatic logic get_wire(int side, int r);
    dr_t w = side == 0 ? a : b;
    return r == 1 ? w.d1 : w.d0;
  endfunction

  task automatic set_wire(int side, int r, logic v);
    if (side == 0) begin
      if (r == 1) a.d1 = v; else a.d0 = v;
    end else begin
      if (r == 1) b.d1 = v; else b.d0 = v;
    end
  endtask

  // Play a path of operand states, then glitch one C-element's input.
  task automatic run(input int path_a [], input int path_b [], input int k,
                     input int width, input bit forward, output bit vulnerable,
                     output bit held, output bit upset);
    logic [3:0] mx_prev;
    int side, r;
    logic aw, bw;
    a = RTO_SPACER;
    b = RTO_SPACER;
    #(SETTLE);
    foreach (path_a[i]) begin
      a = enc(path_a[i]);
      b = enc(path_b[i]);
      #(SETTLE);
    end
    aw = k >= 2 ? a.d1 : a.d0;
    bw = k % 2 == 1 ? b.d1 : b.d0;
    vulnerable = (aw != bw);
    held = dut.mx[k];
    upset = 1'b0;
    if (vulnerable) begin
      // Glitch the input that equals the held output.
      if (aw == held) begin side = 0; r = k / 2; end
      else            begin side = 1; r = k % 2; end
      mx_prev = dut.mx;
      set_wire(side, r, !held);
      #(width);
      set_wire(side, r, held);
      #(SETTLE);
      upset = (dut.mx != mx_prev);
    end
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pa [], pb [];
    bit vul, held, ups;
    int va, vb, crit;
    for (int v = 0; v < 4; v++) begin
      va = v[1] ? 2 : 1;
      vb = v[0] ? 2 : 1;
      // Paths ending in each state of the cycle: arrival of A or B first,
      // both data, departure of A or B first.
      for (int p = 0; p < 5; p++) begin
        bit forward;
        case (p)
          0: begin pa = '{va};         pb = '{0};          forward = 1; end
          1: begin pa = '{0};          pb = '{vb};         forward = 1; end
          2: begin pa = '{va, va};     pb = '{0, vb};      forward = 1; end
          3: begin pa = '{va, va, 0};  pb = '{0, vb, vb};  forward = 0; end
          default: begin pa = '{va, va, va}; pb = '{0, vb, 0}; forward = 0; end
        endcase
        for (int k = 0; k < 4; k++) begin
          automatic int first_upset = W_MAX + 1;
          for (int w = 1; w <= W_MAX; w++) begin
            run(pa, pb, k, w, forward, vul, held, ups);
            if (!vul) break;
            crit = held ? W_DN : W_UP;
            if (w != crit) check(ups == (w > crit), "upset iff glitch wider than critical width");
            if (ups && first_upset > W_MAX) first_upset = w;
            if (ups) upsets++;
          end
          if (vul) begin
            if (held) begin
              scen_q1++;
              if (first_upset < min_upset_q1) min_upset_q1 = first_upset;
            end else begin
              scen_q0++;
              if (forward) scen_fwd_q0++;
              if (first_upset < min_upset_q0) min_upset_q0 = first_upset;
            end
          end
        end
      end
    end
    $display("memorising scenarios: %0d holding 1 (narrowest upsetting glitch %0d ps), %0d holding 0 (narrowest %0d ps); upsets %0d",
             scen_q1, min_upset_q1, scen_q0, min_upset_q0, upsets);
    check(scen_fwd_q0 == 0, "no C-element holds 0 on the way from spacer to data");
    check(scen_q1 > 0 && scen_q0 > 0, "both kinds of memorising state swept");
    check(min_upset_q1 >= int'(W_DN) && min_upset_q1 <= int'(W_DN) + 1, "critical width, output 1");
    check(min_upset_q0 >= int'(W_UP) && min_upset_q0 <= int'(W_UP) + 1, "critical width, output 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

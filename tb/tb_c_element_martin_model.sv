// tb_c_element_martin_model: self-checking testbench for the behavioural
// glitch model of the Martin C-element.
//
// Brings the model into each of the four memorising states (010, 100, 011,
// 101) and injects a glitch on the input that holds the opposite value: a
// 0-to-1 glitch where the output is 0, a 1-to-0 glitch where it is 1. Glitches
// 1 ps narrower than the critical width must leave the output unchanged, and
// glitches 1 ps wider must flip it and leave it flipped (an upset). It also
// checks that regular input changes reach the output after exactly the
// critical width of their direction, and that glitches in the states where
// both inputs agree with the output have no effect. Widths equal to the
// critical width are avoided, as their outcome depends on event ordering.
`timescale 1ps / 1ps
module tb_c_element_martin_model;

  localparam int unsigned W_UP = 22;
  localparam int unsigned W_DN = 42;

  logic a, b, q;
  int   checks = 0;
  int   failures = 0;
  int   upsets = 0;
  int   filtered = 0;

  c_element_martin_model #(.MIN_W_UP_PS(W_UP), .MIN_W_DOWN_PS(W_DN), .INIT(1'b0)) dut (
    .a(a), .b(b), .q(q)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (a=%b b=%b q=%b)", what, $time, a, b, q);
    end
  endtask

  // Settle both inputs to v and wait for the output.
  task automatic settle(input logic v);
    a = v;
    b = v;
    #200;
    check(q == v, "settle");
  endtask

  // From a settled q = !v state, move one input to v, then glitch the other
  // input to v for width ps. glitch_a selects which input carries the glitch.
  task automatic glitch(input logic v, input bit glitch_a, input int unsigned width, input bit expect_upset);
    settle(!v);
    if (glitch_a) b = v; else a = v;
    #100;
    check(q == !v, "memorising state holds");
    if (glitch_a) a = v; else b = v;
    #(width);
    if (glitch_a) a = !v; else b = !v;
    #200;
    if (expect_upset) begin
      check(q == v, "wide glitch latched");
      upsets++;
    end else begin
      check(q == !v, "narrow glitch filtered");
      filtered++;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    a = 1'b0;
    b = 1'b0;
    #200;
    check(q == 1'b0, "initial value");
    // Propagation of regular transitions: rising after W_UP, falling after W_DN.
    a = 1'b1; b = 1'b1; t0 = $time;
    wait (q == 1'b1);
    check($time - t0 == time'(W_UP), "rising latency");
    #100;
    a = 1'b0; b = 1'b0; t0 = $time;
    wait (q == 1'b0);
    check($time - t0 == time'(W_DN), "falling latency");
    #100;
    // 0-to-1 glitches in states 100 (glitch on B) and 010 (glitch on A).
    for (int s = 0; s < 2; s++) begin
      glitch(1'b1, s == 1, W_UP - 1, 1'b0);
      glitch(1'b1, s == 1, W_UP + 1, 1'b1);
      glitch(1'b1, s == 1, 1, 1'b0);
      glitch(1'b1, s == 1, 200, 1'b1);
    end
    // 1-to-0 glitches in states 101 (glitch on B) and 011 (glitch on A).
    for (int s = 0; s < 2; s++) begin
      glitch(1'b0, s == 1, W_DN - 1, 1'b0);
      glitch(1'b0, s == 1, W_DN + 1, 1'b1);
      glitch(1'b0, s == 1, W_UP + 1, 1'b0);
      glitch(1'b0, s == 1, 200, 1'b1);
    end
    // Glitches while the inputs force the output: no effect.
    settle(1'b1);
    a = 1'b0; #100; a = 1'b1; #200;
    check(q == 1'b1, "glitch in state 111");
    settle(1'b0);
    b = 1'b1; #100; b = 1'b0; #200;
    check(q == 1'b0, "glitch in state 000");
    check(upsets == 8 && filtered == 8, "glitch counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

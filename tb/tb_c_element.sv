// tb_c_element: self-checking testbench for the two-input C-element.
//
// Drives a long random sequence of input pairs, changing one or both inputs
// per step, and compares q with a reference written from the cell's truth
// table (output follows agreeing inputs, holds otherwise). It also records
// which static (A, B, Q) states were visited and requires all six of them:
// 000 and 111 (inputs force the output) and the four memorising states
// 010, 100, 011 and 101. A watchdog ends the run if it stalls.
`timescale 1ps / 1ps
module tb_c_element;

  logic a, b, q;
  logic q_ref;
  int   checks = 0;
  int   failures = 0;
  bit   seen [8];

  c_element dut (.a(a), .b(b), .q(q));

  task automatic step(input logic na, input logic nb);
    a = na;
    b = nb;
    #10;
    if (na == nb) q_ref = na;
    checks++;
    if (q !== q_ref) begin
      failures++;
      $display("FAIL a=%b b=%b q=%b expected %b", a, b, q, q_ref);
    end
    seen[{a, b, q}] = 1'b1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Initialise through agreeing inputs, as a spacer would.
    q_ref = 1'b0;
    step(1'b0, 1'b0);
    // Walk the state graph on both sides explicitly.
    step(1'b1, 1'b0); step(1'b1, 1'b1); step(1'b0, 1'b1); step(1'b0, 1'b0);
    step(1'b0, 1'b1); step(1'b1, 1'b1); step(1'b1, 1'b0); step(1'b0, 1'b0);
    repeat (2000) step(1'($urandom), 1'($urandom));
    foreach (seen[s]) begin
      // 110 and 001 are transient states and cannot persist.
      if (s != 6 && s != 1) begin
        checks++;
        if (!seen[s]) begin
          failures++;
          $display("FAIL static state %03b never visited", 3'(s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// inv_c_element: two-input inverted C-element.
//
// A C-element followed by an output inversion: the output goes to 0 when both
// inputs are 1, to 1 when both inputs are 0, and holds while they differ.
// Fed with return-to-zero wires it produces return-to-one values directly,
// which is why it suits the border between an RTZ and an RTO domain: an
// inverted C-element on two RTZ minterm inputs yields the RTO maxterm.
//
// The document names the cell and says its output is inverted; the latch
// formulation (enable = inputs agree, data = inverted input) is this
// design's own. Like c_element it has no reset pin and is initialised by a
// spacer at its inputs. The latch reported by synthesis is intended.
//
// Ports: a, b inputs; qn output. Timing: level sensitive, no clock.
`timescale 1ps / 1ps
module inv_c_element (
  input  logic a,
  input  logic b,
  output logic qn
);

  // Reset when both inputs are 1, set when both are 0, hold otherwise.
  always_latch begin
    if (a && b)        qn = 1'b0;
    else if (!a && !b) qn = 1'b1;
  end

endmodule

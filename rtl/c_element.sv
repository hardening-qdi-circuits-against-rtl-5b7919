// c_element: two-input Muller C-element.
//
// The output switches to 1 when both inputs are 1 and to 0 when both inputs
// are 0; while the inputs differ it keeps its previous value. At gate level
// this is a set/reset latch: set when both inputs are 1, reset when both
// are 0, which is how it is written here (always_latch). The
// latch, and the state-holding loop it stands for, is the intended behaviour
// of the cell: synthesis tools report it as a latch, and a real
// implementation maps it onto a C-element library cell.
//
// The document gives the cell's function and three transistor topologies;
// the latch formulation is this design's own. There is no reset pin: as in
// the document's delay-insensitive templates the cell is initialised by
// driving a spacer (both inputs equal) into it.
//
// Ports: a, b inputs; q output. Timing: purely combinational/level
// sensitive, q settles in the same time step as the inputs that agree.
`timescale 1ps / 1ps
module c_element (
  input  logic a,
  input  logic b,
  output logic q
);

  // Set when both inputs are 1, reset when both are 0, hold otherwise.
  always_latch begin
    if (a && b)        q = 1'b1;
    else if (!a && !b) q = 1'b0;
  end

endmodule

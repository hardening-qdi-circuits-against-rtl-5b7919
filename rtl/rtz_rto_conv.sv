// rtz_rto_conv: interface between a return-to-zero and a return-to-one
// domain for N one-of-two channels.
//
// The RTO value of every wire is the logical inverse of its RTZ value (the
// RTZ spacer all-0s becomes the RTO spacer all-1s, and an active-high data
// wire becomes an active-low one), so the conversion is one inverter per
// wire and works the same in both directions. The conversion is delay
// insensitive: each output wire depends on one input wire only.
//
// This is the document's construction; the channel count N and the use of
// the dual_rail_pkg struct are this design's own.
//
// Ports: din[N] channels in one domain, dout[N] the same channels in the
// other. Timing: combinational.
`timescale 1ps / 1ps
module rtz_rto_conv
  import dual_rail_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  dr_t din  [N],
  output dr_t dout [N]
);

  for (genvar i = 0; i < N; i++) begin : g_wire
    assign dout[i].d1 = !din[i].d1;
    assign dout[i].d0 = !din[i].d0;
  end

endmodule

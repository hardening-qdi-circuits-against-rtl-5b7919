// dual_rail_pkg: types and constants for 1-of-2 (dual-rail) delay-insensitive
// channels under the two 4-phase protocols used in this design.
//
// A 1-of-2 channel carries one bit on two wires, D.1 and D.0. Under
// return-to-zero (RTZ) the spacer is both wires at 0 and a bit is sent by
// raising one wire (D.1 for '1', D.0 for '0'). Under return-to-one (RTO) the
// spacer is both wires at 1 and a bit is sent by lowering one wire (D.1 for
// '1', D.0 for '0'). Both wires active at once is an invalid codeword. The
// RTO value of every wire is the inverse of its RTZ value, so one domain is
// converted to the other with one inverter per wire.
//
// The encodings follow the document's 1-of-2 code tables; the struct layout
// (d1 in the upper bit) and the helper functions are this design's own.
`timescale 1ps / 1ps
package dual_rail_pkg;

  // One 1-of-2 wire pair; packed as {d1, d0}.
  typedef struct packed {
    logic d1;
    logic d0;
  } dr_t;

  localparam dr_t RTZ_SPACER = '{d1: 1'b0, d0: 1'b0};
  localparam dr_t RTO_SPACER = '{d1: 1'b1, d0: 1'b1};

  // Codeword carrying bit v under RTZ.
  function automatic dr_t rtz_encode(input logic v);
    return '{d1: v, d0: !v};
  endfunction

  // Codeword carrying bit v under RTO.
  function automatic dr_t rto_encode(input logic v);
    return '{d1: !v, d0: v};
  endfunction

  // Valid data (not spacer, not invalid) under each protocol.
  function automatic logic rtz_is_data(input dr_t w);
    return w.d1 ^ w.d0;
  endfunction

  function automatic logic rto_is_data(input dr_t w);
    return w.d1 ^ w.d0;
  endfunction

  function automatic logic rtz_is_spacer(input dr_t w);
    return !w.d1 && !w.d0;
  endfunction

  function automatic logic rto_is_spacer(input dr_t w);
    return w.d1 && w.d0;
  endfunction

  // Bit carried by a valid codeword.
  function automatic logic rtz_value(input dr_t w);
    return w.d1;
  endfunction

  function automatic logic rto_value(input dr_t w);
    return !w.d1;
  endfunction

endpackage

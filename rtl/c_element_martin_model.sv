// c_element_martin_model: behavioural model (not synthesizable) of the
// transient-fault response of a two-input C-element, with defaults for the
// Martin transistor topology.
//
// A real C-element in a memorising state (inputs differ) can be upset by a
// glitch on the input that holds the opposite value: if the glitch is wide
// enough the output switches and stays switched (an SEU), if it is too narrow
// the output recovers. The model keeps the C-element function and adds an
// inertial filter: the output only takes the common value of the inputs once
// the inputs have agreed for at least a critical width. The width depends on
// the direction of the output change. A rising output (a 0-to-1 glitch in
// state 010 or 100) needs MIN_W_UP_PS, a falling output (a 1-to-0 glitch in
// state 011 or 101) needs MIN_W_DOWN_PS. The defaults, 22 ps and 42 ps, are
// the smallest SEU-producing glitch widths the document reports for the
// Martin C-element at full glitch height in a 65 nm process; glitch height
// is not modelled (every glitch is taken as full swing). Because regular
// data changes hold the inputs stable, they pass after the same widths,
// which therefore also act as the model's propagation delay. Nothing else of
// the analog behaviour (output SETs, charge, corners) is modelled.
//
// Ports: a, b inputs; q output. The output starts at INIT.
`timescale 1ps / 1ps
module c_element_martin_model #(
  parameter int unsigned MIN_W_UP_PS   = 22,
  parameter int unsigned MIN_W_DOWN_PS = 42,
  parameter bit          INIT          = 1'b1
) (
  input  logic a,
  input  logic b,
  output logic q
);

  int unsigned gen;
  logic        q_r;

  assign q = q_r;

  initial begin
    gen = 0;
    q_r = INIT;
  end

  // Every input change starts a new generation; a pending output change is
  // applied only if no input changed while it waited.
  always @(a or b) begin
    gen = gen + 1;
    if (a == b && a != q_r) begin
      fork
        begin
          automatic int unsigned my_gen = gen;
          automatic logic        v      = a;
          if (v) #(MIN_W_UP_PS);
          else   #(MIN_W_DOWN_PS);
          if (my_gen == gen) q_r = v;
        end
      join_none
    end
  end

endmodule

// tb_rtz_rto_conv: self-checking testbench for the RTZ/RTO domain interface.
//
// Applies every combination of wire values to two 1-of-2 channels and checks
// that each output wire is the inverse of its input wire, that an RTZ spacer
// becomes an RTO spacer, and that an RTZ data codeword becomes the RTO
// codeword of the same bit. A second instance converts the result back and
// must return the original channels. A watchdog ends the run if it stalls.
`timescale 1ps / 1ps
module tb_rtz_rto_conv;
  import dual_rail_pkg::*;

  localparam int unsigned N = 2;

  dr_t din [N];
  dr_t dmid [N];
  dr_t dback [N];
  int  checks = 0;
  int  failures = 0;

  rtz_rto_conv #(.N(N)) dut  (.din(din),  .dout(dmid));
  rtz_rto_conv #(.N(N)) dut2 (.din(dmid), .dout(dback));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      din[0] = dr_t'(v[1:0]);
      din[1] = dr_t'(v[3:2]);
      #10;
      for (int i = 0; i < N; i++) begin
        check(dmid[i].d1 == !din[i].d1 && dmid[i].d0 == !din[i].d0, "wire inversion");
        check(dback[i] == din[i], "round trip");
        if (din[i] == 2'b00) check(dmid[i] == 2'b11, "spacer mapping");
        if (din[i] == 2'b10) check(dmid[i] == 2'b01, "bit 1 mapping");
        if (din[i] == 2'b01) check(dmid[i] == 2'b10, "bit 0 mapping");
        if (rtz_is_data(din[i]))
          check(rto_is_data(dmid[i]) && rto_value(dmid[i]) == rtz_value(din[i]), "value kept");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

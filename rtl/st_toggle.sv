// st_toggle: two-phase toggle element.
//
// Every transition on in is passed on as a transition of one output,
// alternately out0 (first, third, ... event) and out1 (second, fourth, ...).
// It is built from two tlatch cells in a ring: the out0 latch is open while
// in = 1 and loads ~out1, the out1 latch is open while in = 0 and loads out0,
// so after each input event exactly one output has changed. cdn = 0 clears
// both outputs; in must be 0 when cdn is released.
//
// The ring of two latches is reported as a latch loop; it is the
// element's state and is intended.
`timescale 1ps/1ps
module st_toggle (
  input  logic cdn,
  input  logic in,
  output logic out0,
  output logic out1
);
  logic out1_n, in_n;
  assign out1_n = ~out1;
  assign in_n   = ~in;

  tlatch u_l0 (.cdn(cdn), .en(in),   .in(out1_n), .out(out0));
  tlatch u_l1 (.cdn(cdn), .en(in_n), .in(out0),   .out(out1));
endmodule

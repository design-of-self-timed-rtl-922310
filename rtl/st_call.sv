// st_call: two-phase call element.
//
// Two clients share one procedure. A request event on r1 or r2 is merged
// (exclusive-or) onto r, the procedure's request; the procedure's done event
// on d is returned to the client that called: d1 for r1, d2 for r2. The
// caller is remembered by its own pending handshake (r1 ^ d1 or r2 ^ d2),
// which opens a tlatch that copies the done event back to that client only.
// The clients must not call at the same time (use st_arbiter in front when
// they can). cdn = 0 clears the returns; all inputs must be 0 when it is
// released.
//
// The latches and the d1/d2 cross-coupling are reported as a loop; they
// are intended.
`timescale 1ps/1ps
module st_call (
  input  logic cdn,
  input  logic r1,
  input  logic r2,
  output logic d1,
  output logic d2,
  output logic r,
  input  logic d
);
  logic p1, p2, d1_next, d2_next;
  assign r  = r1 ^ r2;
  assign p1 = r1 ^ d1;
  assign p2 = r2 ^ d2;
  assign d1_next = d ^ d2;
  assign d2_next = d ^ d1;

  tlatch u_l1 (.cdn(cdn), .en(p1), .in(d1_next), .out(d1));
  tlatch u_l2 (.cdn(cdn), .en(p2), .in(d2_next), .out(d2));
endmodule

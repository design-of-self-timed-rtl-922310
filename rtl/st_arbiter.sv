// st_arbiter: two-phase arbiter.
//
// Two clients make requests as transitions on r1 and r2; the arbiter answers
// with a transition on g1 or g2, one client at a time, and the client ends
// its turn with a transition on d1 or d2. Inside, each client's pending
// request (r ^ d) is a level into an st_mutex; while a client holds the
// mutex its tlatch is open and copies r onto g, producing the grant event.
// The done event makes r ^ d fall, which frees the mutex for the other
// client. cdn = 0 clears everything; all inputs must be 0 when it is released.
//
// Latch and loop warnings come from the mutex and latch cells and are
// intended.
`timescale 1ps/1ps
module st_arbiter (
  input  logic cdn,
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2,
  input  logic d1,
  input  logic d2
);
  logic m1, m2, gl1, gl2;
  assign m1 = r1 ^ d1;
  assign m2 = r2 ^ d2;

  st_mutex u_mutex (.cdn(cdn), .r1(m1), .r2(m2), .g1(gl1), .g2(gl2));
  tlatch   u_l1    (.cdn(cdn), .en(gl1), .in(r1), .out(g1));
  tlatch   u_l2    (.cdn(cdn), .en(gl2), .in(r2), .out(g2));
endmodule

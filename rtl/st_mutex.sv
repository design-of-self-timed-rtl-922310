// st_mutex: two-way mutual exclusion element.
//
// Each client raises its request (r1, r2) and waits for its grant (g1, g2);
// at most one grant is high at any time. A grant is held until its request
// falls; the other waiting client is then granted. This is a four-phase
// (return-to-zero) element. When both requests arrive in the same
// simulation step, r1 wins: a real mutex resolves that case with a
// metastability filter, whose outcome is not predictable, so a user must not
// rely on the order. The grant state is held in a level-sensitive latch, so
// the element has no clock. cdn = 0 withdraws both grants.
//
// Lint and synthesis report latches with a loop through g1/g2: the grant
// state must feed back into itself, which is intended.
`timescale 1ps/1ps
module st_mutex (
  input  logic cdn,
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  always_latch begin
    if (!cdn) begin
      g1 = 1'b0;
      g2 = 1'b0;
    end else if (!g1 && !g2) begin
      if (r1)      g1 = 1'b1;
      else if (r2) g2 = 1'b1;
    end else if (g1 && !r1) begin
      g1 = 1'b0;
    end else if (g2 && !r2) begin
      g2 = 1'b0;
    end
  end

  // Rule of the element: never both grants.
  always_comb assert (!(g1 && g2)) else $error("st_mutex: both grants high");
endmodule

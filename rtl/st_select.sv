// st_select: two-phase select element.
//
// A transition on in is steered to out_t when sel = 1 and to out_f when
// sel = 0; sel must be stable while an event passes (bundled with in).
// Built from two tlatch cells: the out_t latch is open while sel = 1 and
// loads in ^ out_f, the out_f latch is open while sel = 0 and loads in ^ out_t,
// so out_t ^ out_f always equals in once settled and only the selected output
// changes. cdn = 0 clears both outputs; in must be 0 when cdn is released.
//
// The cross-coupled latches are reported as a loop; each output's latch
// needs the other's value, which is intended.
`timescale 1ps/1ps
module st_select (
  input  logic cdn,
  input  logic sel,
  input  logic in,
  output logic out_t,
  output logic out_f
);
  logic d_t, d_f, sel_n;
  assign d_t   = in ^ out_f;
  assign d_f   = in ^ out_t;
  assign sel_n = ~sel;

  tlatch u_lt (.cdn(cdn), .en(sel),   .in(d_t), .out(out_t));
  tlatch u_lf (.cdn(cdn), .en(sel_n), .in(d_f), .out(out_f));
endmodule

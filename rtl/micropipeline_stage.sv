// micropipeline_stage: one stage of the transparent-latch micropipeline,
// a Muller C-element and a DATA_W-bit transparent latch.
//
// The C-element joins the request from the left (req_l) with the inverted
// state of the next stage (right_n, i.e. ~c of the stage to the right, or
// ~out_ack at the end): c = C(req_l, right_n). c is both the acknowledge to
// the left and the request to the right. The latch is transparent while
// c = 0 and closes as c rises, so the stage captures the word that came
// with the request and holds it until c falls again.
//
// Both parts sit in one level-sensitive process: the latch is updated
// from its own stage's c before the C-element output changes. This is the
// same behaviour as a muller_c cell driving the enable of tlatch cells, but
// it keeps a zero-delay simulation free of the race between one stage's
// latch closing and the previous stage's latch opening, which in silicon
// is covered by the C-element's delay. The process is a latch with a
// feedback path through c, as every self-timed stage is; it has no clock.
// cdn = 0 empties the stage.
`timescale 1ps/1ps
module micropipeline_stage #(
  parameter int unsigned DATA_W = st_pkg::DATA_W
) (
  input  logic              cdn,
  input  logic              req_l,
  input  logic              right_n,
  input  logic [DATA_W-1:0] d,
  output logic              c,
  output logic [DATA_W-1:0] q
);
  always_latch begin
    if (!cdn) begin
      c = 1'b0;
      q = '0;
    end else begin
      if (!c)               q = d;      // transparent while empty
      if (req_l == right_n) c = req_l;  // Muller C-element
    end
  end
endmodule

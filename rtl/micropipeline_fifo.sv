// micropipeline_fifo: self-timed FIFO of STAGES transparent-latch
// micropipeline stages, DATA_W bits wide, bundled data.
//
// Each stage (micropipeline_stage) is a Muller C-element and a DATA_W-bit
// transparent latch. The C-element of stage i joins the request from the
// left (the previous stage's C-element output, or in_req) with the inverted
// state of the next stage (or out_ack):
//   c[i] = C(c[i-1], ~c[i+1]).
// Its output is both the acknowledge to the left and the request to the
// right, and it closes the stage's latch while high, so a word is captured
// as c[i] rises and released when c[i] falls. This is the simple four-phase
// control that transparent latches allow.
//
// Interface: four-phase bundled data on both sides. The sender sets in_data,
// raises in_req, waits for in_ack, lowers in_req and waits for in_ack to fall.
// out_req high means out_data is valid; the receiver raises out_ack, the FIFO
// lowers out_req, the receiver lowers out_ack. A four-phase pipeline of this
// kind separates words by empty stages, so STAGES stages hold up to STAGES/2
// words. The stage count and the width are the interface chip's; the
// four-phase protocol and the latch polarity are this design's choices.
// cdn = 0 empties the FIFO; in_req and out_ack must be 0 when it is released.
// No delays are modelled: the bundling constraint (data settles before the
// request) is met by the sender driving in_data no later than in_req.
//
// Loop warnings through c[] are the handshake between neighbouring
// stages and are intended.
`timescale 1ps/1ps
module micropipeline_fifo #(
  parameter int unsigned DATA_W = st_pkg::DATA_W,
  parameter int unsigned STAGES = st_pkg::FIFO_STAGES
) (
  input  logic              cdn,
  input  logic              in_req,
  output logic              in_ack,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_req,
  input  logic              out_ack,
  output logic [DATA_W-1:0] out_data
);
  logic              c [STAGES];  // C-element outputs
  logic [DATA_W-1:0] q [STAGES];  // stage latches

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    logic              req_l, right_n;
    logic [DATA_W-1:0] d;
    if (i == 0) begin : g_first
      assign req_l = in_req;
      assign d     = in_data;
    end else begin : g_mid
      assign req_l = c[i-1];
      assign d     = q[i-1];
    end
    if (i == STAGES-1) begin : g_last
      assign right_n = ~out_ack;
    end else begin : g_notlast
      assign right_n = ~c[i+1];
    end

    micropipeline_stage #(.DATA_W(DATA_W)) u_stage (
      .cdn(cdn), .req_l(req_l), .right_n(right_n), .d(d), .c(c[i]), .q(q[i])
    );
  end

  assign in_ack   = c[0];
  assign out_req  = c[STAGES-1];
  assign out_data = q[STAGES-1];
endmodule

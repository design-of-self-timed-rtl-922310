// pcc_fsm: self-timed controller of the pausible-clock interface.
//
// It links the requester's two-phase Req/Ack channel, the FIFO's output
// handshake, the mutex that guards the local clock, and the synchronous
// module. One transfer, for each transition of req:
//   1. S_IDLE -> S_MREQ when a request is pending (req != ack): raise mreq
//      to the mutex.
//   2. S_MREQ -> S_HOLD on grant: the clock is now held low.
//   3. S_HOLD -> S_HANDED once the FIFO shows a word (fifo_req = 1): xfer is
//      toggled to announce the transfer to the synchronous side, the request
//      is acknowledged (ack = req), and mreq is dropped. If the word is
//      still on its way through the FIFO, the clock stays paused until it
//      arrives, so the synchronous side never samples a word in flight.
//   4. S_HANDED -> S_WAIT when the grant falls: the clock runs again, its
//      low phase stretched by the time the controller held the mutex.
//   5. S_WAIT -> S_POP when the synchronous side has taken the word
//      (taken == xfer): raise fifo_ack.
//   6. S_POP -> S_IDLE when the FIFO drops fifo_req: drop fifo_ack.
// The word stays at the FIFO head until the synchronous side has taken it,
// so the requester may make its next request as soon as it sees ack; that
// request waits in S_IDLE until the previous transfer is finished.
// The controller has no clock. Its state is held in level-sensitive latches
// that change only on input transitions (a Huffman-style machine); the
// state sequence and its encoding are this design's choices. cdn = 0 resets
// it to S_IDLE with xfer = ack = 0.
//
// Latch and loop warnings on state, xfer and ack are intended: they are
// the machine's state.
`timescale 1ps/1ps
module pcc_fsm
  import st_pkg::*;
(
  input  logic cdn,
  input  logic req,
  output logic ack,
  input  logic fifo_req,
  output logic fifo_ack,
  output logic mreq,
  input  logic grant,
  output logic xfer,
  input  logic taken,
  output pcc_state_t state
);
  always_latch begin
    if (!cdn) begin
      state = S_IDLE;
      xfer  = 1'b0;
      ack   = 1'b0;
    end else begin
      unique case (state)
        S_IDLE:   if (req != ack && !grant) state = S_MREQ;
        S_MREQ:   if (grant) state = S_HOLD;
        S_HOLD:   if (fifo_req) begin
                    state = S_HANDED;
                    xfer  = ~xfer;
                    ack   = req;
                  end
        S_HANDED: if (!grant) state = S_WAIT;
        S_WAIT:   if (taken == xfer) state = S_POP;
        S_POP:    if (!fifo_req) state = S_IDLE;
        default:  state = S_IDLE;
      endcase
    end
  end

  assign mreq     = (state == S_MREQ) || (state == S_HOLD);
  assign fifo_ack = (state == S_POP);
endmodule

// st_pkg: constants and types shared by the self-timed interface.
//
// DATA_W and FIFO_STAGES are the interface width and the micropipeline depth
// of the 32-bit interface chip. pcc_state_t is the state encoding of the
// self-timed controller (pcc_fsm) that sits between the requester, the mutex
// of the pausible clock and the synchronous module; the encoding is this
// design's own choice.
`timescale 1ps/1ps
package st_pkg;
  localparam int unsigned DATA_W      = 32;
  localparam int unsigned FIFO_STAGES = 4;

  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,  // no transfer pending
    S_MREQ    = 3'd1,  // asking the mutex for the clock
    S_HOLD    = 3'd5,  // clock held, waiting for the word at the FIFO head
    S_HANDED  = 3'd2,  // clock held, transfer announced, releasing mutex
    S_WAIT    = 3'd3,  // clock running, waiting for the synchronous side
    S_POP     = 3'd4   // acknowledging the FIFO head word
  } pcc_state_t;
endpackage

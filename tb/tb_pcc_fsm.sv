// tb_pcc_fsm: runs the self-timed controller against models of its
// neighbours: a mutex that grants after a random delay, a FIFO head that
// drops its request after fifo_ack and presents the next word later (or
// not at all, to make the controller wait), and a synchronous side that
// copies xfer to taken after a random delay. Checks, event by event, that
// the controller asks for the mutex only with a request pending, keeps it
// while the FIFO has no word, announces a transfer only while it holds the
// grant and a word is present, pops the
// FIFO only after the word was taken, pops exactly one word per request,
// and acknowledges every request once, while it holds the clock.
`timescale 1ps/1ps
module tb_pcc_fsm;
  import st_pkg::*;
  localparam int N = 200;

  logic cdn, req, ack, fifo_req, fifo_ack, mreq, grant, xfer, taken;
  pcc_state_t state;
  int checks = 0, failures = 0;
  int words_avail = 0, pops = 0, acks = 0, announces = 0, waited_for_word = 0;

  pcc_fsm dut (
    .cdn(cdn), .req(req), .ack(ack), .fifo_req(fifo_req), .fifo_ack(fifo_ack),
    .mreq(mreq), .grant(grant), .xfer(xfer), .taken(taken), .state(state)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mutex model
  always @(mreq) begin
    #($urandom_range(1, 40));
    grant = mreq;
  end

  // synchronous side model: taken follows xfer a little later
  always @(xfer) if (cdn) begin
    #($urandom_range(50, 500));
    taken = xfer;
  end

  // FIFO head model
  always @(posedge fifo_ack) begin
    #($urandom_range(1, 20));
    fifo_req = 0;
    pops++;
  end
  always @(negedge fifo_ack) begin
    wait (words_avail > pops);
    #($urandom_range(1, 20));
    fifo_req = 1;
  end

  // protocol checks
  always @(posedge mreq) if (cdn) chk(req != ack, "mreq without pending request");
  always @(xfer) if (cdn) begin
    announces++;
    chk(grant, "xfer changed without the grant");
    chk(fifo_req, "xfer changed without a word at the FIFO head");
  end
  always @(posedge fifo_ack) chk(taken == xfer && !grant, "pop before the word was taken");
  always @(ack) if (cdn) begin
    acks++;
    chk(grant && xfer != taken, "ack outside the clock pause");
    chk(pops == acks - 1, "previous word popped before the next request is served");
  end

  initial begin
    cdn = 0; req = 0; grant = 0; taken = 0; fifo_req = 0;
    #100;
    chk(ack == 0 && mreq == 0 && fifo_ack == 0 && xfer == 0 && state == S_IDLE, "reset");
    cdn = 1;
    for (int i = 0; i < N; i++) begin
      if (i % 10 == 3) begin
        // request first, word later: the controller must wait
        while (state != S_IDLE) #1;
        req = ~req;
        #300;
        chk(state == S_HOLD && mreq && grant, "holds the clock while waiting for a word");
        waited_for_word++;
        words_avail++;
        if (!fifo_req && !fifo_ack) fifo_req = 1;
      end else begin
        words_avail++;
        if (!fifo_req && !fifo_ack) fifo_req = 1;
        #($urandom_range(0, 50));
        req = ~req;
      end
      wait (ack == req);
      #($urandom_range(0, 50));
    end
    #1000;
    chk(acks == N, "every request acknowledged");
    chk(pops == N, "every word popped");
    chk(announces == N, "every transfer announced");
    chk(waited_for_word > 0, "empty-FIFO wait exercised");
    $display("acks %0d pops %0d announces %0d", acks, pops, announces);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

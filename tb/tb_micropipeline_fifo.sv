// tb_micropipeline_fifo: a four-phase sender pushes random 32-bit words and
// a four-phase receiver pops them with random stalls. Checks the order and
// value of every word, the capacity of STAGES/2 words when the receiver
// stops, and the handshake rule that out_req never falls before out_ack
// rises.
`timescale 1ps/1ps
module tb_micropipeline_fifo;
  import st_pkg::*;
  localparam int unsigned N = 300;

  logic              cdn, in_req, in_ack, out_req, out_ack;
  logic [DATA_W-1:0] in_data, out_data;
  logic [DATA_W-1:0] sent [$];
  int checks = 0, failures = 0;
  int pushed = 0, popped = 0;
  bit stall = 0;

  micropipeline_fifo dut (
    .cdn(cdn), .in_req(in_req), .in_ack(in_ack), .in_data(in_data),
    .out_req(out_req), .out_ack(out_ack), .out_data(out_data)
  );

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired (pushed %0d popped %0d c=%b in_req=%b out_ack=%b)", pushed, popped, {dut.c[0],dut.c[1],dut.c[2],dut.c[3]}, in_req, out_ack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge out_req) if (cdn) begin
    checks++;
    if (!out_ack) begin failures++; $display("FAIL out_req fell without out_ack"); end
  end

  task automatic push(input logic [DATA_W-1:0] w);
    in_data = w;
    sent.push_back(w);
    #1 in_req = 1;
    while (!in_ack) #1;
    pushed++;
    #1 in_req = 0;
    while (in_ack) #1;
  endtask

  task automatic pop();
    logic [DATA_W-1:0] exp;
    while (!out_req) #1;
    #($urandom_range(1, 3));
    exp = sent.pop_front();
    checks++;
    if (out_data !== exp) begin
      failures++;
      $display("FAIL word %0d: got %h expected %h", popped, out_data, exp);
    end
    popped++;
    out_ack = 1;
    while (out_req) #1;
    #($urandom_range(0, 3)) out_ack = 0;
  endtask

  initial begin
    cdn = 0; in_req = 0; out_ack = 0; in_data = '0; #10; cdn = 1; #10;
    checks++;
    if (in_ack !== 0 || out_req !== 0) begin failures++; $display("FAIL reset"); end

    // capacity: with no receiver the FIFO accepts STAGES/2 words, then stalls
    fork
      begin
        for (int i = 0; i < FIFO_STAGES; i++) push($urandom);
      end
      begin
        #1000;
      end
    join_any
    checks++;
    if (pushed != FIFO_STAGES / 2) begin
      failures++; $display("FAIL capacity: accepted %0d words", pushed);
    end
    $display("words held with receiver stopped: %0d", pushed);
    // drain and let the blocked pushes finish
    fork
      begin
        wait (pushed == FIFO_STAGES);
      end
      begin
        while (popped < FIFO_STAGES) pop();
      end
    join
    wait (popped == FIFO_STAGES);

    // streaming with random stalls on both sides
    fork
      begin
        for (int i = 0; i < N; i++) begin
          #($urandom_range(0, 5));
          push($urandom);
        end
      end
      begin
        while (popped < FIFO_STAGES + N) begin
          #($urandom_range(0, 8));
          pop();
        end
      end
    join
    checks++;
    if (sent.size() != 0 || pushed != popped) begin failures++; $display("FAIL %0d words left", sent.size()); end
    $display("pushed %0d popped %0d", pushed, popped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

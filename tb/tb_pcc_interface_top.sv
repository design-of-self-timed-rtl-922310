// tb_pcc_interface_top: end-to-end test of the self-timed interface at its
// default size (32-bit words, 4-stage FIFO, 2.2 GHz local clock).
//
// A sender model pushes words into the FIFO and, for each word, makes a
// transition on req and waits for the matching transition on ack. The
// bench checks that every word reaches data_out in order with one
// data_valid strobe, that the word counter and the acknowledge count match,
// that the local clock runs at its 450 ps period when nothing holds it,
// that the controller only announces a transfer and acknowledges the
// request while it holds the mutex with the clock low, and that each transfer ends within a few clock
// cycles. It also makes each mechanism happen and counts it: the FIFO
// filling up and stalling the sender, a request arriving before its word
// (the controller holds the clock paused until the word arrives, so the
// clock's low phase is stretched), the controller waiting for the clock to
// give up the mutex, and the clock being stopped with run = 0 and
// restarted. A mechanism that never happened counts as a failure. Before
// the clock starts, it also gives each library cell beside the interface one
// short check.
`timescale 1ps/1ps
module tb_pcc_interface_top;
  import st_pkg::*;
  localparam int N        = 60;
  localparam int PERIOD   = 450;

  logic              rst_n, run, in_req, in_ack, req, ack, sysclk, data_valid;
  logic [DATA_W-1:0] in_data, data_out;
  logic [15:0]       word_count;
  logic [2:0]        ctrl_state;
  logic lib_c_in1, lib_c_in2, lib_c_out, lib_latch_en, lib_latch_in, lib_latch_out;
  logic lib_toggle_in, lib_toggle_out0, lib_toggle_out1;
  logic lib_select_sel, lib_select_in, lib_select_out_t, lib_select_out_f;
  logic lib_call_r1, lib_call_r2, lib_call_d1, lib_call_d2, lib_call_r, lib_call_d;
  logic lib_arb_r1, lib_arb_r2, lib_arb_g1, lib_arb_g2, lib_arb_d1, lib_arb_d2;

  logic [DATA_W-1:0] words [N];
  int checks = 0, failures = 0;
  int pushed = 0, received = 0, acks = 0;
  int n_fifo_full = 0, n_word_late = 0, n_wait_clock = 0, n_clock_stop = 0;
  int max_xfer_cycles = 0;
  bit hold_sender = 0, late_word = 0;

  pcc_interface_top dut (
    .rst_n(rst_n), .run(run), .in_req(in_req), .in_ack(in_ack), .in_data(in_data),
    .req(req), .ack(ack), .sysclk(sysclk), .data_out(data_out),
    .data_valid(data_valid), .word_count(word_count), .ctrl_state(ctrl_state),
    .lib_c_in1(lib_c_in1), .lib_c_in2(lib_c_in2), .lib_c_out(lib_c_out),
    .lib_latch_en(lib_latch_en), .lib_latch_in(lib_latch_in), .lib_latch_out(lib_latch_out),
    .lib_toggle_in(lib_toggle_in), .lib_toggle_out0(lib_toggle_out0), .lib_toggle_out1(lib_toggle_out1),
    .lib_select_sel(lib_select_sel), .lib_select_in(lib_select_in),
    .lib_select_out_t(lib_select_out_t), .lib_select_out_f(lib_select_out_f),
    .lib_call_r1(lib_call_r1), .lib_call_r2(lib_call_r2), .lib_call_d1(lib_call_d1),
    .lib_call_d2(lib_call_d2), .lib_call_r(lib_call_r), .lib_call_d(lib_call_d),
    .lib_arb_r1(lib_arb_r1), .lib_arb_r2(lib_arb_r2), .lib_arb_g1(lib_arb_g1),
    .lib_arb_g2(lib_arb_g2), .lib_arb_d1(lib_arb_d1), .lib_arb_d2(lib_arb_d2)
  );

  // one short pass over each library cell next to the interface
  int n_lib = 0;
  task automatic library_pass();
    lib_c_in1 = 1; #5; chk(lib_c_out == 0, "lib C-element waits");
    lib_c_in2 = 1; #5; chk(lib_c_out == 1, "lib C-element fires"); n_lib++;
    lib_latch_in = 1; lib_latch_en = 1; #5; lib_latch_en = 0; lib_latch_in = 0; #5;
    chk(lib_latch_out == 1, "lib latch holds"); n_lib++;
    lib_toggle_in = 1; #5; lib_toggle_in = 0; #5;
    chk(lib_toggle_out0 == 1 && lib_toggle_out1 == 1, "lib toggle two events"); n_lib++;
    lib_select_sel = 0; lib_select_in = 1; #5;
    chk(lib_select_out_f == 1 && lib_select_out_t == 0, "lib select steers"); n_lib++;
    lib_call_r2 = 1; #5; chk(lib_call_r == 1, "lib call request");
    lib_call_d = 1; #5; chk(lib_call_d2 == 1 && lib_call_d1 == 0, "lib call returns to caller"); n_lib++;
    lib_arb_r1 = 1; lib_arb_r2 = 1; #5;
    chk(lib_arb_g1 != lib_arb_g2, "lib arbiter grants one");
    if (lib_arb_g1) lib_arb_d1 = 1; else lib_arb_d2 = 1;
    #5; chk(lib_arb_g1 == 1 && lib_arb_g2 == 1, "lib arbiter grants the other after done"); n_lib++;
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired: pushed %0d received %0d acks %0d state %0d",
             pushed, received, acks, ctrl_state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver side: collect words on the strobe
  always @(posedge sysclk) if (rst_n && data_valid) begin
    chk(received < N && data_out == words[received], "word order/value");
    received++;
  end

  // sampled monitor (1 ps): rules and mechanism counters
  logic p_xfer, p_rclk, p_mreq;
  realtime t_rclk_fall = 0;
  bit stopped_in_phase = 0;
  int n_stretch = 0;
  always #1 if (rst_n) begin
    // a low phase longer than half a period, with run = 1 throughout, is a
    // clock pause caused by the controller holding the mutex
    if (!run) stopped_in_phase = 1;
    if (p_rclk && !dut.rclk) begin
      t_rclk_fall = $realtime;
      stopped_in_phase = !run;
    end
    if (!p_rclk && dut.rclk && !stopped_in_phase && $realtime - t_rclk_fall > PERIOD / 2 + 2)
      n_stretch++;
    if (dut.mreq && !p_mreq && dut.rclk) n_wait_clock++;
    chk(!(dut.grant && dut.rclk), "mutex exclusion");
    p_xfer = dut.xfer; p_rclk = dut.rclk; p_mreq = dut.mreq;
  end

  // a transfer is announced only while the controller holds the mutex
  int announces = 0;
  always @(dut.xfer) if (rst_n) begin
    announces++;
    chk(dut.grant && !dut.rclk, "xfer changed outside the clock pause");
  end

  // the request is acknowledged while the clock is paused
  always @(ack) if (rst_n) chk(dut.grant && !dut.rclk, "ack outside the clock pause");

  // sender: FIFO side
  task automatic push(input logic [DATA_W-1:0] w);
    int waited = 0;
    in_data = w;
    #1 in_req = 1;
    while (!in_ack) begin #1; waited++; end
    if (waited > 5) n_fifo_full++;
    pushed++;
    #1 in_req = 0;
    while (in_ack) #1;
  endtask

  initial begin
    for (int i = 0; i < N; i++) words[i] = $urandom;
    rst_n = 0; run = 0; in_req = 0; req = 0; in_data = '0;
    {lib_c_in1, lib_c_in2, lib_latch_en, lib_latch_in, lib_toggle_in, lib_select_sel,
     lib_select_in, lib_call_r1, lib_call_r2, lib_call_d, lib_arb_r1, lib_arb_r2,
     lib_arb_d1, lib_arb_d2} = '0;
    p_xfer = 0; p_rclk = 0; p_mreq = 0;
    #1000;
    chk(ack == 0 && in_ack == 0 && word_count == 0 && data_valid == 0, "reset");
    rst_n = 1;
    #100;
    chk(sysclk == 0, "clock idle while run = 0");
    library_pass();
    run = 1;

    // free-running clock period
    begin
      realtime t0;
      @(posedge sysclk); t0 = $realtime;
      repeat (4) @(posedge sysclk);
      chk($realtime - t0 == 4 * PERIOD, "free-running period 450 ps (2.2 GHz)");
    end

    fork
      // pusher: words 10..19 are pushed only after a pause, so the
      // requester runs ahead; words 30..39 are pushed at full speed while
      // the requester waits, so the FIFO fills
      begin
        for (int i = 0; i < N; i++) begin
          if (i == 10) #2000;
          push(words[i]);
          #($urandom_range(0, 20));
        end
      end
      // requester
      begin
        for (int i = 0; i < N; i++) begin
          int cycles;
          realtime t0;
          if (i == 30) #3000;
          if (i == 45) begin
            // stop the clock while idle, then restart
            int edges = 0;
            run = 0;
            #500;
            fork
              begin forever begin @(posedge sysclk); edges++; end end
              #2000;
            join_any
            disable fork;
            chk(edges == 0, "clock stopped while run = 0");
            if (edges == 0) n_clock_stop++;
            run = 1;
          end
          if (pushed <= i) n_word_late++;
          t0 = $realtime;
          req = ~req;
          while (ack != req) #1;
          acks++;
          // once the word is at the FIFO head a transfer takes at most a few
          // clock cycles
          if (pushed > i || i < 10 || i >= 20) begin
            cycles = int'(($realtime - t0) / PERIOD);
            if (cycles > max_xfer_cycles) max_xfer_cycles = cycles;
          end
          #($urandom_range(0, 600));
        end
      end
    join

    #2000;
    chk(received == N, "all words received");
    chk(int'(word_count) == N, "word counter");
    chk(acks == N, "all requests acknowledged");
    chk(announces == N, "one announcement per transfer");
    chk(max_xfer_cycles <= 4, "transfer latency within 4 clock cycles");
    chk(n_fifo_full > 0,  "mechanism: FIFO full stalls the sender");
    chk(n_word_late > 0,  "mechanism: request before its word");
    chk(n_wait_clock > 0, "mechanism: controller waits for the clock to release the mutex");
    chk(n_clock_stop > 0, "mechanism: clock stopped and restarted");
    chk(n_stretch > 0,    "mechanism: clock paused until the word reached the FIFO head");
    chk(n_lib == 6, "every library cell exercised");
    $display("fifo_full=%0d word_late=%0d wait_clock=%0d clock_stop=%0d stretch=%0d max_cycles=%0d",
             n_fifo_full, n_word_late, n_wait_clock, n_clock_stop, n_stretch, max_xfer_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// pcc_interface_top: self-timed 32-bit interface between a sender (a CPU)
// and a synchronous IP block with its own local clock.
//
// Data path: the sender pushes words into a 4-stage transparent-latch
// micropipeline FIFO (micropipeline_fifo) with a four-phase handshake
// (in_req/in_ack/in_data). Control path: for each word the sender makes a
// transition on req; the IP block answers with a transition on ack once the
// word has been accepted. Inside the IP block the self-timed controller
// (pcc_fsm) sees req != ack and asks the mutex (st_mutex) for the clock.
// The mutex's other client is the ring-oscillator clock generator
// (clock_generator): while the controller holds the grant, rclk cannot
// rise, so the local clock is paused. The controller keeps the pause until
// the word is at the FIFO head, then toggles xfer and answers ack, and
// releases the mutex. The synchronous module (sync_logic_module) sees the
// xfer toggle at the next rising sysclk edge without any risk of
// metastability, loads the FIFO head word onto data_out and pulses
// data_valid. Once its taken flag follows, the controller pops the word
// from the FIFO.
//
// This is the pausible-clocking arrangement of the interface chip: FIFO,
// self-timed FSM, mutual exclusion and clock generator around a synchronous
// logic module. The sequencing inside the controller and the
// synchronous module's behaviour are this design's choices.
// rst_n (active low) clears every cell; run = 0 stops the local clock while
// the block is idle.
//
// Beside the interface, the top carries one instance of each of the other
// elements of the self-timed cell library (C-element, transparent latch,
// toggle, select, call, arbiter), each with its own lib_* ports and sharing
// only rst_n. They are not part of the interface's data or control path;
// they stand next to it so that the whole library is present in one design.
//
// Loop warnings through the mutex, the oscillator and the controller are
// intended: the clock ring is closed through the mutex by design. The
// library cells beside the interface report the loops of their own latches.
`timescale 1ps/1ps
module pcc_interface_top #(
  parameter int unsigned DATA_W = st_pkg::DATA_W,
  parameter int unsigned STAGES = st_pkg::FIFO_STAGES,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              rst_n,
  input  logic              run,
  // sender side of the FIFO (four-phase, bundled data)
  input  logic              in_req,
  output logic              in_ack,
  input  logic [DATA_W-1:0] in_data,
  // sender's transfer channel (two-phase)
  input  logic              req,
  output logic              ack,
  // IP block outputs
  output logic              sysclk,
  output logic [DATA_W-1:0] data_out,
  output logic              data_valid,
  output logic [CNT_W-1:0]  word_count,
  // controller state, for observation (encoding in st_pkg::pcc_state_t)
  output logic [2:0]        ctrl_state,
  // self-timed cell library, side by side with the interface
  input  logic              lib_c_in1,
  input  logic              lib_c_in2,
  output logic              lib_c_out,
  input  logic              lib_latch_en,
  input  logic              lib_latch_in,
  output logic              lib_latch_out,
  input  logic              lib_toggle_in,
  output logic              lib_toggle_out0,
  output logic              lib_toggle_out1,
  input  logic              lib_select_sel,
  input  logic              lib_select_in,
  output logic              lib_select_out_t,
  output logic              lib_select_out_f,
  input  logic              lib_call_r1,
  input  logic              lib_call_r2,
  output logic              lib_call_d1,
  output logic              lib_call_d2,
  output logic              lib_call_r,
  input  logic              lib_call_d,
  input  logic              lib_arb_r1,
  input  logic              lib_arb_r2,
  output logic              lib_arb_g1,
  output logic              lib_arb_g2,
  input  logic              lib_arb_d1,
  input  logic              lib_arb_d2
);
  import st_pkg::*;

  logic              fifo_req, fifo_ack;
  logic [DATA_W-1:0] fifo_data;
  logic              mreq, grant, clk_req, rclk;
  logic              xfer, taken;
  pcc_state_t        fsm_state;

  assign ctrl_state = fsm_state;

  micropipeline_fifo #(.DATA_W(DATA_W), .STAGES(STAGES)) u_fifo (
    .cdn(rst_n), .in_req(in_req), .in_ack(in_ack), .in_data(in_data),
    .out_req(fifo_req), .out_ack(fifo_ack), .out_data(fifo_data)
  );

  pcc_fsm u_fsm (
    .cdn(rst_n), .req(req), .ack(ack), .fifo_req(fifo_req), .fifo_ack(fifo_ack),
    .mreq(mreq), .grant(grant), .xfer(xfer), .taken(taken), .state(fsm_state)
  );

  // r1/g1: clock side, r2/g2: controller side
  st_mutex u_mutex (.cdn(rst_n), .r1(clk_req), .r2(mreq), .g1(rclk), .g2(grant));

  clock_generator u_clkgen (.run(run), .rclk(rclk), .clk_req(clk_req), .sysclk(sysclk));

  sync_logic_module #(.DATA_W(DATA_W), .CNT_W(CNT_W)) u_sync (
    .clk(sysclk), .rst_n(rst_n), .xfer(xfer), .fifo_data(fifo_data),
    .taken(taken), .data_out(data_out), .data_valid(data_valid),
    .word_count(word_count)
  );

  // self-timed cell library
  muller_c   u_lib_c      (.in1(lib_c_in1), .in2(lib_c_in2), .cdn(rst_n), .out(lib_c_out));
  tlatch     u_lib_latch  (.cdn(rst_n), .en(lib_latch_en), .in(lib_latch_in), .out(lib_latch_out));
  st_toggle  u_lib_toggle (.cdn(rst_n), .in(lib_toggle_in), .out0(lib_toggle_out0), .out1(lib_toggle_out1));
  st_select  u_lib_select (.cdn(rst_n), .sel(lib_select_sel), .in(lib_select_in),
                           .out_t(lib_select_out_t), .out_f(lib_select_out_f));
  st_call    u_lib_call   (.cdn(rst_n), .r1(lib_call_r1), .r2(lib_call_r2), .d1(lib_call_d1),
                           .d2(lib_call_d2), .r(lib_call_r), .d(lib_call_d));
  st_arbiter u_lib_arb    (.cdn(rst_n), .r1(lib_arb_r1), .r2(lib_arb_r2), .g1(lib_arb_g1),
                           .g2(lib_arb_g2), .d1(lib_arb_d1), .d2(lib_arb_d2));
endmodule

// clock_generator: behavioural model of the local clock of the IP block,
// a ring oscillator made of an inverter chain.
//
// This is a behavioural model, not synthesizable logic: an oscillator's
// frequency is set by gate delays, which only a timed model can express.
// The ring is closed through the clock side of the mutex (st_mutex):
// clk_req is the inverted rclk delayed by the chain, it goes to the mutex
// as a request, and the mutex grant comes back as rclk. While the other
// mutex client holds the grant, rclk cannot rise, so the low phase of the
// clock is stretched (the clock pauses) until the mutex is released.
// sysclk is rclk after a buffer delay and clocks the synchronous module.
//
// Timing: each phase lasts N_INV * T_INV_PS picoseconds when nothing pauses
// the clock. The defaults give 225 ps per phase, a 450 ps period, that is
// about 2.2 GHz, the clock rate the interface chip reaches; the split into
// inverter count and inverter delay is this model's own. run = 0 stops the
// ring with rclk low, which is how the clock is shut down while the block
// is idle to save power.
//
// Synthesis warns that the delayed assignments' sensitivity becomes @*;
// this model is for simulation only.
`timescale 1ps/1ps
module clock_generator #(
  parameter int unsigned N_INV     = 5,
  parameter int unsigned T_INV_PS  = 45,
  parameter int unsigned T_BUF_PS  = 20
) (
  input  logic run,
  input  logic rclk,
  output logic clk_req,
  output logic sysclk
);
  localparam int unsigned HalfPs = N_INV * T_INV_PS;  // 225 ps with defaults

  initial begin
    clk_req = 1'b0;
    sysclk  = 1'b0;
  end

  always @(rclk or run) clk_req <= #(HalfPs) (run & ~rclk);
  always @(rclk)        sysclk  <= #(T_BUF_PS) rclk;
endmodule

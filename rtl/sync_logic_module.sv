// sync_logic_module: the synchronous part of the IP block, clocked by the
// paused-able local clock sysclk.
//
// The self-timed controller announces a transfer by toggling xfer while the
// clock is held, so xfer always meets set-up and hold at the next rising
// edge. On that edge the module sees xfer != taken, loads the FIFO's head
// word (fifo_data, held valid by the controller until it is told the word is
// taken) into data_out, pulses data_valid for one cycle, counts the word and
// toggles taken to match xfer. taken tells the controller that it may pop
// the word. What the IP block does with the word is not defined; this module
// stands for it with the register, the strobe and the counter.
// rst_n is an asynchronous active-low reset.
`timescale 1ps/1ps
module sync_logic_module #(
  parameter int unsigned DATA_W = st_pkg::DATA_W,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              xfer,
  input  logic [DATA_W-1:0] fifo_data,
  output logic              taken,
  output logic [DATA_W-1:0] data_out,
  output logic              data_valid,
  output logic [CNT_W-1:0]  word_count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taken      <= 1'b0;
      data_out   <= '0;
      data_valid <= 1'b0;
      word_count <= '0;
    end else begin
      data_valid <= 1'b0;
      if (xfer != taken) begin
        data_out   <= fifo_data;
        data_valid <= 1'b1;
        word_count <= word_count + 1'b1;
        taken      <= xfer;
      end
    end
  end
endmodule

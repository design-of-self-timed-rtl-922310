// tb_sync_logic_module: drives a free clock and announces transfers by
// toggling xfer between edges, each time with a new word on fifo_data.
// Checks that the word is loaded at the next rising edge, that data_valid
// is a one-cycle strobe, that taken follows xfer after one edge, and the
// word count.
`timescale 1ps/1ps
module tb_sync_logic_module;
  import st_pkg::*;
  logic              clk, rst_n, xfer, taken, data_valid;
  logic [DATA_W-1:0] fifo_data, data_out;
  logic [15:0]       word_count;
  int checks = 0, failures = 0;
  int sent = 0, valids = 0;

  sync_logic_module dut (
    .clk(clk), .rst_n(rst_n), .xfer(xfer), .fifo_data(fifo_data),
    .taken(taken), .data_out(data_out), .data_valid(data_valid),
    .word_count(word_count)
  );

  initial clk = 0;
  always #225 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && data_valid) valids++;

  initial begin
    logic [DATA_W-1:0] w;
    rst_n = 0; xfer = 0; fifo_data = '0;
    #1000;
    chk(taken == 0 && data_valid == 0 && word_count == 0, "reset");
    @(negedge clk) rst_n = 1;
    repeat (200) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      w = $urandom;
      fifo_data = w;
      xfer = ~xfer;
      sent++;
      #1 chk(taken != xfer, "taken before edge");
      @(posedge clk); #1;
      chk(taken == xfer, "taken after edge");
      chk(data_out == w, "word loaded");
      chk(data_valid == 1, "strobe high");
      chk(word_count == 16'(sent), "count");
      @(posedge clk); #1;
      chk(data_valid == 0, "strobe one cycle");
      chk(data_out == w, "word held");
    end
    chk(valids == sent, "strobe count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

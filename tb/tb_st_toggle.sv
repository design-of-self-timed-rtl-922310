// tb_st_toggle: sends input events into the toggle and checks that they
// come out alternately on out0 and out1, one output change per event.
`timescale 1ps/1ps
module tb_st_toggle;
  logic cdn, in, out0, out1;
  logic e0, e1;
  int checks = 0, failures = 0;
  int events;

  st_toggle dut (.cdn(cdn), .in(in), .out0(out0), .out1(out1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cdn = 0; in = 0; #10; cdn = 1; #10;
    checks++;
    if (out0 !== 1'b0 || out1 !== 1'b0) begin failures++; $display("FAIL reset"); end
    e0 = 0; e1 = 0; events = 0;
    repeat (64) begin
      in = ~in; events++; #10;
      // odd events flip out0, even events flip out1
      if (events % 2 == 1) e0 = ~e0; else e1 = ~e1;
      checks++;
      if (out0 !== e0 || out1 !== e1) begin
        failures++;
        $display("FAIL event %0d: out0=%0b out1=%0b expected %0b %0b", events, out0, out1, e0, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

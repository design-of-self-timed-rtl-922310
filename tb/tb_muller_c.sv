// tb_muller_c: checks the Muller C-element against its rule (output follows
// the inputs when they agree, holds otherwise, clears on cdn = 0) over a
// random input sequence, plus the clear and a directed hold sequence.
`timescale 1ps/1ps
module tb_muller_c;
  logic in1, in2, cdn, out;
  logic expected;
  int checks = 0, failures = 0;

  muller_c dut (.in1(in1), .in2(in2), .cdn(cdn), .out(out));

  task automatic check(input logic exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: out=%0b expected %0b (in1=%0b in2=%0b)", what, out, exp, in1, in2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cdn = 0; in1 = 1; in2 = 1; #10;
    check(1'b0, "clear dominates");
    in1 = 0; in2 = 0; #10; cdn = 1; #10;
    check(1'b0, "after clear");
    // directed: rise only when both high, fall only when both low
    in1 = 1; #10; check(1'b0, "hold low, in1 only");
    in2 = 1; #10; check(1'b1, "rise");
    in1 = 0; #10; check(1'b1, "hold high, in1 low");
    in1 = 1; #10; check(1'b1, "still high");
    in2 = 0; #10; check(1'b1, "hold high, in2 low");
    in1 = 0; #10; check(1'b0, "fall");
    expected = 1'b0;
    repeat (400) begin
      in1 = 1'($urandom); in2 = 1'($urandom); #10;
      if (in1 == in2) expected = in1;
      check(expected, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

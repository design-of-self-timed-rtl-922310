// tb_tlatch: checks the transparent latch: follows in while en = 1, holds
// while en = 0, clears on cdn = 0, on directed and random sequences.
`timescale 1ps/1ps
module tb_tlatch;
  logic cdn, en, in, out;
  logic expected;
  int checks = 0, failures = 0;

  tlatch dut (.cdn(cdn), .en(en), .in(in), .out(out));

  task automatic check(input logic exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: out=%0b expected %0b (en=%0b in=%0b cdn=%0b)", what, out, exp, en, in, cdn);
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
    cdn = 0; en = 1; in = 1; #10;
    check(1'b0, "clear with en high");
    cdn = 1; #10; check(1'b1, "transparent after clear released");
    in = 0; #10;  check(1'b0, "transparent follows 0");
    in = 1; #10;  check(1'b1, "transparent follows 1");
    en = 0; #10;  check(1'b1, "closed holds 1");
    in = 0; #10;  check(1'b1, "closed ignores in");
    en = 1; #10;  check(1'b0, "reopen loads 0");
    en = 0; in = 1; #10; check(1'b0, "closed holds 0");
    cdn = 0; #10; en = 1; #10; check(1'b0, "clear holds under en");
    cdn = 1; #10;
    expected = out;
    repeat (400) begin
      if ($urandom_range(0, 15) == 0) cdn = 0; else cdn = 1;
      en = 1'($urandom); in = 1'($urandom); #10;
      if (!cdn) expected = 1'b0;
      else if (en) expected = in;
      check(expected, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_st_select: sends input events with a random Boolean and checks that
// each event reaches only the output the Boolean selects; changing sel
// between events must change nothing.
`timescale 1ps/1ps
module tb_st_select;
  logic cdn, sel, in, out_t, out_f;
  logic et, ef;
  int checks = 0, failures = 0;

  st_select dut (.cdn(cdn), .sel(sel), .in(in), .out_t(out_t), .out_f(out_f));

  task automatic check(input string what);
    checks++;
    if (out_t !== et || out_f !== ef) begin
      failures++;
      $display("FAIL %s: out_t=%0b out_f=%0b expected %0b %0b", what, out_t, out_f, et, ef);
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
    cdn = 0; in = 0; sel = 0; #10; cdn = 1; #10;
    et = 0; ef = 0; check("reset");
    repeat (200) begin
      sel = 1'($urandom); #10;
      check("sel change alone");
      in = ~in; #10;
      if (sel) et = ~et; else ef = ~ef;
      check("event");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_st_mutex: two clients follow the four-phase request/grant rule with
// random timing. Checks mutual exclusion, that a grant goes to the first
// requester (to r1 when both arrive together), that a waiting client is
// granted as soon as the other releases, and that grants fall with their
// requests.
`timescale 1ps/1ps
module tb_st_mutex;
  logic cdn, r1, r2, g1, g2;
  logic e1, e2;   // expected grants
  int checks = 0, failures = 0;
  int contended = 0;

  st_mutex dut (.cdn(cdn), .r1(r1), .r2(r2), .g1(g1), .g2(g2));

  task automatic check(input string what);
    checks++;
    if (g1 !== e1 || g2 !== e2) begin
      failures++;
      $display("FAIL %s: r=%0b%0b g=%0b%0b expected %0b%0b", what, r1, r2, g1, g2, e1, e2);
    end
  endtask

  // reference: free mutex grants r1 first, then r2; a grant lasts until its
  // request falls
  task automatic model();
    if (e1 && !r1) e1 = 0;
    if (e2 && !r2) e2 = 0;
    if (!e1 && !e2) begin
      if (r1) e1 = 1; else if (r2) e2 = 1;
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cdn = 0; r1 = 0; r2 = 0; e1 = 0; e2 = 0; #10; cdn = 1; #10;
    check("reset");
    // simultaneous requests: r1 wins, r2 waits, then gets it
    r1 = 1; r2 = 1; #10; e1 = 1; check("tie");
    r1 = 0; #10; e1 = 0; e2 = 1; check("hand-over");
    r2 = 0; #10; e2 = 0; check("release");
    repeat (500) begin
      // a client may raise only when its grant is low, and lower only
      // when granted (four-phase rule)
      if (!r1 && !r2 && !g1 && !g2 && $urandom_range(0, 3) == 0) begin
        r1 = 1; r2 = 1;   // simultaneous requests
      end else if ($urandom_range(0, 1) == 0) begin
        if (!r1 && !g1) r1 = 1'($urandom); else if (r1 && g1) r1 = 1'($urandom);
      end else begin
        if (!r2 && !g2) r2 = 1'($urandom); else if (r2 && g2) r2 = 1'($urandom);
      end
      #10;
      model();
      if (r1 && r2) contended++;
      check("random");
      checks++;
      if (g1 && g2) begin failures++; $display("FAIL both granted"); end
    end
    checks++;
    if (contended == 0) begin failures++; $display("FAIL no contention exercised"); end
    $display("contended steps: %0d", contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

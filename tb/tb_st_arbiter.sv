// tb_st_arbiter: two two-phase clients request a shared resource at random
// times and hold it for random times. Checks that no two clients hold the
// resource together, that every request is granted once, and that both
// clients get turns while they compete.
`timescale 1ps/1ps
module tb_st_arbiter;
  logic cdn, r1, r2, g1, g2, d1, d2;
  int checks = 0, failures = 0;
  int grants1 = 0, grants2 = 0, both_waiting = 0;
  bit done_flag = 0;

  st_arbiter dut (.cdn(cdn), .r1(r1), .r2(r2), .g1(g1), .g2(g2), .d1(d1), .d2(d2));

  // client i holds the resource between its grant event and its done event
  wire hold1 = (g1 == r1) && (d1 != r1);
  wire hold2 = (g2 == r2) && (d2 != r2);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(hold1 or hold2) if (cdn) begin
    checks++;
    if (hold1 && hold2) begin failures++; $display("FAIL both clients hold the resource"); end
  end

  task automatic client1();
    repeat (100) begin
      #($urandom_range(1, 30));
      r1 = ~r1;
      #1;
      if (r2 != d2) both_waiting++;
      wait (g1 == r1);
      grants1++;
      #($urandom_range(1, 30));
      d1 = r1;
    end
  endtask

  task automatic client2();
    repeat (100) begin
      #($urandom_range(1, 30));
      r2 = ~r2;
      wait (g2 == r2);
      grants2++;
      #($urandom_range(1, 30));
      d2 = r2;
    end
  endtask

  initial begin
    cdn = 0; r1 = 0; r2 = 0; d1 = 0; d2 = 0; #10; cdn = 1; #10;
    checks++;
    if (g1 !== 0 || g2 !== 0) begin failures++; $display("FAIL reset"); end
    fork
      client1();
      client2();
    join
    #10;
    checks++;
    if (grants1 != 100 || grants2 != 100) begin
      failures++; $display("FAIL grants %0d %0d", grants1, grants2);
    end
    checks++;
    if (both_waiting == 0) begin failures++; $display("FAIL no competition exercised"); end
    $display("grants %0d/%0d, competing requests %0d", grants1, grants2, both_waiting);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

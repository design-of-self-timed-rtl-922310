// tb_st_call: two clients call a shared procedure in random order; a
// procedure model answers each request event on r with a done event on d.
// Checks that every request reaches r and that the done event returns to
// the caller only.
`timescale 1ps/1ps
module tb_st_call;
  logic cdn, r1, r2, d1, d2, r, d;
  logic r_prev;
  int checks = 0, failures = 0;

  st_call dut (.cdn(cdn), .r1(r1), .r2(r2), .d1(d1), .d2(d2), .r(r), .d(d));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cdn = 0; r1 = 0; r2 = 0; d = 0; #10; cdn = 1; #10;
    checks++;
    if (d1 !== 0 || d2 !== 0 || r !== 0) begin failures++; $display("FAIL reset"); end
    repeat (200) begin
      logic who;
      logic d1_before, d2_before;
      who = 1'($urandom);
      r_prev = r; d1_before = d1; d2_before = d2;
      if (who) r1 = ~r1; else r2 = ~r2;
      #10;
      checks++;
      if (r === r_prev) begin failures++; $display("FAIL request did not reach r"); end
      checks++;
      if (d1 !== d1_before || d2 !== d2_before) begin failures++; $display("FAIL early done"); end
      d = ~d; #10;   // procedure completes
      checks++;
      if (who ? (d1 === d1_before || d2 !== d2_before) : (d2 === d2_before || d1 !== d1_before)) begin
        failures++;
        $display("FAIL done returned to wrong client (caller %0d)", who ? 1 : 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

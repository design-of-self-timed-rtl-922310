// tb_clock_generator: closes the oscillator ring through a simple hold gate
// standing in for the mutex (rclk follows clk_req unless the bench holds
// the clock). Checks the free-running phase length (225 ps, a 450 ps period,
// about 2.2 GHz), the sysclk buffer delay, that holding stretches the low
// phase until release, and that run = 0 stops the clock low.
`timescale 1ps/1ps
module tb_clock_generator;
  localparam int HALF = 225;
  localparam int TBUF = 20;

  logic run, rclk, clk_req, sysclk, hold;
  int checks = 0, failures = 0;
  realtime t_rise [$];
  realtime t_fall [$];
  realtime t_srise [$];

  clock_generator dut (.run(run), .rclk(rclk), .clk_req(clk_req), .sysclk(sysclk));

  // stand-in for the mutex: a rising request is granted unless held
  always_comb rclk = clk_req & ~hold;

  always @(posedge rclk)   t_rise.push_back($realtime);
  always @(negedge rclk)   t_fall.push_back($realtime);
  always @(posedge sysclk) t_srise.push_back($realtime);

  task automatic expect_eq(input realtime got, input realtime exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0t expected %0t", what, got, exp);
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
    realtime t0;
    int n;
    run = 0; hold = 0;
    #1000;
    checks++;
    if (rclk !== 0 || sysclk !== 0) begin failures++; $display("FAIL clock runs while stopped"); end
    t_rise.delete(); t_fall.delete(); t_srise.delete();
    run = 1;
    #5000;
    // free running: every phase HALF long
    n = t_rise.size();
    checks++;
    if (n < 10) begin failures++; $display("FAIL only %0d rising edges", n); end
    for (int i = 1; i < n; i++) expect_eq(t_rise[i] - t_rise[i-1], 2 * HALF, "period");
    for (int i = 0; i < t_fall.size() && i < n; i++) expect_eq(t_fall[i] - t_rise[i], HALF, "high phase");
    for (int i = 0; i < t_srise.size() && i < n; i++) expect_eq(t_srise[i] - t_rise[i], TBUF, "sysclk buffer");
    // pause: hold the clock for 1000 ps right after a falling edge
    @(negedge rclk);
    t0 = $realtime;
    hold = 1;
    #1000;
    checks++;
    if (rclk !== 0) begin failures++; $display("FAIL clock not held"); end
    hold = 0;
    @(posedge rclk);
    expect_eq($realtime - t0, 1000, "stretched low phase ends at release");
    @(negedge rclk);
    @(posedge rclk);
    t0 = $realtime;
    @(posedge rclk);
    expect_eq($realtime - t0, 2 * HALF, "period after pause");
    // stop
    run = 0;
    #2000;
    n = t_rise.size();
    #2000;
    checks++;
    if (t_rise.size() != n || rclk !== 0) begin failures++; $display("FAIL clock did not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

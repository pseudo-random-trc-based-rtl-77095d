// Self-checking testbench for scan_cycle_timer with the default scan chain
// length of 8 (scan cycle of 9 clocks) and with a chain of 3 flip-flops.
// Checked every clock against a separately kept cycle count: the pulse comes
// in the first test-mode clock after reset and then every SCAN_LEN+1 clocks,
// lasts one clock, scan_pos counts 0..SCAN_LEN, and nothing moves while
// test_mode is 0.
module scan_cycle_timer_tb;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       test_mode;
  logic       nsc_a, nsc_b;
  logic [3:0] pos_a;
  logic [1:0] pos_b;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  scan_cycle_timer dut_a (.clk(clk), .rst_n(rst_n), .test_mode(test_mode),
                          .new_scan_cycle(nsc_a), .scan_pos(pos_a));
  scan_cycle_timer #(.SCAN_LEN(3)) dut_b (.clk(clk), .rst_n(rst_n), .test_mode(test_mode),
                          .new_scan_cycle(nsc_b), .scan_pos(pos_b));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int clocks, pulses_a, pulses_b, held_a, held_b;
    rst_n = 1'b0;
    test_mode = 1'b0;
    repeat (2) @(negedge clk);
    check(nsc_a == 0 && nsc_b == 0, "no pulse in reset");
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(nsc_a == 0 && nsc_b == 0, "no pulse before test mode");
    test_mode = 1'b1;
    clocks = 0; pulses_a = 0; pulses_b = 0;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      check(nsc_a == (clocks % 9 == 0), "pulse every 9 clocks");
      check(nsc_b == (clocks % 4 == 0), "pulse every 4 clocks");
      check(pos_a == 4'(clocks % 9), "scan position, chain of 8");
      check(pos_b == 2'(clocks % 4), "scan position, chain of 3");
      pulses_a += nsc_a;
      pulses_b += nsc_b;
      clocks++;
    end
    check(pulses_a == 7 && pulses_b == 15, "number of pulses in 60 clocks");
    held_a = pos_a; held_b = pos_b;
    test_mode = 1'b0;
    repeat (4) begin
      @(negedge clk);
      check(nsc_a == 0 && nsc_b == 0, "no pulse while test mode is off");
      check(pos_a == 4'(held_a) && pos_b == 2'(held_b), "position holds");
    end
    test_mode = 1'b1;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      check(nsc_a == (clocks % 9 == 0), "pulse every 9 clocks after resuming");
      check(nsc_b == (clocks % 4 == 0), "pulse every 4 clocks after resuming");
      clocks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

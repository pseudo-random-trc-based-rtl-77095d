// End-to-end testbench of trc_tpg_top with every parameter at its default:
// 6-bit counter in three 2-bit segments (64 patterns), scan chain of 8
// flip-flops (scan cycle of 9 clocks), tristate/latch select lines.
//
// After reset the generator runs for three full counter periods, pauses for
// a few clocks with test_mode low, runs again, and is reset once more in the
// middle of a run. trc_tpg_scoreboard checks every clock against its own
// model. At the end the testbench requires that every mechanism happened:
// both segment cascades, new scan cycles, all four select values, a counter
// wrap-around after exactly 64 patterns, and a hold with test_mode low. It
// also reports the average number of bits changed per clock.
module trc_tpg_top_tb;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       test_mode;
  logic       scan_in;
  logic [5:0] pattern;
  logic       nsc;
  logic [1:0] sel;
  logic [2:0] seg_step;
  logic [3:0] scan_pos;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  trc_tpg_top dut (
    .clk              (clk),
    .rst_n            (rst_n),
    .test_mode        (test_mode),
    .scan_in_o        (scan_in),
    .pattern_o        (pattern),
    .new_scan_cycle_o (nsc),
    .sel_o            (sel),
    .seg_step_o       (seg_step),
    .scan_pos_o       (scan_pos)
  );

  trc_tpg_scoreboard #(.SEG_W(2), .NSEG(3), .SCAN_LEN(8)) sb (
    .clk (clk), .rst_n (rst_n), .test_mode (test_mode), .scan_in (scan_in),
    .pattern (pattern), .new_scan_cycle (nsc), .sel (sel), .seg_step (seg_step),
    .scan_pos (scan_pos)
  );

  task automatic require(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int first_wrap;
    rst_n = 1'b0;
    test_mode = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    test_mode = 1'b1;
    // One complete period: the pattern must come back to 0 after 64 clocks.
    first_wrap = 0;
    for (int t = 1; t <= 64; t++) begin
      @(negedge clk);
      if (pattern == 0 && first_wrap == 0) first_wrap = t;
    end
    require(first_wrap == 64, $sformatf("first return to zero after 64 clocks (got %0d)",
                                        first_wrap));
    repeat (2 * 64) @(negedge clk);
    test_mode = 1'b0;
    repeat (7) @(negedge clk);
    test_mode = 1'b1;
    repeat (40) @(negedge clk);
    #2 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (30) @(negedge clk);

    require(sb.cascades[1] > 0, "segment 1 cascade happened");
    require(sb.cascades[2] > 0, "segment 2 cascade happened");
    require(sb.scan_cycles > 0, "new scan cycles happened");
    for (int i = 0; i < 4; i++)
      require(sb.sel_used[i] > 0, $sformatf("select value %0d used", i));
    require(sb.wraps > 0, "counter wrapped around");
    require(sb.held_clocks > 0, "test mode hold happened");
    $display("mechanisms: cascades seg1=%0d seg2=%0d, scan cycles=%0d, select use=%0d/%0d/%0d/%0d, wraps=%0d, held clocks=%0d",
             sb.cascades[1], sb.cascades[2], sb.scan_cycles, sb.sel_used[0], sb.sel_used[1],
             sb.sel_used[2], sb.sel_used[3], sb.wraps, sb.held_clocks);
    $display("switching: %0d counter bit changes and %0d scan-in changes in %0d clocks",
             sb.pattern_flips, sb.scan_in_flips, sb.clocks);
    checks += sb.checks;
    failures += sb.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + sb.checks, failures + sb.failures);
    $finish;
  end

endmodule

// End-to-end testbench of two other builds of trc_tpg_top, each against
// trc_tpg_scoreboard:
//  - the 6-bit counter split into two 3-bit segments (SEG_W=3, NSEG=2), whose
//    period is 36 patterns, with a scan chain of 6 flip-flops (a 7-clock scan cycle, coprime with 36);
//  - the default counter with the select lines held by flip-flops instead of
//    latches (HOLD_FLOP), the earlier form of the generator.
// Both run for more than two counter periods with a pause in test mode; the
// testbench requires the 36-pattern period, the cascade of the second segment,
// and all four select values in both builds.
module trc_tpg_variants_tb;
  import trc_tpg_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic test_mode;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic       si_a, nsc_a, si_b, nsc_b;
  logic [5:0] pat_a, pat_b;
  logic [1:0] sel_a, sel_b, step_a;
  logic [2:0] pos_a, step_b;
  logic [3:0] pos_b;

  trc_tpg_top #(.SEG_W(3), .NSEG(2), .SCAN_LEN(6)) dut_a (
    .clk(clk), .rst_n(rst_n), .test_mode(test_mode), .scan_in_o(si_a), .pattern_o(pat_a),
    .new_scan_cycle_o(nsc_a), .sel_o(sel_a), .seg_step_o(step_a), .scan_pos_o(pos_a));
  trc_tpg_scoreboard #(.SEG_W(3), .NSEG(2), .SCAN_LEN(6), .SEL_FLOP(1'b0)) sb_a (
    .clk(clk), .rst_n(rst_n), .test_mode(test_mode), .scan_in(si_a), .pattern(pat_a),
    .new_scan_cycle(nsc_a), .sel(sel_a), .seg_step(step_a), .scan_pos(pos_a));

  trc_tpg_top #(.HOLD(HOLD_FLOP)) dut_b (
    .clk(clk), .rst_n(rst_n), .test_mode(test_mode), .scan_in_o(si_b), .pattern_o(pat_b),
    .new_scan_cycle_o(nsc_b), .sel_o(sel_b), .seg_step_o(step_b), .scan_pos_o(pos_b));
  trc_tpg_scoreboard #(.SEG_W(2), .NSEG(3), .SCAN_LEN(8), .SEL_FLOP(1'b1)) sb_b (
    .clk(clk), .rst_n(rst_n), .test_mode(test_mode), .scan_in(si_b), .pattern(pat_b),
    .new_scan_cycle(nsc_b), .sel(sel_b), .seg_step(step_b), .scan_pos(pos_b));

  task automatic require(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int wrap_a;
    rst_n = 1'b0;
    test_mode = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    test_mode = 1'b1;
    wrap_a = 0;
    for (int t = 1; t <= 36; t++) begin
      @(negedge clk);
      if (pat_a == 0 && wrap_a == 0) wrap_a = t;
    end
    require(wrap_a == 36, $sformatf("36-pattern period (got %0d)", wrap_a));
    repeat (50) @(negedge clk);
    test_mode = 1'b0;
    repeat (5) @(negedge clk);
    test_mode = 1'b1;
    repeat (150) @(negedge clk);
    require(sb_a.cascades[1] > 0 && sb_b.cascades[2] > 0, "segment cascades happened");
    for (int i = 0; i < 4; i++) begin
      require(sb_a.sel_used[i] > 0, $sformatf("3-bit segments: select value %0d used", i));
      require(sb_b.sel_used[i] > 0, $sformatf("flip-flop form: select value %0d used", i));
    end
    require(sb_a.held_clocks > 0 && sb_a.wraps > 0 && sb_b.wraps > 0, "hold and wrap happened");
    checks += sb_a.checks + sb_b.checks;
    failures += sb_a.failures + sb_b.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

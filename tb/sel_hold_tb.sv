// Self-checking testbench for sel_hold, both storage forms side by side.
//
// The latch form must follow d1/d0 only while clk and new_scan_cycle are both
// high, and hold otherwise: the testbench changes d1/d0 in each of the four
// phases (clock high or low, pulse on or off) and checks the lines. The
// flip-flop form must take d1/d0 only at a rising clock edge at which
// new_scan_cycle is 1. Both reset to 0.
module sel_hold_tb;
  import trc_tpg_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic nsc;
  logic d1, d0;
  logic l1, l0, f1, f0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  sel_hold #(.HOLD(HOLD_LATCH)) dut_l (.clk(clk), .rst_n(rst_n), .new_scan_cycle(nsc),
                                       .d1(d1), .d0(d0), .s1(l1), .s0(l0));
  sel_hold #(.HOLD(HOLD_FLOP))  dut_f (.clk(clk), .rst_n(rst_n), .new_scan_cycle(nsc),
                                       .d1(d1), .d0(d0), .s1(f1), .s0(f0));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [1:0] lat_ref, flop_ref;

  initial begin
    rst_n = 1'b0;
    nsc = 1'b1;
    d1 = 1'b1; d0 = 1'b1;
    @(posedge clk); #1;
    check({l1, l0} == 2'b00 && {f1, f0} == 2'b00, "reset holds lines at 0");
    @(negedge clk);
    rst_n = 1'b1;
    nsc = 1'b0;
    lat_ref = 2'b00; flop_ref = 2'b00;
    for (int t = 0; t < 200; t++) begin
      logic [1:0] v;
      logic       p;
      v = 2'($urandom_range(0, 3));
      p = ($urandom_range(0, 2) == 0);
      // Low phase: change the pulse and the data; the latch must not move.
      {d1, d0} = v;
      nsc = p;
      #2;
      check({l1, l0} == lat_ref, "latch closed while clock low");
      @(posedge clk);
      // Flip-flop form: captures the data present at the edge if the pulse was 1.
      if (p) flop_ref = v;
      #1;
      check({f1, f0} == flop_ref, "flip-flop form captures at the edge");
      if (p) lat_ref = v;
      check({l1, l0} == lat_ref, "latch open while clock and pulse high");
      // High phase: new data passes through only if the pulse is on.
      v = 2'($urandom_range(0, 3));
      {d1, d0} = v;
      #1;
      if (p) lat_ref = v;
      check({l1, l0} == lat_ref, "latch follows data while open");
      check({f1, f0} == flop_ref, "flip-flop form ignores data between edges");
      @(negedge clk);
      // After the clock falls the latch keeps the last value seen.
      {d1, d0} = ~v;
      #1;
      check({l1, l0} == lat_ref, "latch holds after the clock falls");
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

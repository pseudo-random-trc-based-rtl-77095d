// Self-checking testbench for multiseg_trc.
//
// Two counters run side by side: the default 6-bit counter in three 2-bit
// segments (64 patterns) and a 6-bit counter in two 3-bit segments (36
// patterns). The reference keeps, per segment, the index of its Johnson state
// (0 .. 2*SEG_W-1) and moves the next segment on when a segment leaves its
// all-ones index SEG_W; each index is turned into its bit code independently
// of the shift structure. Checked every clock: the state, the step flags, that
// at most NSEG bits change per clock, that the state returns to zero exactly
// after (2*SEG_W)**NSEG clocks with every pattern in between distinct, and that
// the counter holds while test_mode is 0. The first values after reset of the
// default counter are 0, 2, 3, and 11, 13, 12 follow later in that order.
module multiseg_trc_tb;
  import trc_tpg_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic test_mode;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic [5:0] qa, qb;
  logic [2:0] stepa;
  logic [1:0] stepb;

  multiseg_trc #(.SEG_W(2), .NSEG(3)) dut_a (
    .clk(clk), .rst_n(rst_n), .test_mode(test_mode), .q(qa), .seg_step(stepa));
  multiseg_trc #(.SEG_W(3), .NSEG(2)) dut_b (
    .clk(clk), .rst_n(rst_n), .test_mode(test_mode), .q(qb), .seg_step(stepb));

  // Bit code of Johnson index d in a w-bit segment that fills from its top bit.
  function automatic int unsigned jcode(int unsigned d, int unsigned w);
    if (d <= w) return ((1 << d) - 1) << (w - d);
    else        return (1 << (2 * w - d)) - 1;
  endfunction

  function automatic int unsigned ref_state(int unsigned idx[], int unsigned w);
    int unsigned s = 0;
    foreach (idx[i]) s |= jcode(idx[i], w) << (i * w);
    return s;
  endfunction

  // Advance the index model by one clock; returns the step flags.
  function automatic int unsigned ref_step(ref int unsigned idx[], input int unsigned w,
                                           input bit en);
    bit carry = en;
    int unsigned flags = 0;
    foreach (idx[i]) begin
      bit leaves_all_ones = (idx[i] == w);
      if (carry) flags |= 1 << i;
      if (carry) idx[i] = (idx[i] + 1) % (2 * w);
      carry = carry && leaves_all_ones;
    end
    return flags;
  endfunction

  function automatic int popcount(int unsigned v);
    int c = 0;
    for (int i = 0; i < 32; i++) c += (v >> i) & 1;
    return c;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int unsigned ia[] = '{0, 0, 0};
  int unsigned ib[] = '{0, 0};
  int unsigned seq_a[$];
  int          period_a, period_b;
  int          max_flip_a, max_flip_b;
  bit          seen_a[64], seen_b[64];
  bit          distinct_a, distinct_b;

  initial begin
    int unsigned fa, fb, pa, pb;
    rst_n = 1'b0;
    test_mode = 1'b0;
    repeat (2) @(negedge clk);
    check(qa == 0 && qb == 0, "reset state");
    rst_n = 1'b1;
    test_mode = 1'b1;
    period_a = 0; period_b = 0; max_flip_a = 0; max_flip_b = 0;
    distinct_a = 1; distinct_b = 1;
    seen_a[0] = 1; seen_b[0] = 1;
    seq_a.push_back(32'(qa));
    for (int t = 1; t <= 140; t++) begin
      #1;
      fa = ref_step(ia, 2, 1'b1);
      fb = ref_step(ib, 3, 1'b1);
      check(stepa == 3'(fa), "step flags of 3x2-bit counter");
      check(stepb == 2'(fb), "step flags of 2x3-bit counter");
      pa = qa; pb = qb;
      @(negedge clk);
      check(qa == 6'(ref_state(ia, 2)), "state of 3x2-bit counter");
      check(qb == 6'(ref_state(ib, 3)), "state of 2x3-bit counter");
      if (popcount(pa ^ qa) > max_flip_a) max_flip_a = popcount(pa ^ qa);
      if (popcount(pb ^ qb) > max_flip_b) max_flip_b = popcount(pb ^ qb);
      if (t < 70) seq_a.push_back(32'(qa));
      if (period_a == 0) begin
        if (qa == 0) period_a = t;
        else begin
          if (seen_a[qa]) distinct_a = 0;
          seen_a[qa] = 1;
        end
      end
      if (period_b == 0) begin
        if (qb == 0) period_b = t;
        else begin
          if (seen_b[qb]) distinct_b = 0;
          seen_b[qb] = 1;
        end
      end
    end
    check(period_a == 64, $sformatf("period of 3x2-bit counter is 64 (got %0d)", period_a));
    check(period_b == 36, $sformatf("period of 2x3-bit counter is 36 (got %0d)", period_b));
    check(trc_period(2, 3) == 64 && trc_period(3, 2) == 36, "trc_period()");
    check(distinct_a && distinct_b, "patterns within one period are distinct");
    check(max_flip_a <= 3 && max_flip_a >= 2, "bits changed per clock, 3x2-bit");
    check(max_flip_b <= 2 && max_flip_b >= 1, "bits changed per clock, 2x3-bit");
    // Printed start of the sequence, and the later values in order.
    check(seq_a[0] == 0 && seq_a[1] == 2 && seq_a[2] == 3, "sequence starts 0, 2, 3");
    begin
      automatic int p11 = -1, p13 = -1, p12 = -1;
      foreach (seq_a[i]) begin
        if (seq_a[i] == 11 && p11 < 0) p11 = i;
        if (seq_a[i] == 13 && p13 < 0) p13 = i;
        if (seq_a[i] == 12 && p12 < 0) p12 = i;
      end
      check(p11 > 2 && p13 == p11 + 1 && p12 == p13 + 1, "11, 13, 12 follow in order");
    end
    // Hold while test mode is off.
    pa = qa; pb = qb;
    test_mode = 1'b0;
    #0;
    check(stepa == 0 && stepb == 0, "no step flags outside test mode");
    repeat (5) @(negedge clk);
    check(qa == 6'(pa) && qb == 6'(pb), "state holds outside test mode");
    test_mode = 1'b1;
    fa = ref_step(ia, 2, 1'b1);
    fb = ref_step(ib, 3, 1'b1);
    @(negedge clk);
    check(qa == 6'(ref_state(ia, 2)) && qb == 6'(ref_state(ib, 3)), "resumes after hold");
    // Asynchronous reset in the middle of the sequence.
    #2 rst_n = 1'b0;
    #1 check(qa == 0 && qb == 0, "asynchronous reset");
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

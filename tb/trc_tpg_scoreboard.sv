// Reference model and scoreboard for trc_tpg_top, shared by the end-to-end
// testbenches.
//
// It watches the top's inputs and outputs and keeps its own model of the
// generator: per counter segment the index of its Johnson state, a scan cycle
// count, and the select pair captured in each new-scan-cycle clock from
// counter bits A1 (S1) and A2 (S0). The expected scan-in bit is then picked by
// the described connections: {S1,S0} = 00 -> A1, 01 or 10 -> A3, 11 -> A0.
// With SEL_FLOP = 0 the select pair is taken during the new-scan-cycle clock
// (latch form); with SEL_FLOP = 1 at the rising edge that ends it
// (flip-flop form).
// Every clock, at the falling edge, it compares the counter state, the step
// flags, the scan cycle pulse and position, the select pair and the scan-in
// bit. It also counts how often each mechanism happened (segment cascades,
// scan cycles, each select value, counter wrap-arounds, clocks held with
// test_mode low) and the bit changes on the counter and on the scan-in line.
module trc_tpg_scoreboard #(
  parameter int unsigned SEG_W    = 2,
  parameter int unsigned NSEG     = 3,
  parameter int unsigned SCAN_LEN = 8,
  parameter bit          SEL_FLOP = 1'b0,
  localparam int unsigned N       = SEG_W * NSEG,
  localparam int unsigned CW      = $clog2(SCAN_LEN + 1) < 1 ? 1 : $clog2(SCAN_LEN + 1)
) (
  input logic            clk,
  input logic            rst_n,
  input logic            test_mode,
  input logic            scan_in,
  input logic [N-1:0]    pattern,
  input logic            new_scan_cycle,
  input logic [1:0]      sel,
  input logic [NSEG-1:0] seg_step,
  input logic [CW-1:0]   scan_pos
);

  int checks = 0;
  int failures = 0;
  int cascades[NSEG];
  int scan_cycles = 0;
  int sel_used[4];
  int wraps = 0;
  int held_clocks = 0;
  int clocks = 0;
  int pattern_flips = 0;
  int scan_in_flips = 0;

  int unsigned idx[NSEG];
  int unsigned pos;
  bit          nsc_m;
  bit [1:0]    sel_m;
  bit [N-1:0]  prev_pattern;
  bit          prev_scan_in;

  function automatic bit [N-1:0] model_state();
    bit [N-1:0] s = '0;
    for (int i = 0; i < NSEG; i++) begin
      int unsigned d = idx[i];
      for (int k = 0; k < SEG_W; k++) begin
        // Johnson index d: d ones entering from the top bit, then emptying.
        bit b = (d <= SEG_W) ? (k >= SEG_W - d) : (k < 2 * SEG_W - d);
        s[i * SEG_W + k] = b;
      end
    end
    return s;
  endfunction

  function automatic bit [NSEG-1:0] model_flags(bit en);
    bit [NSEG-1:0] f = '0;
    bit carry = en;
    for (int i = 0; i < NSEG; i++) begin
      f[i] = carry;
      carry = carry && (idx[i] == SEG_W);
    end
    return f;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    foreach (idx[i]) idx[i] = 0;
    foreach (cascades[i]) cascades[i] = 0;
    foreach (sel_used[i]) sel_used[i] = 0;
    pos = SCAN_LEN;
    nsc_m = 0;
    sel_m = 2'b00;
  end

  // Advance the model at the rising edge, from the inputs held since the
  // previous falling edge.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      foreach (idx[i]) idx[i] = 0;
      pos = SCAN_LEN;
      nsc_m = 0;
      sel_m = 2'b00;
    end else begin
      bit [NSEG-1:0] f;
      bit [N-1:0]    s;
      s = model_state();
      // Flip-flop form: the pulse of the ending clock loads the select pair.
      if (SEL_FLOP && nsc_m) sel_m = {s[1], s[2]};
      if (test_mode) begin
        f = model_flags(1'b1);
        for (int i = 0; i < NSEG; i++) if (f[i]) idx[i] = (idx[i] + 1) % (2 * SEG_W);
        nsc_m = (pos == SCAN_LEN);
        pos = (pos == SCAN_LEN) ? 0 : pos + 1;
      end else begin
        nsc_m = 0;
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      bit [N-1:0] s;
      bit exp_in;
      s = model_state();
      if (!SEL_FLOP && nsc_m) sel_m = {s[1], s[2]};
      case (sel_m)
        2'b00: exp_in = s[1];
        2'b01: exp_in = s[3];
        2'b10: exp_in = s[3];
        default: exp_in = s[0];
      endcase
      check(pattern == s, "counter state");
      check(seg_step == model_flags(test_mode), "segment step flags");
      check(new_scan_cycle == nsc_m, "new scan cycle pulse");
      check(scan_pos == CW'(pos), "scan position");
      check(sel == sel_m, "select lines {S1,S0}");
      check(scan_in == exp_in, "scan chain input bit");
      clocks++;
      if (test_mode) begin
        for (int i = 1; i < NSEG; i++) cascades[i] += seg_step[i];
        if (pattern == '0 && clocks > 1) wraps++;
      end else begin
        held_clocks++;
      end
      scan_cycles += new_scan_cycle;
      if (new_scan_cycle) sel_used[sel]++;
      if (clocks > 1) begin
        pattern_flips += $countones(pattern ^ prev_pattern);
        scan_in_flips += (scan_in != prev_scan_in);
      end
      prev_pattern = pattern;
      prev_scan_in = scan_in;
    end
  end

endmodule

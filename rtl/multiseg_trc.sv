// Multi-segment twisted ring counter (Johnson counter) used as a low-transition
// test pattern source.
//
// The N = SEG_W*NSEG state bits A(N-1)..A0 are split into NSEG segments of SEG_W
// bits; segment i holds A(i*SEG_W+SEG_W-1)..A(i*SEG_W). Each segment is a
// twisted ring: its bits shift one place towards its lowest bit, and the
// inverted lowest bit is fed into its highest bit (for the first 2-bit segment:
// A1 <= ~A0, A0 <= A1). A segment therefore walks through 2*SEG_W states in
// which exactly one bit changes per step.
// Segment 0 steps on every clock in test mode. Segment i steps on the clocks on
// which segment i-1 steps while all of segment i-1's bits are 1, so the
// segments cascade like the digits of a counter and the period is
// (2*SEG_W)**NSEG: 64 patterns for the default 6-bit counter split into three
// 2-bit segments, 36 for SEG_W=3, NSEG=2. NSEG=1 gives a plain N-bit Johnson
// counter.
//
// The cascade follows the described circuit, in which the clock of each
// segment is the global clock ANDed with all bits of the previous segment and
// with that segment's own gated clock. Here the gated clocks are written as
// synchronous clock enables on one clock, which steps the segments in the same
// order without the glitches of a gated clock; this is a choice of this design.
//
// Interface: clk, active-low asynchronous reset rst_n (all bits to 0),
// test_mode (the counter holds while it is 0). q is the state {A(N-1)..A0},
// seg_step[i] is 1 in the cycle before segment i steps. Timing: q changes one
// clock after the conditions that cause it; no combinational path from inputs
// to q. seg_step[0] is test_mode itself, brought out so that all step flags
// sit in one vector.
module multiseg_trc #(
  parameter int unsigned SEG_W = 2,
  parameter int unsigned NSEG  = 3,
  localparam int unsigned N    = SEG_W * NSEG
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            test_mode,
  output logic [N-1:0]    q,
  output logic [NSEG-1:0] seg_step
);

  // Step enables: the software image of the cascaded AND gates.
  always_comb begin
    logic carry;
    carry = test_mode;
    for (int unsigned i = 0; i < NSEG; i++) begin
      seg_step[i] = carry;
      carry       = carry & (&q[i*SEG_W +: SEG_W]);
    end
  end

  logic [N-1:0] q_next;

  always_comb begin
    q_next = q;
    for (int unsigned i = 0; i < NSEG; i++) begin
      if (seg_step[i]) begin
        for (int unsigned k = 0; k + 1 < SEG_W; k++)
          q_next[i*SEG_W + k] = q[i*SEG_W + k + 1];
        q_next[i*SEG_W + SEG_W - 1] = ~q[i*SEG_W];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end

  initial begin
    assert (SEG_W >= 1 && NSEG >= 1)
      else $error("multiseg_trc: SEG_W and NSEG must be at least 1");
  end

endmodule

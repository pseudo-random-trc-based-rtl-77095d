// Shared types and helpers for the pseudo-random mux-ed twisted ring counter
// test pattern generator.
//
// sel_e names the four inputs of the scan-in multiplexer by the value of its
// select pair {S1,S0}. hold_e chooses how the two select lines keep their value
// between scan cycles: HOLD_LATCH is the tristate-buffer form, in which a select
// line follows its counter bit while the gated clock is high and keeps its
// charge otherwise (modelled as a transparent latch); HOLD_FLOP is the earlier
// form with two D flip-flops. trc_period() gives the number of distinct patterns
// of a multi-segment twisted ring counter: every SEG_W-bit segment is a Johnson
// counter of 2*SEG_W states, and the segments cascade like the digits of a
// counter, so the period is (2*SEG_W)**NSEG.
package trc_tpg_pkg;

  typedef enum logic [1:0] {
    SEL_IN0 = 2'b00,   // S1=0, S0=0
    SEL_IN1 = 2'b01,   // S1=0, S0=1
    SEL_IN2 = 2'b10,   // S1=1, S0=0
    SEL_IN3 = 2'b11    // S1=1, S0=1
  } sel_e;

  typedef enum logic {
    HOLD_LATCH = 1'b0,
    HOLD_FLOP  = 1'b1
  } hold_e;

  function automatic int unsigned trc_period(int unsigned seg_w, int unsigned nseg);
    int unsigned p = 1;
    for (int unsigned i = 0; i < nseg; i++) p = p * (2 * seg_w);
    return p;
  endfunction

endpackage

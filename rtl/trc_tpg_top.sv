// Pseudo-random mux-ed twisted ring counter test pattern generator (TPG) for
// scan-based built-in self-test.
//
// A multi-segment twisted ring counter steps once per clock in test mode and
// changes few bits per step, which keeps switching activity low. Its bits feed
// a 4:1 multiplexer whose output is the scan chain input. The multiplexer's
// select lines S1 and S0 are taken from counter bits once per scan cycle, when
// the clock gated by the "new scan cycle" pulse is high, and are held for the
// rest of the scan cycle; so within one scan cycle the scan chain receives the
// sequence of one counter bit, and the choice of bit changes from one scan
// cycle to the next in a pseudo-random way.
//
// Connections (counter bits A(N-1)..A0): S1 <- A1, S0 <- A2; multiplexer
// input 0 <- A1, inputs 1 and 2 <- A3, input 3 <- A0. These follow the
// described circuit and are parameters (S1_TAP, S0_TAP, IN*_TAP). The default
// counter is 6 bits in three 2-bit segments (64 patterns); the scan chain
// length SCAN_LEN = 8 and the on-chip scan cycle timer are choices of this
// design, as are test_mode and the synchronous replacements of gated clocks
// described in the sub-blocks.
//
// Interface: clk, active-low asynchronous reset rst_n, test_mode (1 = run).
// scan_in_o is the bit for the scan chain input; pattern_o is the counter
// state {A(N-1)..A0}; new_scan_cycle_o marks the first clock of a scan cycle;
// sel_o = {S1,S0}; seg_step_o[i] marks the cycles before segment i steps;
// scan_pos_o counts the clocks of the scan cycle from 0.
// Timing: pattern_o and new_scan_cycle_o change after a rising clock edge; the
// select lines settle during the high phase of that clock in a new-scan-cycle
// cycle; scan_in_o follows combinationally.
module trc_tpg_top
  import trc_tpg_pkg::*;
#(
  parameter int unsigned SEG_W    = 2,
  parameter int unsigned NSEG     = 3,
  parameter int unsigned SCAN_LEN = 8,
  parameter hold_e       HOLD     = HOLD_LATCH,
  parameter int unsigned S1_TAP   = 1,
  parameter int unsigned S0_TAP   = 2,
  parameter int unsigned IN0_TAP  = 1,
  parameter int unsigned IN1_TAP  = 3,
  parameter int unsigned IN2_TAP  = 3,
  parameter int unsigned IN3_TAP  = 0,
  localparam int unsigned N       = SEG_W * NSEG,
  localparam int unsigned CW      = $clog2(SCAN_LEN + 1) < 1 ? 1 : $clog2(SCAN_LEN + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            test_mode,
  output logic            scan_in_o,
  output logic [N-1:0]    pattern_o,
  output logic            new_scan_cycle_o,
  output logic [1:0]      sel_o,
  output logic [NSEG-1:0] seg_step_o,
  output logic [CW-1:0]   scan_pos_o
);

  logic [N-1:0] a;
  logic         nsc;
  logic         s1, s0;
  logic [3:0]   mux_in;

  multiseg_trc #(
    .SEG_W (SEG_W),
    .NSEG  (NSEG)
  ) u_trc (
    .clk       (clk),
    .rst_n     (rst_n),
    .test_mode (test_mode),
    .q         (a),
    .seg_step  (seg_step_o)
  );

  scan_cycle_timer #(
    .SCAN_LEN (SCAN_LEN)
  ) u_timer (
    .clk            (clk),
    .rst_n          (rst_n),
    .test_mode      (test_mode),
    .new_scan_cycle (nsc),
    .scan_pos       (scan_pos_o)
  );

  sel_hold #(
    .HOLD (HOLD)
  ) u_sel (
    .clk            (clk),
    .rst_n          (rst_n),
    .new_scan_cycle (nsc),
    .d1             (a[S1_TAP]),
    .d0             (a[S0_TAP]),
    .s1             (s1),
    .s0             (s0)
  );

  assign mux_in = {a[IN3_TAP], a[IN2_TAP], a[IN1_TAP], a[IN0_TAP]};

  mux4 u_mux (
    .in_i (mux_in),
    .sel  (sel_e'({s1, s0})),
    .out  (scan_in_o)
  );

  assign pattern_o        = a;
  assign new_scan_cycle_o = nsc;
  assign sel_o            = {s1, s0};

  initial begin
    assert (S1_TAP < N && S0_TAP < N && IN0_TAP < N && IN1_TAP < N
            && IN2_TAP < N && IN3_TAP < N)
      else $error("trc_tpg_top: a tap index is outside the counter");
  end

endmodule

// Drivers of the two multiplexer select lines S1 and S0.
//
// A gated clock, the global clock ANDed with the "new scan cycle" signal, opens
// two stores once per scan cycle: S1 takes counter bit d1 and S0 takes counter
// bit d0, and both keep that value for the rest of the scan cycle, so the
// multiplexer feeds one counter bit to the scan chain for a whole scan cycle.
//
// HOLD = HOLD_LATCH (default) is the tristate-buffer form: while the gated
// clock is high each buffer drives its select line from its counter bit, and
// while it is low the undriven line keeps its last value. That behaviour is a
// transparent latch, and it is written as one, since a floating net that holds
// its charge cannot be described as synthesizable logic; the latches are
// intended. The select lines therefore take the counter bits present during the
// high phase of the clock in the cycle in which new_scan_cycle is 1.
// HOLD = HOLD_FLOP is the earlier two-flip-flop form: the bits are taken at the
// rising clock edge that ends a cycle in which new_scan_cycle is 1, written as a
// flip-flop with an enable instead of a gated clock.
//
// Interface: clk, active-low asynchronous reset rst_n (both lines to 0),
// new_scan_cycle (synchronous to clk, one cycle long), counter bits d1, d0;
// select lines s1, s0.
module sel_hold
  import trc_tpg_pkg::*;
#(
  parameter hold_e HOLD = HOLD_LATCH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic new_scan_cycle,
  input  logic d1,
  input  logic d0,
  output logic s1,
  output logic s0
);

  logic gclk_en;
  assign gclk_en = new_scan_cycle & clk;

  if (HOLD == HOLD_LATCH) begin : g_latch
    always_latch begin
      if (!rst_n) begin
        s1 = 1'b0;
        s0 = 1'b0;
      end else if (gclk_en) begin
        s1 = d1;
        s0 = d0;
      end
    end
  end else begin : g_flop
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s1 <= 1'b0;
        s0 <= 1'b0;
      end else if (new_scan_cycle) begin
        s1 <= d1;
        s0 <= d0;
      end
    end
  end

endmodule

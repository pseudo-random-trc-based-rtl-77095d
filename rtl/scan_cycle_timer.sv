// Scan cycle timer: produces the "new scan cycle" pulse of test-per-scan BIST.
//
// A scan cycle lasts SCAN_LEN+1 clocks, SCAN_LEN being the number of flip-flops
// in the scan chain. While test_mode is 1 the timer counts clocks and raises
// new_scan_cycle for one clock at the start of every scan cycle; after reset the
// first pulse comes in the first clock of test mode (the count resets to its
// last value). While test_mode is 0 the count holds and no pulse is given.
// The scan cycle length follows the test-per-scan description; the counter, the
// position of the pulse and the default chain length of 8 are choices of this
// design.
//
// Interface: clk, active-low asynchronous reset rst_n, test_mode; outputs
// new_scan_cycle (registered) and scan_pos, the clock index within the scan
// cycle (0 in the cycle in which new_scan_cycle is 1).
module scan_cycle_timer #(
  parameter int unsigned SCAN_LEN = 8,
  localparam int unsigned CW      = $clog2(SCAN_LEN + 1) < 1 ? 1 : $clog2(SCAN_LEN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_mode,
  output logic          new_scan_cycle,
  output logic [CW-1:0] scan_pos
);

  localparam logic [CW-1:0] LAST = CW'(SCAN_LEN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_pos       <= LAST;
      new_scan_cycle <= 1'b0;
    end else if (test_mode) begin
      scan_pos       <= (scan_pos == LAST) ? '0 : scan_pos + 1'b1;
      new_scan_cycle <= (scan_pos == LAST);
    end else begin
      new_scan_cycle <= 1'b0;
    end
  end

  initial begin
    assert (SCAN_LEN >= 1) else $error("scan_cycle_timer: SCAN_LEN must be at least 1");
  end

endmodule

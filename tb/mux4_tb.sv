// Self-checking testbench for mux4: every select value against every input
// pattern, compared with the selection rule written out bit by bit.
module mux4_tb;
  import trc_tpg_pkg::*;

  logic [3:0] in_i;
  sel_e       sel;
  logic       out;
  int         checks = 0;
  int         failures = 0;

  mux4 dut (.in_i(in_i), .sel(sel), .out(out));

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 16; v++) begin
        logic expected;
        in_i = 4'(v);
        sel  = sel_e'(s);
        #1;
        // {S1,S0} = 00 -> input 0, 01 -> input 1, 10 -> input 2, 11 -> input 3
        case ({s[1], s[0]})
          2'b00: expected = v[0];
          2'b01: expected = v[1];
          2'b10: expected = v[2];
          default: expected = v[3];
        endcase
        checks++;
        if (out !== expected) begin
          failures++;
          $display("FAIL sel=%0d in=%b out=%b", s, in_i, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

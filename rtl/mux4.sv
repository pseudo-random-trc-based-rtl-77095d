// Four-to-one multiplexer that picks the bit sent to the scan chain input.
//
// out = in_i[sel], where sel is the select pair {S1,S0}: S1=S0=0 passes in_i[0],
// S1=0,S0=1 passes in_i[1], S1=1,S0=0 passes in_i[2], S1=S0=1 passes in_i[3].
// Which counter bits reach the four inputs is decided where the multiplexer is
// instantiated. Purely combinational.
module mux4
  import trc_tpg_pkg::*;
(
  input  logic [3:0] in_i,
  input  sel_e       sel,
  output logic       out
);

  always_comb begin
    unique case (sel)
      SEL_IN0: out = in_i[0];
      SEL_IN1: out = in_i[1];
      SEL_IN2: out = in_i[2];
      SEL_IN3: out = in_i[3];
      default: out = in_i[0];
    endcase
  end

endmodule

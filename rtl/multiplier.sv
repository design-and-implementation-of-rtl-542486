// multiplier: unsigned A_W x B_W multiplier (12 x 8 by default).
//
// In the datapath one operand is the transparency (1 - alpha_in) from the
// opacity subtractor and the other a premultiplied colour or opacity from the
// map table. The full A_W+B_W bit product is returned; the caller scales it.
// Combinational. The multiplier's inner structure is not prescribed; this is a
// plain product left to synthesis.
module multiplier #(
  parameter int unsigned A_W = rc_pkg::ACC_W_DEF,
  parameter int unsigned B_W = rc_pkg::COMP_W
) (
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic [A_W+B_W-1:0] p
);

  assign p = (A_W+B_W)'(a) * (A_W+B_W)'(b);

endmodule

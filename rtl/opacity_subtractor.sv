// opacity_subtractor: computes (1 - alpha_in) for the compositing equations.
//
// The minuend is hardwired: opacity 1.0 is the code 128, which with the
// ACC_W-8 fraction bits of the accumulators is 128 << (ACC_W-8) (2048 for the
// standard 12-bit datapath). Hardwiring the constant follows the original
// design; the fixed-point scaling is this design's reading of the 8-bit
// opacity code and the 12-bit accumulators. Combinational, ACC_W bits wide.
// The accumulated opacity never exceeds 1.0, so the difference is never
// negative.
module opacity_subtractor #(
  parameter int unsigned ACC_W = rc_pkg::ACC_W_DEF
) (
  input  logic [ACC_W-1:0] alpha_acc,
  output logic [ACC_W-1:0] one_minus
);

  localparam logic [ACC_W-1:0] ONE = ACC_W'(rc_pkg::OPACITY_ONE) << (ACC_W - rc_pkg::COMP_W);

  assign one_minus = ONE - alpha_acc;

endmodule

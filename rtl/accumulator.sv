// accumulator: W-bit accumulator of one colour channel or of opacity.
//
// On each clock with en high the addend is added to the stored value. clear
// (the clear pad) zeroes it and wins over a simultaneous en. Asynchronous
// active-low reset also zeroes it. The sum wraps at 2**W; with the fixed point
// of the datapath it cannot exceed 1.0 of full scale, so no saturation is
// built. Clear being synchronous is this design's choice.
module accumulator #(
  parameter int unsigned W = rc_pkg::ACC_W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] addend,
  output logic [W-1:0] acc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (clear)  acc <= '0;
    else if (en)     acc <= acc + addend;
  end

endmodule

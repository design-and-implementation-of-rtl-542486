// output_buffer: gathers the four accumulators into one 32-bit host word.
//
// The host reads the result of a ray in a single 32-bit access. Each ACC_W-bit
// accumulator keeps 8 integer bits on top of its fraction bits; the buffer
// takes those 8 bits of each and packs them as {R*, G*, B*, alpha}. On a read
// strobe rd the packed word is captured into dout and valid pulses high for
// one cycle, so the host sees a stable word while the datapath moves on.
// Which 8 bits are taken, the packing order and the registered read are
// choices of this design; gathering all four outputs for one 32-bit read
// follows the original.
module output_buffer
  import rc_pkg::*;
#(
  parameter int unsigned ACC_W = ACC_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd,
  input  logic [ACC_W-1:0] acc_r,
  input  logic [ACC_W-1:0] acc_g,
  input  logic [ACC_W-1:0] acc_b,
  input  logic [ACC_W-1:0] acc_a,
  output rgba_t            dout,
  output logic             valid
);

  rgba_t packed_w;

  always_comb begin
    packed_w.r = acc_r[ACC_W-1 -: COMP_W];
    packed_w.g = acc_g[ACC_W-1 -: COMP_W];
    packed_w.b = acc_b[ACC_W-1 -: COMP_W];
    packed_w.a = acc_a[ACC_W-1 -: COMP_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= rd;
      if (rd) dout <= packed_w;
    end
  end

endmodule

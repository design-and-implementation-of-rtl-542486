// raycast_datapath: front-to-back compositing of one ray, one sample per pulse.
//
// Implements, for each sample R of the ray r,
//   C*out = C*in + C*(R) * (1 - alpha_in)      (for R, G and B)
//   a_out = a_in + a(R)  * (1 - alpha_in)
// with one opacity subtractor, four ACC_W x 8 multipliers and four ACC_W-bit
// accumulators, as in the coprocessor's datapath. The subtractor forms
// (1 - alpha_in) from the opacity accumulator with 1.0 hardwired; each
// multiplier weights one component of the map entry (premultiplied colour or
// opacity, 8 bits, 1.0 = 128) by it; the product is divided by 128 (shift
// right by 7, truncating) and added into the accumulator on acc_en.
//
// Fixed point (this design's reading of the widths): accumulators hold 8
// integer and ACC_W-8 fraction bits, so opacity 1.0 = 128 << (ACC_W-8).
// Once the opacity reaches 1.0, (1 - alpha_in) is zero and further samples
// add nothing. Everything between the sample input and the accumulators is
// combinational; the accumulators update on the clock edge where acc_en is
// high, so a new sample can be taken every cycle. clear zeroes all four.
module raycast_datapath
  import rc_pkg::*;
#(
  parameter int unsigned ACC_W = ACC_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             acc_en,
  input  rgba_t            sample,
  output logic [ACC_W-1:0] acc_r,
  output logic [ACC_W-1:0] acc_g,
  output logic [ACC_W-1:0] acc_b,
  output logic [ACC_W-1:0] acc_a
);

  localparam int unsigned P_W = ACC_W + COMP_W;
  localparam logic [ACC_W-1:0] ONE = ACC_W'(OPACITY_ONE) << (ACC_W - COMP_W);

  logic [ACC_W-1:0] transp;
  logic [P_W-1:0]   prod [4];
  logic [ACC_W-1:0] add  [4];
  logic [ACC_W-1:0] acc  [4];
  logic [COMP_W-1:0] comp [4];

  assign comp[0] = sample.r;
  assign comp[1] = sample.g;
  assign comp[2] = sample.b;
  assign comp[3] = sample.a;

  opacity_subtractor #(.ACC_W(ACC_W)) u_sub (
    .alpha_acc (acc[3]),
    .one_minus (transp)
  );

  for (genvar c = 0; c < 4; c++) begin : g_chan
    multiplier #(.A_W(ACC_W), .B_W(COMP_W)) u_mul (
      .a (transp),
      .b (comp[c]),
      .p (prod[c])
    );
    // divide by opacity 1.0 (128) and keep ACC_W bits
    assign add[c] = prod[c][ONE_SHIFT +: ACC_W];
    accumulator #(.W(ACC_W)) u_acc (
      .clk    (clk),
      .rst_n  (rst_n),
      .clear  (clear),
      .en     (acc_en),
      .addend (add[c]),
      .acc    (acc[c])
    );
  end

  assign acc_r = acc[0];
  assign acc_g = acc[1];
  assign acc_b = acc[2];
  assign acc_a = acc[3];

  // accumulated opacity can never pass 1.0 when map opacities are <= 128
  a_alpha_bounded: assert property (@(posedge clk) disable iff (!rst_n)
    (sample.a <= COMP_W'(OPACITY_ONE)) |-> (acc_a <= ONE));

endmodule

// rc_coprocessor: hardware ray-caster for volume rendering (top level).
//
// The host walks the volume ray by ray. For each pixel it pulses clear, writes
// the voxels met by the ray front to back into the voxel input register, one
// per voxel_we, and then reads the composited pixel with pixel_rd. The voxel
// value addresses the colour/opacity map SRAM, whose word (premultiplied RGB
// and opacity) feeds the compositing datapath; the write's accumulate pulse,
// one clock later, adds that sample into the four accumulators. The output
// buffer packs the accumulators' integer bytes as {R*, G*, B*, alpha}; the host
// divides R*, G*, B* by alpha to get the final colour.
//
// Before rendering the host loads the map table with host_mem_sel high (the
// bus controller then gives it the SRAM bus) and host_mem_we; host_mem_rdata
// shows the word at the current SRAM address. While host_mem_sel is high the
// SRAM does not follow the voxel register, so voxels must not be written then.
//
// Timing: a voxel can be written every clock. The last accumulate happens one
// clock after the last voxel write (busy is high meanwhile); a pixel_rd issued
// after busy falls captures the finished pixel, which appears on pixel_out with
// pixel_valid one clock later. The whole circuit runs on one clock, where the
// original ran all but the voxel register asynchronously; the host bus is
// brought out as plain ports because the PCI bridge is not part of this design.
module rc_coprocessor
  import rc_pkg::*;
#(
  parameter int unsigned ACC_W      = ACC_W_DEF,
  parameter int unsigned VOXEL_W    = rc_pkg::VOXEL_W_DEF,
  parameter int unsigned MAP_ADDR_W = VOXEL_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  voxel_we,
  input  logic [VOXEL_W-1:0]    voxel_in,
  input  logic                  host_mem_sel,
  input  logic                  host_mem_we,
  input  logic [MAP_ADDR_W-1:0] host_mem_addr,
  input  logic [WORD_W-1:0]     host_mem_wdata,
  output logic [WORD_W-1:0]     host_mem_rdata,
  input  logic                  pixel_rd,
  output logic [WORD_W-1:0]     pixel_out,
  output logic                  pixel_valid,
  output logic                  busy
);

  logic [VOXEL_W-1:0]    voxel;
  logic                  acc_pulse;
  logic [MAP_ADDR_W-1:0] mem_addr;
  logic                  mem_we;
  logic [WORD_W-1:0]     mem_wdata;
  logic [WORD_W-1:0]     mem_rdata;
  logic [ACC_W-1:0]      acc_r, acc_g, acc_b, acc_a;
  rgba_t                 pix;

  voxel_input_reg #(.VOXEL_W(VOXEL_W)) u_vreg (
    .clk       (clk),
    .rst_n     (rst_n),
    .we        (voxel_we),
    .din       (voxel_in),
    .voxel     (voxel),
    .acc_pulse (acc_pulse)
  );

  bus_controller #(.ADDR_W(MAP_ADDR_W), .DATA_W(WORD_W)) u_bus (
    .host_sel   (host_mem_sel),
    .host_we    (host_mem_we),
    .host_addr  (host_mem_addr),
    .host_wdata (host_mem_wdata),
    .fpga_addr  (MAP_ADDR_W'(voxel)),
    .mem_addr   (mem_addr),
    .mem_we     (mem_we),
    .mem_wdata  (mem_wdata)
  );

  map_memory #(.ADDR_W(MAP_ADDR_W), .DATA_W(WORD_W)) u_map (
    .clk   (clk),
    .addr  (mem_addr),
    .we    (mem_we),
    .wdata (mem_wdata),
    .rdata (mem_rdata)
  );

  raycast_datapath #(.ACC_W(ACC_W)) u_dp (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (clear),
    .acc_en (acc_pulse),
    .sample (rgba_t'(mem_rdata)),
    .acc_r  (acc_r),
    .acc_g  (acc_g),
    .acc_b  (acc_b),
    .acc_a  (acc_a)
  );

  output_buffer #(.ACC_W(ACC_W)) u_obuf (
    .clk   (clk),
    .rst_n (rst_n),
    .rd    (pixel_rd),
    .acc_r (acc_r),
    .acc_g (acc_g),
    .acc_b (acc_b),
    .acc_a (acc_a),
    .dout  (pix),
    .valid (pixel_valid)
  );

  assign pixel_out      = pix;
  assign host_mem_rdata = mem_rdata;
  assign busy           = acc_pulse;

  // lookups need the FPGA to own the SRAM bus
  a_no_voxel_while_host: assert property (@(posedge clk) disable iff (!rst_n)
    acc_pulse |-> !host_mem_sel);

endmodule

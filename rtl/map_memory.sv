// map_memory: colour and opacity lookup table held in board SRAM.
//
// 2**ADDR_W words of DATA_W bits (64K x 32 by default, 256 Kbytes), one word
// per voxel value: premultiplied R, G, B in bits 31:8 and opacity in 7:0.
// Like the asynchronous SRAM chips it stands for, reads are combinational:
// rdata follows addr within the same cycle. Writes happen on the clock edge
// when we is high. One shared address serves reads and writes; the
// bus_controller decides whether the host or the voxel register drives it.
// The memory is not reset; the host loads it before rendering.
module map_memory #(
  parameter int unsigned ADDR_W = rc_pkg::VOXEL_W_DEF,
  parameter int unsigned DATA_W = rc_pkg::WORD_W
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule

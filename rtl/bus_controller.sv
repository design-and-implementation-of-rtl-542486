// bus_controller: switches the map SRAM bus between the host and the FPGA.
//
// The SRAM bank can be driven either from the PCI side (the host loads or
// reads back the map table) or from the coprocessor (the voxel register
// addresses it for lookups). With host_sel high the host's address, write
// strobe and data reach the memory; with host_sel low the voxel register's
// value is the address and no write can happen. Purely combinational. The
// explicit select signal is this design's choice; on the board this job is
// done by bus controller chips whose control is not described.
module bus_controller #(
  parameter int unsigned ADDR_W = rc_pkg::VOXEL_W_DEF,
  parameter int unsigned DATA_W = rc_pkg::WORD_W
) (
  input  logic              host_sel,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [DATA_W-1:0] host_wdata,
  input  logic [ADDR_W-1:0] fpga_addr,
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_we,
  output logic [DATA_W-1:0] mem_wdata
);

  always_comb begin
    if (host_sel) begin
      mem_addr = host_addr;
      mem_we   = host_we;
    end else begin
      mem_addr = fpga_addr;
      mem_we   = 1'b0;
    end
    mem_wdata = host_wdata;
  end

endmodule

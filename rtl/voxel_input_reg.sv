// voxel_input_reg: the voxel input register of the coprocessor.
//
// The host writes one voxel value (VOXEL_W bits) per access. The register
// holds it and drives it onto the address bus of the colour/opacity map SRAM,
// so the lookup runs for as long as the value is held. Every write also
// produces a one-cycle accumulate pulse for the compositing datapath. The
// pulse comes one clock after the write, when the SRAM read of the new voxel
// has settled, so the accumulators always add the sample of the voxel now in
// the register. That one-clock skew, and reset to zero, are choices of this
// design; the register, its role as SRAM address and the pulse per write
// follow the coprocessor's architecture.
//
// Timing: we at edge n -> voxel valid after edge n -> acc_pulse high in the
// cycle after edge n+1 ... i.e. acc_pulse is we delayed by one clock.
module voxel_input_reg #(
  parameter int unsigned VOXEL_W = rc_pkg::VOXEL_W_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [VOXEL_W-1:0] din,
  output logic [VOXEL_W-1:0] voxel,
  output logic               acc_pulse
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      voxel     <= '0;
      acc_pulse <= 1'b0;
    end else begin
      if (we) voxel <= din;
      acc_pulse <= we;
    end
  end

endmodule

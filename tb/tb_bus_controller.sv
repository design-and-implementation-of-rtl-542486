// tb_bus_controller: random stimulus; with host_sel the host's address, write
// strobe and data must reach the SRAM, without it the voxel address must and
// no write may pass.
module tb_bus_controller;
  logic host_sel, host_we, mem_we;
  logic [15:0] host_addr, fpga_addr, mem_addr;
  logic [31:0] host_wdata, mem_wdata;
  int checks = 0, failures = 0;

  bus_controller dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      host_sel = 1'($urandom); host_we = 1'($urandom);
      host_addr = 16'($urandom); fpga_addr = 16'($urandom); host_wdata = $urandom;
      #1;
      checks++;
      if (host_sel) begin
        if (mem_addr !== host_addr || mem_we !== host_we || mem_wdata !== host_wdata) failures++;
      end else begin
        if (mem_addr !== fpga_addr || mem_we !== 1'b0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

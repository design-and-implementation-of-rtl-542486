// tb_map_memory: fills the full 64K x 32 table with a hash of the address,
// then checks that reads are combinational (data valid in the same cycle as
// the address), that every location returns what was written, and that a
// rewrite of some entries changes only those.
module tb_map_memory;
  logic clk = 0, we = 0;
  logic [15:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  map_memory dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  function automatic logic [31:0] pat(input int a, input int s);
    return 32'(a * 32'h9E3779B1 + s * 32'h85EBCA6B) ^ 32'(a << 7);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 65536; a++) begin
      @(negedge clk); we = 1; addr = 16'(a); wdata = pat(a, 0);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 65536; a++) begin
      addr = 16'(a); #1;
      checks++;
      if (rdata !== pat(a, 0)) begin
        failures++;
        if (failures < 10) $display("addr %h: %h exp %h", a, rdata, pat(a, 0));
      end
    end
    // rewrite every 97th entry
    for (int a = 0; a < 65536; a += 97) begin
      @(negedge clk); we = 1; addr = 16'(a); wdata = pat(a, 1);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 65536; a++) begin
      addr = 16'(a); #1;
      checks++;
      if (rdata !== pat(a, (a % 97 == 0) ? 1 : 0)) begin
        failures++;
        if (failures < 10) $display("addr %h after rewrite: %h", a, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

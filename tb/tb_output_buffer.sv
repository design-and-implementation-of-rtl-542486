// tb_output_buffer: random accumulator values and read strobes; after a read
// the word must hold the top 8 bits of each accumulator as {R,G,B,alpha},
// valid must follow rd by one clock, and without rd the word must hold.
module tb_output_buffer;
  import rc_pkg::*;
  logic clk = 0, rst_n = 0, rd = 0, valid;
  logic [11:0] acc_r = '0, acc_g = '0, acc_b = '0, acc_a = '0;
  rgba_t dout;
  logic [31:0] exp_w;
  int checks = 0, failures = 0;

  output_buffer dut (.clk, .rst_n, .rd, .acc_r, .acc_g, .acc_b, .acc_a, .dout, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_w = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rd = ($urandom % 3) == 0;
      acc_r = 12'($urandom); acc_g = 12'($urandom); acc_b = 12'($urandom); acc_a = 12'($urandom % 2049);
      if (rd) exp_w = {acc_r[11:4], acc_g[11:4], acc_b[11:4], acc_a[11:4]};
      @(posedge clk); #1;
      checks++;
      if (32'(dout) !== exp_w || valid !== rd) begin
        failures++;
        if (failures < 10) $display("i=%0d dout=%h exp %h valid=%b", i, dout, exp_w, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

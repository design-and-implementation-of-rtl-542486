// tb_voxel_input_reg: checks that the voxel register holds the last written
// value and that every write, and only a write, yields one accumulate pulse
// exactly one clock later. Random write patterns against a shadow model.
module tb_voxel_input_reg;
  logic clk = 0, rst_n = 0, we = 0;
  logic [15:0] din = '0, voxel;
  logic acc_pulse;
  int checks = 0, failures = 0;
  logic [15:0] exp_v;
  logic exp_p;

  voxel_input_reg dut (.clk, .rst_n, .we, .din, .voxel, .acc_pulse);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_v = 0; exp_p = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (voxel !== 0 || acc_pulse !== 0) begin failures++; $display("reset state wrong"); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we  = ($urandom % 3) != 0;
      din = (($urandom % 4) == 0) ? exp_v : 16'($urandom);  // repeats too
      @(posedge clk);
      #1;
      if (we) exp_v = din;
      exp_p = we;
      checks++;
      if (voxel !== exp_v || acc_pulse !== exp_p) begin
        failures++;
        $display("cycle %0d: voxel=%h exp %h pulse=%b exp %b", i, voxel, exp_v, acc_pulse, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

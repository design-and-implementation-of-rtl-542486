// tb_accumulator: random enable, clear and addend sequences against a
// modulo-4096 shadow sum; clear must win over a simultaneous enable.
module tb_accumulator;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [11:0] addend = '0, acc;
  int checks = 0, failures = 0, exp_acc = 0, both = 0;

  accumulator dut (.clk, .rst_n, .clear, .en, .addend, .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clear = ($urandom % 13) == 0;
      en = ($urandom % 4) != 0;
      addend = 12'($urandom);
      @(posedge clk);
      if (clear) begin exp_acc = 0; if (en) both++; end
      else if (en) exp_acc = (exp_acc + int'(addend)) % 4096;
      #1;
      checks++;
      if (int'(acc) != exp_acc) begin
        failures++;
        if (failures < 10) $display("cycle %0d acc=%0d exp %0d", i, acc, exp_acc);
      end
    end
    checks++;
    if (both == 0) begin failures++; $display("clear with enable never tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

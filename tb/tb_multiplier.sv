// tb_multiplier: exhaustive over the 8-bit operand with random and corner
// values of the 12-bit operand.
module tb_multiplier;
  logic [11:0] a;
  logic [7:0]  b;
  logic [19:0] p;
  int checks = 0, failures = 0;

  multiplier dut (.a, .b, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      int av;
      av = (i == 0) ? 0 : (i == 1) ? 4095 : (i == 2) ? 2048 : int'($urandom % 4096);
      for (int bv = 0; bv < 256; bv++) begin
        a = 12'(av); b = 8'(bv); #1;
        checks++;
        if (int'(p) != av * bv) begin
          failures++;
          if (failures < 10) $display("%0d*%0d=%0d", av, bv, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

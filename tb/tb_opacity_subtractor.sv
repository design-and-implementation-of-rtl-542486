// tb_opacity_subtractor: exhaustive over the legal accumulated opacities
// 0..1.0 for the 12-bit datapath (1.0 = 2048) and for an 8-bit instance
// (1.0 = 128).
module tb_opacity_subtractor;
  logic [11:0] a12, d12;
  logic [7:0]  a8, d8;
  int checks = 0, failures = 0;

  opacity_subtractor dut12 (.alpha_acc(a12), .one_minus(d12));
  opacity_subtractor #(.ACC_W(8)) dut8 (.alpha_acc(a8), .one_minus(d8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a <= 2048; a++) begin
      a12 = 12'(a); #1;
      checks++;
      if (int'(d12) != 2048 - a) begin failures++; $display("a=%0d d=%0d", a, d12); end
    end
    for (int a = 0; a <= 128; a++) begin
      a8 = 8'(a); #1;
      checks++;
      if (int'(d8) != 128 - a) begin failures++; $display("a8=%0d d=%0d", a, d8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

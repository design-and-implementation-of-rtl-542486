// tb_raycast_datapath: composites random rays of premultiplied samples in a
// 12-bit and a 16-bit instance and compares every accumulator after every
// sample with a fixed-point reference of the front-to-back equations. Also
// checks each finished ray against a double-precision compositing of the same
// samples (the 12-bit result must be within 1/16 per sample of it, in
// integer-colour units), that an opaque sample stops all further
// accumulation, and that clear empties the accumulators.
module tb_raycast_datapath;
  import rc_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, acc_en = 0;
  rgba_t sample = '0;
  logic [11:0] r12, g12, b12, a12;
  logic [15:0] r16, g16, b16, a16;
  int checks = 0, failures = 0, opaque_rays = 0;

  raycast_datapath dut12 (.clk, .rst_n, .clear, .acc_en, .sample,
                          .acc_r(r12), .acc_g(g12), .acc_b(b12), .acc_a(a12));
  raycast_datapath #(.ACC_W(16)) dut16 (.clk, .rst_n, .clear, .acc_en, .sample,
                          .acc_r(r16), .acc_g(g16), .acc_b(b16), .acc_a(a16));

  always #5 clk = ~clk;

  // reference: accumulators in units of 2^-f of an integer colour
  int ref12 [4], ref16 [4];
  real fc [4];

  task automatic ref_step(ref int acc [4], input int f, input int v [4]);
    int one, t;
    one = 128 << f;
    t = one - acc[3];
    for (int c = 0; c < 4; c++) acc[c] += (t * v[c]) / 128;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [4];
    int len, op;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ray = 0; ray < 300; ray++) begin
      @(negedge clk); clear = 1; acc_en = 0;
      @(negedge clk); clear = 0;
      checks++;
      if (r12 != 0 || a12 != 0 || a16 != 0) begin failures++; $display("clear failed"); end
      foreach (ref12[c]) begin ref12[c] = 0; ref16[c] = 0; fc[c] = 0.0; end
      len = 1 + int'($urandom % 40);
      for (int k = 0; k < len; k++) begin
        // mostly faint samples, sometimes opaque ones
        op = (($urandom % 25) == 0) ? 128 : int'($urandom % 20);
        if (ray % 7 == 3 && k == len / 2) op = 128;
        v[3] = op;
        for (int c = 0; c < 3; c++) v[c] = int'($urandom % 256) * op / 128;
        sample = rgba_t'({8'(v[0]), 8'(v[1]), 8'(v[2]), 8'(v[3])});
        acc_en = 1;
        begin
          real t;
          t = 1.0 - fc[3];
          for (int c = 0; c < 3; c++) fc[c] += real'(v[c]) * t;
          fc[3] += real'(v[3]) / 128.0 * t;
        end
        ref_step(ref12, 4, v);
        ref_step(ref16, 8, v);
        @(negedge clk);
        checks++;
        if (int'(r12) != ref12[0] || int'(g12) != ref12[1] || int'(b12) != ref12[2] || int'(a12) != ref12[3]) begin
          failures++;
          if (failures < 10) $display("ray %0d k %0d: 12b %0d %0d %0d %0d exp %0d %0d %0d %0d", ray, k,
                                      r12, g12, b12, a12, ref12[0], ref12[1], ref12[2], ref12[3]);
        end
        checks++;
        if (int'(r16) != ref16[0] || int'(g16) != ref16[1] || int'(b16) != ref16[2] || int'(a16) != ref16[3]) begin
          failures++;
          if (failures < 10) $display("ray %0d k %0d: 16b mismatch", ray, k);
        end
      end
      acc_en = 0;
      begin
        real err, tol;
        tol = real'(len) * 2.0 / 16.0 + 0.25;
        err = real'(r12) / 16.0 - fc[0];
        if (err < 0) err = -err;
        checks++;
        if (err > tol) begin failures++; $display("ray %0d: R %f vs double %f", ray, real'(r12) / 16.0, fc[0]); end
        err = real'(a12) / 2048.0 - fc[3];
        if (err < 0) err = -err;
        checks++;
        if (err > tol / 128.0 * 2.0) begin failures++; $display("ray %0d: alpha %f vs double %f", ray, real'(a12) / 2048.0, fc[3]); end
      end
      if (ref12[3] == 2048) begin
        // opaque: one more sample must change nothing
        logic [11:0] hold_r;
        opaque_rays++;
        hold_r = r12;
        sample = rgba_t'({8'd200, 8'd100, 8'd50, 8'd100});
        acc_en = 1;
        @(negedge clk);
        acc_en = 0;
        checks++;
        if (r12 != hold_r || a12 != 12'd2048) begin failures++; $display("opaque ray still accumulates"); end
      end
    end
    checks++;
    if (opaque_rays == 0) begin failures++; $display("no ray reached full opacity"); end
    $display("opaque rays: %0d", opaque_rays);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

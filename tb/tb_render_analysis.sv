// tb_render_analysis: render quality against accumulator width.
//
// Three coprocessors with ACC_W = 8, 12 (the default, standard quality) and
// 16 run in lockstep on the same 32 x 32 x 32 sphere volume (radius 16,
// inside 60000, outside 10000) rendered along +Z, with the same map table as
// tb_render_run. Every pixel word of each is checked against a fixed-point
// model with ACC_W-8 fraction bits. For each width the relative image error
// against a double-precision render (after the host's division by opacity)
// is reported. The 8-bit render must be the worst; beyond 12 bits the error
// must stay within 0.5 percentage points of the 12-bit figure, because the
// 8-bit table and result word, not the accumulators, then limit quality
// (measured: about 12.4 %, 7.5 % and 7.5 %).
module tb_render_analysis;
  import rc_pkg::*;
  localparam int N = 32;
  localparam int W [3] = '{8, 12, 16};

  logic        clk = 0, rst_n = 0, clear = 0, voxel_we = 0;
  logic [15:0] voxel_in = '0;
  logic        host_mem_sel = 0, host_mem_we = 0;
  logic [15:0] host_mem_addr = '0;
  logic [31:0] host_mem_wdata = '0;
  logic [31:0] mem_rd [3], pix [3];  // mem_rd: unused table read-back
  logic        pixel_rd = 0;
  logic        pv [3], bz [3];     // bz: busy, not needed here

  for (genvar g = 0; g < 3; g++) begin : g_dut
    rc_coprocessor #(.ACC_W(W[g])) dut (
      .clk, .rst_n, .clear, .voxel_we, .voxel_in, .host_mem_sel, .host_mem_we,
      .host_mem_addr, .host_mem_wdata, .host_mem_rdata(mem_rd[g]),
      .pixel_rd, .pixel_out(pix[g]), .pixel_valid(pv[g]), .busy(bz[g]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    while (cycles < 400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int op_of(int v);
    if (v >= 50000) return 128;
    if (v >= 30000) return 40;
    return v >> 12;
  endfunction
  function automatic int col_of(int v, int c);
    int r;
    r = (v >> 8) & 255;
    case (c)
      0: return r;
      1: return (v >> 4) & 255;
      default: return 255 - r;
    endcase
  endfunction
  function automatic logic [31:0] entry(int v);
    int op;
    op = op_of(v);
    return {8'(col_of(v, 0) * op / 128), 8'(col_of(v, 1) * op / 128),
            8'(col_of(v, 2) * op / 128), 8'(op)};
  endfunction

  real e_sum [3], i_sum;

  initial begin
    int cc, r2, v, f, t;
    int acc [3][4];
    real fc [4], tr, er [3];
    logic [31:0] ent, exp_w;
    cc = N / 2; r2 = cc * cc;
    foreach (e_sum[g]) e_sum[g] = 0.0;
    i_sum = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); host_mem_sel = 1;
    for (int a = 0; a < 65536; a++) begin
      host_mem_we = 1; host_mem_addr = 16'(a); host_mem_wdata = entry(a);
      @(negedge clk);
    end
    host_mem_we = 0; host_mem_sel = 0;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        @(negedge clk); clear = 1;
        @(negedge clk); clear = 0;
        for (int g = 0; g < 3; g++) foreach (acc[g][c]) acc[g][c] = 0;
        foreach (fc[c]) fc[c] = 0.0;
        for (int z = 0; z < N; z++) begin
          v = ((x - cc) * (x - cc) + (y - cc) * (y - cc) + (z - cc) * (z - cc) <= r2) ? 60000 : 10000;
          voxel_we = 1; voxel_in = 16'(v);
          @(negedge clk); voxel_we = 0;
          ent = entry(v);
          for (int g = 0; g < 3; g++) begin
            f = W[g] - 8;
            t = (128 << f) - acc[g][3];
            for (int c = 0; c < 4; c++) acc[g][c] += t * int'(ent[31 - 8 * c -: 8]) / 128;
          end
          tr = 1.0 - fc[3];
          for (int c = 0; c < 3; c++) fc[c] += real'(col_of(v, c)) * (real'(op_of(v)) / 128.0) * tr;
          fc[3] += (real'(op_of(v)) / 128.0) * tr;
        end
        @(negedge clk); pixel_rd = 1;
        @(negedge clk); pixel_rd = 0;
        begin
          real d2, i2, hw, rf;
          i2 = 0.0;
          for (int c = 0; c < 3; c++) begin
            rf = (fc[3] == 0.0) ? 0.0 : fc[c] / fc[3];
            i2 += rf * rf;
          end
          i_sum += $sqrt(i2);
          for (int g = 0; g < 3; g++) begin
            f = W[g] - 8;
            exp_w = {8'(acc[g][0] >> f), 8'(acc[g][1] >> f), 8'(acc[g][2] >> f), 8'(acc[g][3] >> f)};
            checks++;
            if (pix[g] !== exp_w || pv[g] !== 1'b1) begin
              failures++;
              if (failures < 10) $display("ACC_W=%0d pixel (%0d,%0d): %h exp %h", W[g], x, y, pix[g], exp_w);
            end
            d2 = 0.0;
            for (int c = 0; c < 3; c++) begin
              rf = (fc[3] == 0.0) ? 0.0 : fc[c] / fc[3];
              hw = (pix[g][7:0] == 0) ? 0.0 : real'(pix[g][31 - 8 * c -: 8]) * 128.0 / real'(pix[g][7:0]);
              d2 += (rf - hw) * (rf - hw);
            end
            e_sum[g] += $sqrt(d2);
          end
        end
      end
    for (int g = 0; g < 3; g++) begin
      er[g] = 100.0 * e_sum[g] / i_sum;
      $display("ACC_W=%0d: relative image error %f %%", W[g], er[g]);
    end
    checks++;
    if (!(er[0] > er[1])) begin failures++; $display("8-bit render not worse than 12-bit"); end
    checks++;
    if (er[2] > er[1] + 0.5 || er[2] < er[1] - 0.5) begin
      failures++; $display("16-bit render differs from 12-bit by more than 0.5 points");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

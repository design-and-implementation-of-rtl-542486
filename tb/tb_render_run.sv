// tb_render_run: end-to-end render of a sphere volume through rc_coprocessor,
// shared by the block-level and the full-size testbenches.
//
// The volume is an N x N x N cube of 16-bit voxels: a sphere of radius N/2
// centred in the cube with voxel value INSIDE, OUTSIDE elsewhere. The host
// side of this bench loads the full 64K-entry map table through the bus
// controller, reads part of it back, then renders the volume along each
// direction listed in DIRS (0:+Z 1:-Z 2:+Y 3:+X) by clearing, streaming the N
// voxels of each ray and reading the pixel. Every pixel is compared with a
// fixed-point model of front-to-back compositing computed here. The bench
// also measures the relative image error of the hardware pixels (after the
// host's division by opacity) against a double-precision render.
//
// Map table (formula, premultiplied colour): opacity op(v) = 128 for v >=
// 50000, 40 for v >= 30000, v >> 12 below; colour r = v[15:8], g = v[11:4],
// b = 255 - r; stored component = colour * op / 128 (truncated).
//
// Mechanisms counted (each must occur): map writes, map read-backs, bus hand
// over host->FPGA and back, accumulator clears, back-to-back voxel writes,
// voxel writes with idle gaps, rays that reach full opacity (later samples
// then add nothing), pixel reads. Timing checked: busy for exactly one clock
// after the last voxel write, pixel_valid exactly one clock after pixel_rd.
module tb_render_run #(
  parameter int N       = 16,
  parameter int NDIRS   = 4,
  parameter int GAPS    = 1,     // insert random idle cycles between voxels
  parameter int INSIDE  = 60000,
  parameter int OUTSIDE = 10000
) ();
  import rc_pkg::*;

  logic        clk = 0, rst_n = 0, clear = 0, voxel_we = 0;
  logic [15:0] voxel_in = '0;
  logic        host_mem_sel = 0, host_mem_we = 0;
  logic [15:0] host_mem_addr = '0;
  logic [31:0] host_mem_wdata = '0, host_mem_rdata;
  logic        pixel_rd = 0, pixel_valid, busy;
  logic [31:0] pixel_out;

  rc_coprocessor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_map_wr = 0, n_map_rd = 0, n_handover = 0, n_clear = 0, n_b2b = 0,
      n_gap = 0, n_opaque = 0, n_pix = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  localparam longint WATCHDOG = 64'(N) * N * N * NDIRS * (GAPS != 0 ? 3 : 1) + 64'(N) * N * NDIRS * 8 + 300000;
  initial begin
    while (cycles < WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] vol [];

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

  function automatic int vidx(int dir, int i, int j, int k);
    case (dir)
      0: return (i * N + j) * N + k;            // +Z: (x=i, y=j, z=k)
      1: return (i * N + j) * N + (N - 1 - k);  // -Z
      2: return (i * N + k) * N + j;            // +Y
      default: return (k * N + i) * N + j;      // +X
    endcase
  endfunction

  real e_sum = 0.0, i_sum = 0.0;

  task automatic render(int dir);
    int acc [4], t, v, ent_op;
    logic [31:0] ent, exp_w;
    real fc [4], tr, hw_c, ref_c, d2, i2;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        @(negedge clk); clear = 1;
        @(negedge clk); clear = 0; n_clear++;
        foreach (acc[c]) begin acc[c] = 0; fc[c] = 0.0; end
        for (int k = 0; k < N; k++) begin
          v = int'(vol[vidx(dir, i, j, k)]);
          if (GAPS != 0 && ($urandom % 4) == 0) begin
            n_gap++;
            repeat (1 + $urandom % 2) @(negedge clk);
          end else if (k > 0) n_b2b++;
          voxel_we = 1; voxel_in = 16'(v);
          @(negedge clk); voxel_we = 0;
          // fixed-point model: opacity 1.0 = 2048
          ent = entry(v);
          t = 2048 - acc[3];
          acc[0] += t * int'(ent[31:24]) / 128;
          acc[1] += t * int'(ent[23:16]) / 128;
          acc[2] += t * int'(ent[15:8]) / 128;
          acc[3] += t * int'(ent[7:0]) / 128;
          // double-precision model, unquantised colours
          ent_op = op_of(v);
          tr = 1.0 - fc[3];
          for (int c = 0; c < 3; c++) fc[c] += real'(col_of(v, c)) * (real'(ent_op) / 128.0) * tr;
          fc[3] += (real'(ent_op) / 128.0) * tr;
        end
        // last accumulate happens in this cycle
        checks++;
        if (busy !== 1'b1) begin failures++; $display("busy not set after last voxel"); end
        @(negedge clk);
        checks++;
        if (busy !== 1'b0) begin failures++; $display("busy stuck"); end
        pixel_rd = 1;
        @(negedge clk); pixel_rd = 0;
        checks++;
        if (pixel_valid !== 1'b1) begin failures++; $display("pixel_valid late"); end
        n_pix++;
        exp_w = {8'(acc[0] >> 4), 8'(acc[1] >> 4), 8'(acc[2] >> 4), 8'(acc[3] >> 4)};
        checks++;
        if (pixel_out !== exp_w) begin
          failures++;
          if (failures < 10) $display("dir %0d pixel (%0d,%0d): %h exp %h", dir, i, j, pixel_out, exp_w);
        end
        if (acc[3] == 2048) n_opaque++;
        // image error: host divides premultiplied colour by opacity
        d2 = 0.0; i2 = 0.0;
        for (int c = 0; c < 3; c++) begin
          int pc, pa;
          pc = int'(pixel_out[31 - 8 * c -: 8]);
          pa = int'(pixel_out[7:0]);
          hw_c  = (pa == 0) ? 0.0 : real'(pc) * 128.0 / real'(pa);
          ref_c = (fc[3] == 0.0) ? 0.0 : fc[c] / fc[3];
          d2 += (ref_c - hw_c) * (ref_c - hw_c);
          i2 += ref_c * ref_c;
        end
        e_sum += $sqrt(d2);
        i_sum += $sqrt(i2);
      end
  endtask

  initial begin
    int cc, r2;
    logic [31:0] rd;
    longint t0;
    vol = new[N * N * N];
    cc = N / 2; r2 = (N / 2) * (N / 2);
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++)
        for (int z = 0; z < N; z++)
          vol[(x * N + y) * N + z] = ((x - cc) * (x - cc) + (y - cc) * (y - cc) + (z - cc) * (z - cc) <= r2)
                                     ? 16'(INSIDE) : 16'(OUTSIDE);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load the map table
    @(negedge clk); host_mem_sel = 1; n_handover++;
    for (int a = 0; a < 65536; a++) begin
      host_mem_we = 1; host_mem_addr = 16'(a); host_mem_wdata = entry(a);
      @(negedge clk); n_map_wr++;
    end
    host_mem_we = 0;
    // read part of it back (asynchronous read)
    for (int a = 0; a < 65536; a += 251) begin
      host_mem_addr = 16'(a); #1;
      rd = host_mem_rdata; n_map_rd++;
      checks++;
      if (rd !== entry(a)) begin failures++; $display("map readback %h: %h", a, rd); end
    end
    @(negedge clk); host_mem_sel = 0; n_handover++;
    for (int d = 0; d < NDIRS; d++) begin
      t0 = cycles;
      render(d);
      $display("direction %0d: %0d cycles for %0d voxels", d, cycles - t0, N * N * N);
    end
    // host takes the bus again and checks the table is intact
    @(negedge clk); host_mem_sel = 1; n_handover++;
    host_mem_addr = 16'(INSIDE); #1;
    checks++;
    if (host_mem_rdata !== entry(INSIDE)) begin failures++; $display("table damaged"); end
    @(negedge clk); host_mem_sel = 0;

    $display("relative image error E/I vs double precision: %f %%", 100.0 * e_sum / i_sum);
    $display("counts: map_wr=%0d map_rd=%0d handover=%0d clear=%0d b2b=%0d gap=%0d opaque=%0d pixels=%0d",
             n_map_wr, n_map_rd, n_handover, n_clear, n_b2b, n_gap, n_opaque, n_pix);
    checks++; if (n_map_wr == 0)   begin failures++; $display("no map write"); end
    checks++; if (n_map_rd == 0)   begin failures++; $display("no map read"); end
    checks++; if (n_handover < 2)  begin failures++; $display("no bus handover"); end
    checks++; if (n_clear == 0)    begin failures++; $display("no clear"); end
    checks++; if (n_b2b == 0)      begin failures++; $display("no back-to-back voxels"); end
    checks++; if (GAPS != 0 && n_gap == 0) begin failures++; $display("no voxel gaps"); end
    checks++; if (n_opaque == 0)   begin failures++; $display("no opaque ray"); end
    checks++; if (n_pix == 0)      begin failures++; $display("no pixel read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rc_full: the evaluation workload at full size, coprocessor parameters at
// their defaults: a 128 x 128 x 128 volume of 16-bit voxels holding a sphere
// of radius 64 (inside value 60000, outside 10000), rendered along Z, Y and X
// with voxels streamed back to back. See tb_render_run.
module tb_rc_full;
  tb_render_run #(.N(128), .NDIRS(4), .GAPS(0)) run ();
endmodule

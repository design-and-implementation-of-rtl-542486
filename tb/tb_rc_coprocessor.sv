// tb_rc_coprocessor: end-to-end test of the coprocessor at its default
// parameters on a 16 x 16 x 16 sphere volume, rendered along +Z, -Z, +Y and
// +X with random idle cycles between voxel writes. See tb_render_run.
module tb_rc_coprocessor;
  tb_render_run #(.N(16), .NDIRS(4), .GAPS(1)) run ();
endmodule

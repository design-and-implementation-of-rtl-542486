// rc_pkg: types and constants shared by the ray-caster coprocessor.
//
// A map-table entry is one 32-bit word: a 24-bit RGB colour and an 8-bit
// opacity. The colour is stored already multiplied by its opacity, because
// the compositing datapath accumulates premultiplied colours and has no
// multiplier of its own for that step. Opacity is coded in 8 bits from 0
// (transparent) to 128 (opaque), 129 levels; 1.0 is therefore 128. The
// accumulators hold 8 integer bits plus ACC_W-8 fraction bits. The 32-bit
// entry layout and the fraction-bit split are choices of this design.
package rc_pkg;

  localparam int unsigned VOXEL_W_DEF = 16;   // voxel range 0..65535
  localparam int unsigned COMP_W      = 8;    // one colour/opacity component
  localparam int unsigned WORD_W      = 32;   // map entry and host read width
  localparam int unsigned ACC_W_DEF   = 12;   // standard-quality accumulators
  localparam int unsigned OPACITY_ONE = 128;  // opacity code meaning 1.0
  localparam int unsigned ONE_SHIFT   = 7;    // log2(OPACITY_ONE)

  // {R*, G*, B*, alpha}: MSB to LSB
  typedef struct packed {
    logic [COMP_W-1:0] r;
    logic [COMP_W-1:0] g;
    logic [COMP_W-1:0] b;
    logic [COMP_W-1:0] a;
  } rgba_t;

endpackage

// spiral_sram_pkg: types and constants shared by the spiral-mapped SRAM.
//
// The access direction V/H is carried as an enum: ACC_H (0) reads or
// writes N horizontally consecutive pixels of one picture row, ACC_V (1)
// reads or writes N vertically consecutive pixels of one picture column.
// The encoding (0 = horizontal, 1 = vertical) follows the V/H signal of the
// design; the pixel width of 8 bits is the design's pixel size; the two
// pixels per memory cell group (left/right) follow the eight-parallel
// example, where each cell group stores 16 bits.
package spiral_sram_pkg;

  typedef enum logic {
    ACC_H = 1'b0,
    ACC_V = 1'b1
  } acc_dir_e;

  // Bits per pixel.
  localparam int unsigned PIX_W = 8;

  // Pixels held by one memory cell group of a column block (left, right).
  // The bitline selector is steered by one YL bit, so this is fixed at 2.
  localparam int unsigned PIX_PER_MC = 2;

endpackage

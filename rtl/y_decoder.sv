// y_decoder: the Y-decoder that steers the bitline selector (SEL) of every
// column block between the left-hand and right-hand pixel of a cell group.
//
// YL[k] = 0 selects the left pixel of column block k, 1 the right pixel.
// Yaddr has log2(N)+1 bits: the start column inside a row of 2N pixels.
// Horizontal access: for a start s <= N the first s column blocks take the
// right pixel (YL[k] = 1 for k < s); for s > N the window wraps and
// YL[k] = 1 for k >= s-N. Vertical access: all pixels of one picture
// column sit on the same side, so every YL bit equals Yaddr[log2(N)].
// These are the design's truth tables, written for any power-of-two N.
//
// The table assumes the picture row whose first pixel sits in column
// block 0. For other rows the caller rotates YL by the row's spiral offset
// (done in spiral_sram).
//
// Purely combinational, no clock.
module y_decoder
  import spiral_sram_pkg::*;
#(
  parameter int unsigned N  = 8,
  localparam int unsigned LN = $clog2(N)
) (
  input  logic [LN:0]  yaddr, // Yaddr[LN:0]
  input  acc_dir_e     dir,   // V/H
  output logic [N-1:0] yl
);

  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      if (dir == ACC_V)         yl[k] = yaddr[LN];
      else if (32'(yaddr) <= N) yl[k] = (k < 32'(yaddr));
      else                      yl[k] = (k >= 32'(yaddr) - N);
    end
  end

endmodule

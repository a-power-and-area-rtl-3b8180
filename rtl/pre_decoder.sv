// pre_decoder: the PD block of the X-decoder.
//
// It turns the low address bits Xaddr[log2(N)-1:0] and the access direction
// into the N select lines PX. In a horizontal access PX is one-hot
// (PX[i] = 1 only for i == Xaddr), so each row block passes its row-block
// select to a single global wordline. In a vertical access PX is a
// thermometer code (PX[i] = 1 for i >= Xaddr): wordlines at or above the
// start offset take the row-block select of their own row block, those
// below it take the segmentation-free signal that comes from the previous
// row block. Both truth tables are the design's; widening them to any
// power-of-two N is this implementation's generalisation.
//
// Purely combinational, no clock.
module pre_decoder
  import spiral_sram_pkg::*;
#(
  parameter int unsigned N  = 8,
  localparam int unsigned LN = $clog2(N)
) (
  input  logic [LN-1:0] xaddr_lo, // Xaddr[LN-1:0], start row within a row block
  input  acc_dir_e      dir,      // V/H
  output logic [N-1:0]  px        // select of each GWL position in a row block
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      if (dir == ACC_V) px[i] = (i >= 32'(xaddr_lo));
      else              px[i] = (i == 32'(xaddr_lo));
    end
  end

endmodule

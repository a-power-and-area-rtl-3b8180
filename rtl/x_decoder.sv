// x_decoder: global-wordline decoder with the segmentation-free mechanism.
//
// The array has NRB row blocks of N global wordlines each; GWL number
// j*N + i is position i of row block j, and picture row r sits on GWL r.
// Xaddr[top:LN] selects a row block (row-block selector j gives D_j) and
// Xaddr[LN-1:0] goes to the pre-decoder (PD), which produces PX.
// Each GWL of row block j is driven by one of two sources chosen by PX[i]:
//   PX[i] = 1 : D_j, the row block's own select;
//   PX[i] = 0 : the segmentation-free signal S_j = D_(j-1) & !D_j & V/H.
// Horizontal access: PX is one-hot and S_j is 0, so only GWL Xaddr rises.
// Vertical access: PX is a thermometer code, so GWLs Xaddr .. Xaddr+N-1 rise,
// the upper part in row block j and the lower positions of row block j+1
// through S_(j+1). Exactly N wordlines are always active.
// This structure is the design's. Row block 0 takes D_(NRB-1) as its
// "previous" select, so a vertical access starting in the last row block
// wraps to row 0; that wrap, and ignoring row-block addresses >= NRB
// (nothing is selected), are this implementation's choices.
//
// Purely combinational, no clock.
module x_decoder
  import spiral_sram_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned NRB = 160,
  localparam int unsigned LN = $clog2(N),
  localparam int unsigned XW = $clog2(N * NRB)
) (
  input  logic [XW-1:0]    xaddr, // picture row of the (first) accessed pixel
  input  acc_dir_e         dir,   // V/H
  output logic [NRB*N-1:0] gwl    // global wordlines
);

  logic [N-1:0]   px;
  logic [NRB-1:0] d;      // row-block selects D_j
  logic [NRB-1:0] segf;   // segmentation-free signals S_j

  pre_decoder #(.N(N)) u_pd (
    .xaddr_lo(xaddr[LN-1:0]),
    .dir     (dir),
    .px      (px)
  );

  always_comb begin
    for (int unsigned j = 0; j < NRB; j++)
      d[j] = (32'(xaddr[XW-1:LN]) == j);
    for (int unsigned j = 0; j < NRB; j++)
      segf[j] = d[(j + NRB - 1) % NRB] && !d[j] && (dir == ACC_V);
    for (int unsigned j = 0; j < NRB; j++)
      for (int unsigned i = 0; i < N; i++)
        gwl[j*N + i] = px[i] ? d[j] : segf[j];
  end

endmodule

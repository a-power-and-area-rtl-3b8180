// lwls_selector: the "LWLS sel." block driving the local-wordline select bus.
//
// The N LWLS lines run through every column block and are connected
// spirally to the local-wordline drivers (see column_block). In a vertical
// access only LWLS[Yaddr[log2(N)-1:0]] is true, so that each column block
// opens exactly one of the N activated global wordlines and no bitline sees
// two cells. In a horizontal access all LWLS lines are true, because only
// one global wordline is active. Both rules are the design's.
//
// Purely combinational, no clock.
module lwls_selector
  import spiral_sram_pkg::*;
#(
  parameter int unsigned N  = 8,
  localparam int unsigned LN = $clog2(N)
) (
  input  logic [LN-1:0] yaddr_lo, // Yaddr[LN-1:0], picture column modulo N
  input  acc_dir_e      dir,      // V/H
  output logic [N-1:0]  lwls
);

  always_comb begin
    for (int unsigned j = 0; j < N; j++)
      lwls[j] = (dir == ACC_H) || (j == 32'(yaddr_lo));
  end

endmodule

// barrel_shifter: rotates N pixel lanes by a variable amount.
//
// Column block k of the spiral-mapped array always delivers its pixel on
// lane k, but which picture pixel that is depends on the access: picture
// pixel i of an access lies in column block (i + shift) mod N. The read
// side (INVERSE = 0) puts it back in order for the N processing elements:
// out[i] = in[(i + shift) mod N]. The write side (INVERSE = 1) does the
// opposite so that write data given in picture order reach the right
// column blocks: out[(i + shift) mod N] = in[i].
// The design places a barrel shifter between the array and the parallel
// datapath; its construction (a plain multiplexer rotation) and the write
// side copy are this implementation's.
//
// Purely combinational, no clock.
module barrel_shifter #(
  parameter int unsigned N       = 8,
  parameter int unsigned W       = 8,
  parameter bit          INVERSE = 1'b0,
  localparam int unsigned LN     = $clog2(N)
) (
  input  logic [N-1:0][W-1:0] din,
  input  logic [LN-1:0]       shift,
  output logic [N-1:0][W-1:0] dout
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      logic [LN-1:0] j;
      if (INVERSE) j = LN'(i) - shift;
      else         j = LN'(i) + shift;
      dout[i] = din[j];
    end
  end

endmodule

// column_block: one division (column block K) of the spiral-mapped array.
//
// Every global wordline g crosses all column blocks. Inside column block K
// the cell group on GWL g is opened by its local-wordline driver when
//   LWL[g] = GWL[g] & LWLS[(K - g) mod N],
// i.e. the LWLS bus is tapped with an offset that turns by one line per
// wordline and by one line per column block: the spiral connection. With
// the spiral mapping of the picture (pixel (r, c) stored in column block
// (c + r) mod N, on GWL r, in the left cell for c mod 2N < N and in the
// right cell otherwise) a vertical access, with N GWLs up and a one-hot
// LWLS, opens exactly one cell group per column block; a horizontal access
// opens the single active GWL everywhere. The bitline selector SEL then
// picks the left (YL = 0) or right (YL = 1) pixel for the sense amplifier
// (read) or the write circuit (write). The cell groups hold 2 pixels each.
// The connection rule and the SEL are the design's; the tap offset
// (K - g) mod N is read from its mapping figures.
//
// Each of the NRD read ports and the write port has its own wordlines,
// LWLS and YL, so they can access different places in the same cycle.
// The cells are a plain array: the opened local wordline is encoded to a
// row index, which is what a word-addressed memory needs. More than one
// open wordline on a port is the bitline multi-selection the decoders are
// built to prevent; an assertion reports it.
//
// Timing: wordlines, LWLS and YL are sampled at the rising clock edge.
// A write stores its pixel at that edge. A read delivers its pixel in
// rd_data from that edge on (one cycle latency) and keeps it until the next
// read on the port; a read of a pixel written at the same edge returns the
// old value. These timing choices are this implementation's.
module column_block
  import spiral_sram_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned NRB   = 160,
  parameter int unsigned K     = 0,
  parameter int unsigned NRD   = 2,
  localparam int unsigned ROWS = NRB * N,
  localparam int unsigned RW   = $clog2(ROWS)
) (
  input  logic                       clk,
  // read ports
  input  logic [NRD-1:0]             rd_en,
  input  logic [NRD-1:0][ROWS-1:0]   rd_gwl,
  input  logic [NRD-1:0][N-1:0]      rd_lwls,
  input  logic [NRD-1:0]             rd_yl,
  output logic [NRD-1:0][PIX_W-1:0]  rd_data,
  // write port
  input  logic                       wr_en,
  input  logic [ROWS-1:0]            wr_gwl,
  input  logic [N-1:0]               wr_lwls,
  input  logic                       wr_yl,
  input  logic [PIX_W-1:0]           wr_data
);

  // Cell groups: one entry per GWL, PIX_PER_MC pixels each.
  logic [PIX_PER_MC-1:0][PIX_W-1:0] mem [ROWS];

  // Opened local wordline of each port, as row index.
  logic [NRD-1:0][RW-1:0] rd_row;
  logic [NRD-1:0]         rd_hit, rd_multi;
  logic [RW-1:0]          wr_row;
  logic                   wr_hit, wr_multi;

  always_comb begin
    for (int unsigned p = 0; p < NRD; p++) begin
      rd_row[p]   = '0;
      rd_hit[p]   = 1'b0;
      rd_multi[p] = 1'b0;
      for (int unsigned g = 0; g < ROWS; g++) begin
        if (rd_gwl[p][g] && rd_lwls[p][(K + N - (g % N)) % N]) begin
          rd_multi[p] = rd_hit[p];
          rd_hit[p]   = 1'b1;
          rd_row[p]   = RW'(g);
        end
      end
    end
    wr_row   = '0;
    wr_hit   = 1'b0;
    wr_multi = 1'b0;
    for (int unsigned g = 0; g < ROWS; g++) begin
      if (wr_gwl[g] && wr_lwls[(K + N - (g % N)) % N]) begin
        wr_multi = wr_hit;
        wr_hit   = 1'b1;
        wr_row   = RW'(g);
      end
    end
  end

  // Write circuit through SEL.
  always_ff @(posedge clk) begin
    if (wr_en && wr_hit)
      mem[wr_row][wr_yl] <= wr_data;
  end

  // Sense amplifiers through SEL. No open wordline reads as 0.
  always_ff @(posedge clk) begin
    for (int unsigned p = 0; p < NRD; p++) begin
      if (rd_en[p])
        rd_data[p] <= rd_hit[p] ? mem[rd_row[p]][rd_yl[p]] : '0;
    end
  end

  // Bitline multi-selection never happens with legal decoder outputs.
  always_ff @(posedge clk) begin
    for (int unsigned p = 0; p < NRD; p++)
      if (rd_en[p])
        assert (!rd_multi[p])
          else $error("column block %0d: read port %0d opened several wordlines", K, p);
    if (wr_en)
      assert (!wr_multi)
        else $error("column block %0d: write port opened several wordlines", K);
  end

endmodule

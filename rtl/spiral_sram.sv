// spiral_sram: segmentation-free horizontal/vertical access SRAM for an
// N-parallel video datapath (top level).
//
// A picture strip 2N pixels wide and NRB*N rows high is stored spirally:
// pixel (r, c) lives on global wordline r, in column block (c + r) mod N,
// in the left cell for c < N and the right cell for c >= N. Because every
// picture row is turned by one column block against the row above, any N
// horizontally consecutive pixels of a row and any N vertically
// consecutive pixels of a column lie in N different column blocks and can
// be read or written in a single access. Each port has
//   - an X-decoder (row-block selectors, pre-decoder, segmentation-free
//     mechanism) that raises one GWL (horizontal) or N consecutive GWLs
//     from any start row (vertical),
//   - an LWLS selector whose spirally tapped lines let each column block
//     open just one of those wordlines,
//   - a Y-decoder that sets each column block's left/right selector,
//   - a barrel shifter that brings the N column-block pixels into picture
//     order (reads) or out of it (writes).
// There are NRD read ports and one write port, each with its own address;
// the default sizes (N = 8, two read ports, 1280 x 16 pixels = 160 kbit)
// are those of the search window buffer the design was built as.
//
// Address of an access: xaddr = picture row of the first pixel,
// yaddr = picture column of the first pixel (0 .. 2N-1); the pixels are
// (xaddr, yaddr+i mod 2N) for a horizontal access and
// (xaddr+i mod NRB*N, yaddr) for a vertical one, i = 0 .. N-1, delivered
// on rd_data[p][i] / taken from wr_data[i].
// Horizontal windows wrap around the 2N-pixel row, as the Y-decoder table
// does. Vertical windows wrap from the last row to row 0 (this
// implementation's choice).
//
// One departure from the Y-decoder table: the table gives the selector
// pattern for a row whose pixel 0 is in column block 0. For row r the same
// pattern is needed turned by r mod N column blocks, so the YL lines are
// rotated by xaddr[LN-1:0] before they reach the column blocks. In a
// vertical access all YL bits are equal and the rotation changes nothing.
//
// Timing: addresses, enables and write data are sampled at the rising edge
// of clk. Write data are stored at that edge. Read data appear after the
// edge with rd_valid[p] high for that one cycle and stay until the next
// read on the port. rst_n (active low, synchronous) clears rd_valid only;
// the cell contents are not reset.
module spiral_sram
  import spiral_sram_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned NRB  = 160,
  parameter int unsigned NRD  = 2,
  localparam int unsigned LN   = $clog2(N),
  localparam int unsigned ROWS = NRB * N,
  localparam int unsigned XW   = $clog2(ROWS)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // read ports
  input  logic     [NRD-1:0]                rd_en,
  input  acc_dir_e [NRD-1:0]                rd_dir,
  input  logic     [NRD-1:0][XW-1:0]        rd_xaddr,
  input  logic     [NRD-1:0][LN:0]          rd_yaddr,
  output logic     [NRD-1:0]                rd_valid,
  output logic     [NRD-1:0][N-1:0][PIX_W-1:0] rd_data,
  // write port
  input  logic                              wr_en,
  input  acc_dir_e                          wr_dir,
  input  logic     [XW-1:0]                 wr_xaddr,
  input  logic     [LN:0]                   wr_yaddr,
  input  logic     [N-1:0][PIX_W-1:0]       wr_data
);

  // ---------------------------------------------------------------- read-port decoders
  logic [NRD-1:0][ROWS-1:0]  rd_gwl;
  logic [NRD-1:0][N-1:0]     rd_lwls;
  logic [NRD-1:0][N-1:0]     rd_yl_tab, rd_yl;
  logic [NRD-1:0][LN-1:0]    rd_shift, rd_shift_q;
  logic [NRD-1:0][N-1:0][PIX_W-1:0] rd_lane;   // pixel of column block k

  for (genvar p = 0; p < NRD; p++) begin : g_rd
    x_decoder #(.N(N), .NRB(NRB)) u_xdec (
      .xaddr(rd_xaddr[p]), .dir(rd_dir[p]), .gwl(rd_gwl[p])
    );
    lwls_selector #(.N(N)) u_lwls (
      .yaddr_lo(rd_yaddr[p][LN-1:0]), .dir(rd_dir[p]), .lwls(rd_lwls[p])
    );
    y_decoder #(.N(N)) u_ydec (
      .yaddr(rd_yaddr[p]), .dir(rd_dir[p]), .yl(rd_yl_tab[p])
    );
    barrel_shifter #(.N(N), .W(PIX_W), .INVERSE(1'b0)) u_bsh (
      .din(rd_lane[p]), .shift(rd_shift_q[p]), .dout(rd_data[p])
    );
    assign rd_shift[p] = rd_xaddr[p][LN-1:0] + rd_yaddr[p][LN-1:0];
  end

  // ---------------------------------------------------------------- write-port decoders
  logic [ROWS-1:0]          wr_gwl;
  logic [N-1:0]             wr_lwls, wr_yl_tab, wr_yl;
  logic [LN-1:0]            wr_shift;
  logic [N-1:0][PIX_W-1:0]  wr_lane;

  x_decoder #(.N(N), .NRB(NRB)) u_wxdec (
    .xaddr(wr_xaddr), .dir(wr_dir), .gwl(wr_gwl)
  );
  lwls_selector #(.N(N)) u_wlwls (
    .yaddr_lo(wr_yaddr[LN-1:0]), .dir(wr_dir), .lwls(wr_lwls)
  );
  y_decoder #(.N(N)) u_wydec (
    .yaddr(wr_yaddr), .dir(wr_dir), .yl(wr_yl_tab)
  );
  assign wr_shift = wr_xaddr[LN-1:0] + wr_yaddr[LN-1:0];
  barrel_shifter #(.N(N), .W(PIX_W), .INVERSE(1'b1)) u_wbsh (
    .din(wr_data), .shift(wr_shift), .dout(wr_lane)
  );

  // ---------------------------------------------------------------- YL turned by the row's spiral offset
  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      for (int unsigned p = 0; p < NRD; p++)
        rd_yl[p][k] = rd_yl_tab[p][LN'(LN'(k) - rd_xaddr[p][LN-1:0])];
      wr_yl[k] = wr_yl_tab[LN'(LN'(k) - wr_xaddr[LN-1:0])];
    end
  end

  // ---------------------------------------------------------------- column blocks
  for (genvar k = 0; k < N; k++) begin : g_cb
    logic [NRD-1:0]            cb_yl;
    logic [NRD-1:0][PIX_W-1:0] cb_data;

    for (genvar p = 0; p < NRD; p++) begin : g_p
      assign cb_yl[p]      = rd_yl[p][k];
      assign rd_lane[p][k] = cb_data[p];
    end

    column_block #(.N(N), .NRB(NRB), .K(k), .NRD(NRD)) u_cb (
      .clk    (clk),
      .rd_en  (rd_en),
      .rd_gwl (rd_gwl),
      .rd_lwls(rd_lwls),
      .rd_yl  (cb_yl),
      .rd_data(cb_data),
      .wr_en  (wr_en),
      .wr_gwl (wr_gwl),
      .wr_lwls(wr_lwls),
      .wr_yl  (wr_yl[k]),
      .wr_data(wr_lane[k])
    );
  end

  // ---------------------------------------------------------------- read timing
  always_ff @(posedge clk) begin
    for (int unsigned p = 0; p < NRD; p++)
      if (rd_en[p]) rd_shift_q[p] <= rd_shift[p];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rd_valid <= '0;
    else        rd_valid <= rd_en;
  end

endmodule

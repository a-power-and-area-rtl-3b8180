// column_block_tb: checks one column block (K = 3 of 8, 2 row blocks).
//
// The wordlines are driven directly. Writes and reads use either the
// horizontal pattern (one GWL, all LWLS lines true) or the vertical pattern
// (eight consecutive GWLs, one LWLS line j). In the vertical case the
// block must open the one row g of the eight with (3 - g) mod 8 == j.
// A reference array gives the expected pixels; the bitline selector bit
// picks the left or right pixel. Reads are checked one cycle after they
// are issued (the block's read latency), on both read ports at once.
// Ends with a TB_RESULT line.
module column_block_tb;
  import spiral_sram_pkg::*;

  localparam int N = 8, NRB = 2, ROWS = N * NRB, K = 3, NRD = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [NRD-1:0]            rd_en;
  logic [NRD-1:0][ROWS-1:0]  rd_gwl;
  logic [NRD-1:0][N-1:0]     rd_lwls;
  logic [NRD-1:0]            rd_yl;
  logic [NRD-1:0][PIX_W-1:0] rd_data;
  logic                      wr_en;
  logic [ROWS-1:0]           wr_gwl;
  logic [N-1:0]              wr_lwls;
  logic                      wr_yl;
  logic [PIX_W-1:0]          wr_data;

  column_block #(.N(N), .NRB(NRB), .K(K), .NRD(NRD)) dut (.*);

  logic [PIX_W-1:0] ref_mem [ROWS][2];

  // Wordline patterns. Returns the row that the block must open.
  function automatic int pattern(input bit vert, input int start, input int j,
                                 output logic [ROWS-1:0] gwl, output logic [N-1:0] lwls);
    int row = -1;
    gwl  = '0;
    lwls = '0;
    if (!vert) begin
      gwl[start] = 1'b1;
      lwls       = '1;
      row        = start;
    end else begin
      lwls[j] = 1'b1;
      for (int i = 0; i < N; i++) begin
        int g = (start + i) % ROWS;
        gwl[g] = 1'b1;
        if ((K - g + 8 * N) % N == j) row = g;
      end
    end
    return row;
  endfunction

  initial begin
    int exp_row [NRD];
    bit exp_sel [NRD];
    bit pending [NRD];
    rd_en = '0; wr_en = 1'b0;
    rd_gwl = '0; rd_lwls = '0; rd_yl = '0;
    wr_gwl = '0; wr_lwls = '0; wr_yl = 1'b0; wr_data = '0;
    // fill: horizontal pattern, both pixels of every row
    for (int r = 0; r < ROWS; r++)
      for (int s = 0; s < 2; s++) begin
        void'(pattern(1'b0, r, 0, wr_gwl, wr_lwls));
        wr_en   = 1'b1;
        wr_yl   = s[0];
        wr_data = 8'($urandom);
        ref_mem[r][s] = wr_data;
        @(posedge clk);
        #1;
      end
    wr_en = 1'b0;
    pending = '{default: 0};
    // random mix of reads and writes
    for (int t = 0; t < 400; t++) begin
      // issue
      for (int p = 0; p < NRD; p++) begin
        bit vert;
        int start;
        int j;
        vert = 1'($urandom);
        start = $urandom_range(ROWS - 1);
        j = $urandom_range(N - 1);
        rd_en[p]   = 1'($urandom);
        exp_row[p] = pattern(vert, start, j, rd_gwl[p], rd_lwls[p]);
        rd_yl[p]   = 1'($urandom);
        exp_sel[p] = rd_yl[p];
      end
      begin
        bit vert;
        int start;
        int j;
        int row;
        vert = 1'($urandom);
        start = $urandom_range(ROWS - 1);
        j = $urandom_range(N - 1);
        wr_en   = ($urandom_range(3) == 0);
        row     = pattern(vert, start, j, wr_gwl, wr_lwls);
        wr_yl   = 1'($urandom);
        wr_data = 8'($urandom);
        // expected read values are the contents before this edge
        @(posedge clk);
        #1;
        for (int p = 0; p < NRD; p++)
          if (rd_en[p]) begin
            checks++;
            if (rd_data[p] !== ref_mem[exp_row[p]][exp_sel[p]]) begin
              failures++;
              $display("FAIL port %0d row %0d sel %0d: got %h expected %h", p,
                       exp_row[p], exp_sel[p], rd_data[p], ref_mem[exp_row[p]][exp_sel[p]]);
            end
          end
        if (wr_en) ref_mem[row][wr_yl] = wr_data;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

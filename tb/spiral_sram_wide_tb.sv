// spiral_sram_wide_tb: the end-to-end test of spiral_sram_tb run on a
// super-parallel configuration: 128 column blocks (128 pixels per access,
// rows of 256 pixels) and 5 row blocks of 128 rows, two read ports.
//
// The procedure, reference model and mechanism counters are those of
// spiral_sram_tb: fill by horizontal writes, then a random mix of
// horizontal/vertical reads on both ports and horizontal/vertical writes,
// every read checked one cycle later against the reference picture.
// Ends with a TB_RESULT line.
module spiral_sram_wide_tb;
  import spiral_sram_pkg::*;

  localparam int N = 128, NRB = 5, NRD = 2, ROWS = N * NRB, COLS = 2 * N;
  localparam int XW = $clog2(ROWS), LN = $clog2(N);
  localparam int RANDOM_CYCLES = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                              rst_n;
  logic     [NRD-1:0]                rd_en;
  acc_dir_e [NRD-1:0]                rd_dir;
  logic     [NRD-1:0][XW-1:0]        rd_xaddr;
  logic     [NRD-1:0][LN:0]          rd_yaddr;
  logic     [NRD-1:0]                rd_valid;
  logic     [NRD-1:0][N-1:0][PIX_W-1:0] rd_data;
  logic                              wr_en;
  acc_dir_e                          wr_dir;
  logic     [XW-1:0]                 wr_xaddr;
  logic     [LN:0]                   wr_yaddr;
  logic     [N-1:0][PIX_W-1:0]       wr_data;

  spiral_sram #(.N(N), .NRB(NRB), .NRD(NRD)) dut (.*);

  logic [PIX_W-1:0] pic [ROWS][COLS];

  // mechanism counters
  typedef enum int {
    M_RD_H, M_RD_V, M_WR_H, M_WR_V, M_H_MIXED, M_H_WRAP, M_V_CROSS, M_V_WRAP,
    M_SPIRAL_OFS, M_BOTH_PORTS, M_RD_WR_SAME, M_OUT_OF_RANGE, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"horizontal read", "vertical read", "horizontal write",
    "vertical write", "left/right mixed window", "row wrap-around window",
    "row-block crossing", "last-to-first row wrap", "non-zero spiral offset",
    "both read ports", "read meets write", "row address past end"};

  // pixel i of an access
  function automatic void coord(input bit vert, input int x, input int y, input int i,
                                output int r, output int c);
    if (vert) begin r = (x + i) % ROWS; c = y; end
    else      begin r = x;              c = (y + i) % COLS; end
  endfunction

  initial begin
    logic [N-1:0][PIX_W-1:0] exp [NRD];
    bit                      exp_on [NRD];
    rst_n = 1'b0;
    rd_en = '0; rd_dir = '{default: ACC_H}; rd_xaddr = '0; rd_yaddr = '0;
    wr_en = 1'b0; wr_dir = ACC_H; wr_xaddr = '0; wr_yaddr = '0; wr_data = '0;
    mech = '{default: 0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // fill the whole picture with horizontal writes
    for (int r = 0; r < ROWS; r++)
      for (int h = 0; h < 2; h++) begin
        wr_en = 1'b1; wr_dir = ACC_H; wr_xaddr = XW'(r); wr_yaddr = (LN+1)'(h * N);
        for (int i = 0; i < N; i++) begin
          wr_data[i] = 8'($urandom);
          pic[r][h * N + i] = wr_data[i];
        end
        @(posedge clk);
        #1;
      end
    wr_en = 1'b0;

    for (int t = 0; t < RANDOM_CYCLES + 1; t++) begin
      bit last;
      last = (t == RANDOM_CYCLES);
      // issue reads
      for (int p = 0; p < NRD; p++) begin
        bit vert;
        int x;
        int y;
        vert = 1'($urandom);
        x = ($urandom_range(63) == 0) ? $urandom_range((1 << XW) - 1) : $urandom_range(ROWS - 1);
        y = $urandom_range(COLS - 1);
        rd_en[p]    = !last && ($urandom_range(3) != 0);
        rd_dir[p]   = vert ? ACC_V : ACC_H;
        rd_xaddr[p] = XW'(x);
        rd_yaddr[p] = (LN+1)'(y);
        exp_on[p]   = rd_en[p];
        for (int i = 0; i < N; i++) begin
          int r, c;
          coord(vert, x, y, i, r, c);
          exp[p][i] = (x < ROWS) ? pic[r][c] : '0;
        end
        if (rd_en[p]) begin
          mech[vert ? M_RD_V : M_RD_H]++;
          if (x >= ROWS) mech[M_OUT_OF_RANGE]++;
          else if (!vert) begin
            if (y % N != 0) mech[M_H_MIXED]++;
            if (y > N) mech[M_H_WRAP]++;
            if (x % N != 0 && y % N != 0) mech[M_SPIRAL_OFS]++;
          end else begin
            if (x % N != 0) mech[M_V_CROSS]++;
            if (x + N > ROWS) mech[M_V_WRAP]++;
          end
        end
      end
      if (rd_en == '1) mech[M_BOTH_PORTS]++;
      // issue a write
      begin
        bit vert;
        int x;
        int y;
        vert = 1'($urandom);
        x = ($urandom_range(63) == 0) ? $urandom_range((1 << XW) - 1) : $urandom_range(ROWS - 1);
        y = $urandom_range(COLS - 1);
        // now and then aim the write at what port 0 reads
        if ($urandom_range(7) == 0) begin
          x = rd_xaddr[0]; y = rd_yaddr[0]; vert = (rd_dir[0] == ACC_V);
        end
        wr_en    = !last && ($urandom_range(1) == 0);
        wr_dir   = vert ? ACC_V : ACC_H;
        wr_xaddr = XW'(x);
        wr_yaddr = (LN+1)'(y);
        for (int i = 0; i < N; i++) wr_data[i] = 8'($urandom);
        if (wr_en) begin
          mech[vert ? M_WR_V : M_WR_H]++;
          if (rd_en[0] && x < ROWS && wr_xaddr == rd_xaddr[0] && wr_yaddr == rd_yaddr[0])
            mech[M_RD_WR_SAME]++;
        end
        @(posedge clk);
        #1;
        if (wr_en && x < ROWS)
          for (int i = 0; i < N; i++) begin
            int r, c;
            coord(vert, x, y, i, r, c);
            pic[r][c] = wr_data[i];
          end
      end
      // one cycle later: check reads
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rd_valid[p] !== exp_on[p]) begin
          failures++;
          $display("FAIL t=%0d port %0d: rd_valid=%0d expected %0d", t, p, rd_valid[p], exp_on[p]);
        end else if (exp_on[p] && rd_data[p] !== exp[p]) begin
          failures++;
          if (failures < 20)
            $display("FAIL t=%0d port %0d dir=%0d x=%0d y=%0d: got %h expected %h", t, p,
                     rd_dir[p], rd_xaddr[p], rd_yaddr[p], rd_data[p], exp[p]);
        end
      end
    end

    for (int m = 0; m < M_NUM; m++) begin
      $display("  %-26s %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (RANDOM_CYCLES + 2 * ROWS + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// x_decoder_tb: checks the global wordlines for every row address.
//
// For all 2^11 values of Xaddr and both directions the GWL vector of the
// default 160-row-block decoder is compared with the expected set: the one
// row Xaddr (horizontal), or the eight rows Xaddr .. Xaddr+7 taken modulo
// 1280 (vertical), and nothing for addresses past the last row. It also
// counts vertical accesses that cross a row-block boundary (served by the
// segmentation-free mechanism) and the wrap from the last row block to
// the first, and fails if either never occurred. Ends with a TB_RESULT line.
module x_decoder_tb;
  import spiral_sram_pkg::*;

  localparam int N = 8, NRB = 160, ROWS = N * NRB;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cross = 0, n_wrap = 0;

  logic [10:0]     xaddr;
  acc_dir_e        dir;
  logic [ROWS-1:0] gwl;

  x_decoder dut (.xaddr, .dir, .gwl);

  initial begin
    for (int d = 0; d < 2; d++)
      for (int x = 0; x < 2048; x++) begin
        logic [ROWS-1:0] exp;
        dir   = acc_dir_e'(d);
        xaddr = 11'(x);
        @(posedge clk);
        exp = '0;
        if (x < ROWS) begin
          if (d == 0) exp[x] = 1'b1;
          else
            for (int i = 0; i < N; i++) exp[(x + i) % ROWS] = 1'b1;
          if (d == 1 && x % N != 0) n_cross++;
          if (d == 1 && x + N > ROWS) n_wrap++;
        end
        checks++;
        if (gwl !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL dir=%0d xaddr=%0d: %0d wordlines up", d, x, $countones(gwl));
        end
      end
    checks += 2;
    if (n_cross == 0) begin failures++; $display("FAIL no row-block crossing exercised"); end
    if (n_wrap  == 0) begin failures++; $display("FAIL no wrap-around exercised"); end
    $display("row-block crossings=%0d wraps=%0d", n_cross, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

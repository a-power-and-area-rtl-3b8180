// lwls_selector_tb: checks the LWLS selector against its truth table.
//
// Vertical access: LWLS must follow the one-hot table indexed by
// Yaddr[2:0] (LWLS[0] leftmost below). Horizontal access: all eight lines
// must be true whatever Yaddr is. Ends with a TB_RESULT line.
module lwls_selector_tb;
  import spiral_sram_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [2:0] yaddr_lo;
  acc_dir_e   dir;
  logic [7:0] lwls;

  lwls_selector dut (.yaddr_lo, .dir, .lwls);

  localparam logic [0:7] TAB_V [8] = '{
    8'b1000_0000, 8'b0100_0000, 8'b0010_0000, 8'b0001_0000,
    8'b0000_1000, 8'b0000_0100, 8'b0000_0010, 8'b0000_0001};

  initial begin
    for (int d = 0; d < 2; d++)
      for (int y = 0; y < 8; y++) begin
        logic [0:7] exp;
        dir      = acc_dir_e'(d);
        yaddr_lo = 3'(y);
        @(posedge clk);
        exp = (d == 1) ? TAB_V[y] : 8'hFF;
        checks++;
        for (int j = 0; j < 8; j++)
          if (lwls[j] !== exp[j]) begin
            failures++;
            $display("FAIL dir=%0d yaddr=%0d lwls=%b", d, y, lwls);
            break;
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

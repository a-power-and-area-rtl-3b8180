// y_decoder_tb: checks the Y-decoder against its two truth tables.
//
// All sixteen Yaddr[3:0] values are applied in both directions and YL is
// compared with the horizontal and vertical tables typed in below (YL[0]
// leftmost). Ends with a TB_RESULT line.
module y_decoder_tb;
  import spiral_sram_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] yaddr;
  acc_dir_e   dir;
  logic [7:0] yl;

  y_decoder dut (.yaddr, .dir, .yl);

  localparam logic [0:7] TAB_H [16] = '{
    8'b0000_0000, 8'b1000_0000, 8'b1100_0000, 8'b1110_0000,
    8'b1111_0000, 8'b1111_1000, 8'b1111_1100, 8'b1111_1110,
    8'b1111_1111, 8'b0111_1111, 8'b0011_1111, 8'b0001_1111,
    8'b0000_1111, 8'b0000_0111, 8'b0000_0011, 8'b0000_0001};
  localparam logic [0:7] TAB_V [16] = '{
    8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
    8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF};

  initial begin
    for (int d = 0; d < 2; d++)
      for (int y = 0; y < 16; y++) begin
        logic [0:7] exp;
        dir   = acc_dir_e'(d);
        yaddr = 4'(y);
        @(posedge clk);
        exp = (d == 1) ? TAB_V[y] : TAB_H[y];
        checks++;
        for (int k = 0; k < 8; k++)
          if (yl[k] !== exp[k]) begin
            failures++;
            $display("FAIL dir=%0d yaddr=%0d yl=%b", d, y, yl);
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

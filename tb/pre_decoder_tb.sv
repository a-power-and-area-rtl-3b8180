// pre_decoder_tb: checks the pre-decoder against its two truth tables.
//
// Every Xaddr[2:0] is applied in both directions and PX is compared with
// the horizontal (one-hot) and vertical (thermometer) tables, typed in
// below with PX[0] as the leftmost bit. Ends with a TB_RESULT line.
module pre_decoder_tb;
  import spiral_sram_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [2:0]  xaddr_lo;
  acc_dir_e    dir;
  logic [7:0]  px;

  pre_decoder dut (.xaddr_lo, .dir, .px);

  // Rows indexed by Xaddr[2:0]; bit [0] of PX on the left.
  localparam logic [0:7] TAB_H [8] = '{
    8'b1000_0000, 8'b0100_0000, 8'b0010_0000, 8'b0001_0000,
    8'b0000_1000, 8'b0000_0100, 8'b0000_0010, 8'b0000_0001};
  localparam logic [0:7] TAB_V [8] = '{
    8'b1111_1111, 8'b0111_1111, 8'b0011_1111, 8'b0001_1111,
    8'b0000_1111, 8'b0000_0111, 8'b0000_0011, 8'b0000_0001};

  task automatic check(input logic [0:7] exp);
    checks++;
    for (int i = 0; i < 8; i++)
      if (px[i] !== exp[i]) begin
        failures++;
        $display("FAIL dir=%0d xaddr=%0d px=%b expected PX[%0d]=%0d",
                 dir, xaddr_lo, px, i, exp[i]);
        break;
      end
  endtask

  initial begin
    for (int d = 0; d < 2; d++)
      for (int x = 0; x < 8; x++) begin
        dir      = acc_dir_e'(d);
        xaddr_lo = 3'(x);
        @(posedge clk);
        check(d == 1 ? TAB_V[x] : TAB_H[x]);
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

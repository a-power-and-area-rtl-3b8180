// barrel_shifter_tb: checks the read-side and write-side rotators.
//
// Random lane data and every shift amount are applied to both variants.
// Read side: out[i] must equal in[(i+shift) mod 8]. Write side: out[(i+shift)
// mod 8] must equal in[i], and feeding the read side with the write side's
// output must give the original data back. Ends with a TB_RESULT line.
module barrel_shifter_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0][7:0] din, drd, dwr, dround;
  logic [2:0]      shift;

  barrel_shifter #(.N(8), .W(8), .INVERSE(1'b0)) u_rd (.din(din), .shift(shift), .dout(drd));
  barrel_shifter #(.N(8), .W(8), .INVERSE(1'b1)) u_wr (.din(din), .shift(shift), .dout(dwr));
  barrel_shifter #(.N(8), .W(8), .INVERSE(1'b0)) u_rt (.din(dwr), .shift(shift), .dout(dround));

  initial begin
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < 8; i++) din[i] = 8'($urandom);
      shift = 3'(t);
      @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        checks += 3;
        if (drd[i] !== din[(i + t) % 8]) begin
          failures++;
          $display("FAIL read side shift=%0d lane %0d", t % 8, i);
        end
        if (dwr[(i + t) % 8] !== din[i]) begin
          failures++;
          $display("FAIL write side shift=%0d lane %0d", t % 8, i);
        end
        if (dround[i] !== din[i]) begin
          failures++;
          $display("FAIL round trip shift=%0d lane %0d", t % 8, i);
        end
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

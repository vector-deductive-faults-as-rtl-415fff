// tb_hmatrix_synth: checks the recursive H-matrix builder at N = 3 and N = 2.
// Every entry is compared with r xor c (the fault combination c read on input
// set r), every row must be a permutation, the rows 4 and 5 of the 3-input
// matrix are compared with their printed values (4 5 6 7 0 1 2 3 and
// 5 4 7 6 1 0 3 2), and done must be seen N clocks after the clock that takes start.
module tb_hmatrix_synth;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       s3, b3, d3;
  logic [2:0] r3;
  logic [2:0] h3 [8];
  logic       s2, b2, d2;
  logic [1:0] r2;
  logic [1:0] h2 [4];

  hmatrix_synth #(.N(3)) dut3 (.clk, .rst_n, .start(s3), .busy(b3), .done(d3), .rd_row(r3), .rd_data(h3));
  hmatrix_synth       dut2 (.clk, .rst_n, .start(s2), .busy(b2), .done(d2), .rd_row(r2), .rd_data(h2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    bit [7:0] seen;
    static int row4 [8] = '{4, 5, 6, 7, 0, 1, 2, 3};
    static int row5 [8] = '{5, 4, 7, 6, 1, 0, 3, 2};
    s3 = 0; s2 = 0; r3 = 0; r2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      s3 = 1; s2 = 1;
      @(negedge clk);
      s3 = 0; s2 = 0;
      cyc = 1;
      while (!d3) begin
        if (cyc == 3) check(d2 == 1'b1, "N=2 done after 2 clocks");
        @(negedge clk);
        cyc++;
      end
      check(cyc == 4, $sformatf("N=3 done after %0d clocks, expected 4", cyc));
      check(!b3, "busy low at done");
      for (int r = 0; r < 8; r++) begin
        r3 = 3'(r);
        #1;
        seen = '0;
        for (int c = 0; c < 8; c++) begin
          check(h3[c] == 3'(r ^ c), $sformatf("H3[%0d][%0d]=%0d", r, c, h3[c]));
          seen[h3[c]] = 1'b1;
        end
        check(seen == 8'hFF, $sformatf("row %0d is a permutation", r));
        if (r == 4) for (int c = 0; c < 8; c++) check(int'(h3[c]) == row4[c], "printed row 4");
        if (r == 5) for (int c = 0; c < 8; c++) check(int'(h3[c]) == row5[c], "printed row 5");
      end
      for (int r = 0; r < 4; r++) begin
        r2 = 2'(r);
        #1;
        for (int c = 0; c < 4; c++)
          check(h2[c] == 2'(r ^ c), $sformatf("H2[%0d][%0d]=%0d", r, c, h2[c]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

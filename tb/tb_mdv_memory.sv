// tb_mdv_memory: writes random deductive vectors into every row of every type
// and reads random bits back, checking the one-clock read latency, that the
// Vector address picks the row and the Bit address the bit, and that a read
// without rd_en holds the previous output.
module tb_mdv_memory;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       wr_en, rd_en, rd_bit;
  logic [1:0] wr_type, rd_type;
  logic [1:0] wr_row, vec_addr, bit_addr;
  logic [3:0] wr_data;

  mdv_memory dut (.clk, .wr_en, .wr_type, .wr_row, .wr_data,
                  .rd_en, .rd_type, .vec_addr, .bit_addr, .rd_bit);

  logic [3:0] model [16];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    wr_en = 0; rd_en = 0; wr_type = 0; rd_type = 0; wr_row = 0; vec_addr = 0; bit_addr = 0; wr_data = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        wr_en = 1; {wr_type, wr_row} = 4'(i); wr_data = 4'($urandom);
        model[i] = wr_data;
      end
      @(negedge clk);
      wr_en = 0;
      for (int t = 0; t < 200; t++) begin
        rd_en = 1; rd_type = 2'($urandom); vec_addr = 2'($urandom); bit_addr = 2'($urandom);
        exp = model[{rd_type, vec_addr}][bit_addr];
        @(negedge clk);
        check(rd_bit == exp, $sformatf("type %0d row %0d bit %0d", rd_type, vec_addr, bit_addr));
        rd_en = 0; rd_type = ~rd_type; bit_addr = ~bit_addr;
        @(negedge clk);
        check(rd_bit == exp, "output held without rd_en");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

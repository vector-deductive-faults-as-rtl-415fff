// tb_q_memory: stores Q-vectors for every type and checks that the input word
// reads the output state bit one clock later (fault-free simulation of an
// element by a read), that q_out shows the whole vector of rd_type, and that
// the output holds without rd_en.
module tb_q_memory;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       wr_en, rd_en, rd_bit;
  logic [1:0] wr_type, rd_type, rd_addr;
  logic [3:0] wr_q, q_out;

  q_memory dut (.clk, .wr_en, .wr_type, .wr_q, .rd_en, .rd_type, .rd_addr, .rd_bit, .q_out);

  logic [3:0] model [4];

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
    wr_en = 0; rd_en = 0; wr_type = 0; rd_type = 0; rd_addr = 0; wr_q = 0;
    // NAND, NOR, XOR, AND
    model = '{4'b0111, 4'b0001, 4'b0110, 4'b1000};
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        wr_en = 1; wr_type = 2'(i); wr_q = model[i];
      end
      @(negedge clk);
      wr_en = 0;
      for (int t = 0; t < 4; t++) begin
        rd_type = 2'(t); #1;
        check(q_out == model[t], "whole vector");
      end
      for (int t = 0; t < 100; t++) begin
        rd_en = 1; rd_type = 2'($urandom); rd_addr = 2'($urandom);
        exp = model[rd_type][rd_addr];
        @(negedge clk);
        check(rd_bit == exp, $sformatf("type %0d word %0d", rd_type, rd_addr));
        rd_en = 0; rd_addr = ~rd_addr;
        @(negedge clk);
        check(rd_bit == exp, "output held");
      end
      for (int i = 0; i < 4; i++) model[i] = 4'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fault_table: checks the diagonal preparation, row writes, both read
// ports, that init wins over a simultaneous write, and the detected vector as
// the union of the rows chosen by po_mask, against a model of the table.
module tb_fault_table;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int L = 12;

  logic          init, wr_en;
  logic [3:0]    wr_idx;
  logic [L-1:0]  wr_data, po_mask, detected;
  logic [3:0]    rd_idx [2];
  logic [L-1:0]  rd_data [2];

  fault_table dut (.clk, .rst_n, .init, .wr_en, .wr_idx, .wr_data, .rd_idx, .rd_data, .po_mask, .detected);

  logic [L-1:0] model [L];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic compare();
    logic [L-1:0] u;
    for (int i = 0; i < L; i++) begin
      rd_idx[0] = 4'(i); rd_idx[1] = 4'(L - 1 - i);
      #1;
      check(rd_data[0] == model[i], $sformatf("row %0d port 0", i));
      check(rd_data[1] == model[L - 1 - i], $sformatf("row %0d port 1", L - 1 - i));
    end
    for (int t = 0; t < 10; t++) begin
      po_mask = L'($urandom);
      u = '0;
      for (int i = 0; i < L; i++) if (po_mask[i]) u |= model[i];
      #1;
      check(detected == u, "union of output rows");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 0; wr_en = 0; wr_idx = 0; wr_data = 0; po_mask = 0; rd_idx[0] = 0; rd_idx[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 5; pass++) begin
      @(negedge clk);
      init = 1; wr_en = 1; wr_idx = 4'd3; wr_data = '1;       // init has priority
      @(negedge clk);
      init = 0; wr_en = 0;
      for (int i = 0; i < L; i++) model[i] = L'(1) << i;
      compare();
      for (int t = 0; t < 30; t++) begin
        @(negedge clk);
        wr_en = 1; wr_idx = 4'($urandom_range(0, L - 1)); wr_data = L'($urandom);
        model[wr_idx] = wr_data;
      end
      @(negedge clk);
      wr_en = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

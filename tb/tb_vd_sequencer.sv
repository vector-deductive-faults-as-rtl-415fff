// tb_vd_sequencer: drives the sequencer with a behavioural deductive-vector
// memory (one-clock registered read, loaded with the NAND matrix or random
// matrices) and checks each output fault vector against coordinate-wise
// evaluation d_x[{f1[j], f0[j]}], the zero coordinates from count upward, and
// the timing: one read per coordinate, done count+1 clocks after the clock
// that takes start. The first case is a NAND element on input set 10 with the
// input fault-list pairs 11 11 01 00 00 10 01 01 01 10 01 00, whose output list
// is 0 0 1 0 0 0 1 1 1 0 1 0.
module tb_vd_sequencer;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int K = 12;

  logic          start, busy, done;
  logic [1:0]    x;
  logic [K-1:0]  in_faults [2];
  logic [3:0]    count;
  logic [K-1:0]  out_faults;
  logic          mem_rd_en, mem_rd_bit;
  logic [1:0]    mem_vec_addr, mem_bit_addr;

  vd_sequencer dut (.clk, .rst_n, .start, .x, .in_faults, .count, .busy, .done, .out_faults,
                    .mem_rd_en, .mem_vec_addr, .mem_bit_addr, .mem_rd_bit);

  // behavioural memory: mdv[v] is the deductive vector for input set v
  logic [3:0] mdv [4];
  int         reads;
  always @(posedge clk) begin
    if (mem_rd_en) begin
      mem_rd_bit <= mdv[mem_vec_addr][mem_bit_addr];
      reads      <= reads + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [3:0] q);
    for (int v = 0; v < 4; v++)
      for (int a = 0; a < 4; a++) mdv[v][a] = q[v ^ a] ^ q[v];
  endtask

  task automatic run(input logic [1:0] xv, input logic [K-1:0] f1, input logic [K-1:0] f0,
                     input int cnt, output logic [K-1:0] res);
    int cyc;
    logic [K-1:0] exp;
    @(negedge clk);
    reads = 0;
    x = xv; in_faults[1] = f1; in_faults[0] = f0; count = 4'(cnt); start = 1;
    @(negedge clk);
    start = 0; in_faults[1] = ~f1; in_faults[0] = ~f0; x = ~xv;   // captured at start
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == cnt + 2, $sformatf("done %0d clocks after start, expected %0d", cyc, cnt + 2));
    check(reads == cnt, $sformatf("%0d reads for %0d coordinates", reads, cnt));
    exp = '0;
    for (int j = 0; j < cnt; j++) exp[j] = mdv[xv][{f1[j], f0[j]}];
    check(out_faults == exp, $sformatf("out %b expected %b", out_faults, exp));
    res = out_faults;
  endtask

  initial begin
    logic [K-1:0] f1, f0, res;
    start = 0; x = 0; count = 0; in_faults[0] = 0; in_faults[1] = 0; reads = 0; mem_rd_bit = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // NAND on input set 10, pairs (f1 f0) listed coordinate 0 first
    load(4'b0111);
    f1 = 12'b0000_0000_0000; f0 = 12'b0000_0000_0000;
    begin
      static string pairs [12] = '{"11","11","01","00","00","10","01","01","01","10","01","00"};
      static bit    expv  [12] = '{0, 0, 1, 0, 0, 0, 1, 1, 1, 0, 1, 0};
      for (int j = 0; j < 12; j++) begin
        f1[j] = (pairs[j][0] == "1");
        f0[j] = (pairs[j][1] == "1");
      end
      run(2'b10, f1, f0, 12, res);
      for (int j = 0; j < 12; j++) check(res[j] == expv[j], $sformatf("NAND example coordinate %0d", j));
    end
    // count 0 and partial counts
    run(2'b11, 12'hFFF, 12'hFFF, 0, res);
    run(2'b00, 12'hFFF, 12'hABC, 5, res);
    // random elements, sets, vectors and counts
    for (int t = 0; t < 300; t++) begin
      load(4'($urandom));
      run(2'($urandom), 12'($urandom), 12'($urandom), $urandom_range(0, 12), res);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mdv_synth: runs the matrix synthesizer for 3-input elements (and once at
// the default 2 inputs) and captures every row it writes. Each row i must equal
// d[a] = Q[i xor a] xor Q[i], every row must be written exactly once with the
// type given at start, and done must be seen N + 2^N + 2 clocks after the
// clock that takes start. The elements include 10000001 and 11001100 (the
// latter gives 00110011 on every input set), the NAND 1110 and random vectors.
module tb_mdv_synth;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       start, busy, done, wr_en;
  logic [0:0] type_in, wr_type;
  logic [7:0] q_in, wr_data;
  logic [2:0] wr_row;

  logic       start2, busy2, done2, wr_en2;
  logic [1:0] type2, wr_type2;
  logic [3:0] q2, wr_data2;
  logic [1:0] wr_row2;

  mdv_synth #(.N(3), .NTYPES(2)) dut (
    .clk, .rst_n, .start, .type_in, .q_in, .busy, .done,
    .wr_en, .wr_type, .wr_row, .wr_data);

  mdv_synth dut2 (
    .clk, .rst_n, .start(start2), .type_in(type2), .q_in(q2), .busy(busy2), .done(done2),
    .wr_en(wr_en2), .wr_type(wr_type2), .wr_row(wr_row2), .wr_data(wr_data2));

  logic [7:0] got [8];
  int         nwr [8];
  logic [3:0] got2 [4];
  int         nwr2 [4];

  always @(posedge clk) begin
    if (wr_en) begin
      got[wr_row] <= wr_data;
      nwr[wr_row] <= nwr[wr_row] + 1;
      if (wr_type != type_in) begin
        failures <= failures + 1;
        $display("FAIL: write with wrong type");
      end
    end
    if (wr_en2) begin
      got2[wr_row2] <= wr_data2;
      nwr2[wr_row2] <= nwr2[wr_row2] + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] vec(input string s);
    logic [7:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run3(input logic [7:0] q, input logic t);
    int cyc;
    for (int i = 0; i < 8; i++) nwr[i] = 0;
    @(negedge clk);
    q_in = q; type_in = t; start = 1;
    @(negedge clk);
    start = 0; q_in = ~q;              // must have been captured
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 1 + 3 + 8 + 2, $sformatf("done %0d clocks after start, expected 14", cyc));
    for (int i = 0; i < 8; i++) begin
      check(nwr[i] == 1, $sformatf("row %0d written %0d times", i, nwr[i]));
      for (int a = 0; a < 8; a++)
        check(got[i][a] == (q[i ^ a] ^ q[i]), $sformatf("Q=%b row %0d bit %0d", q, i, a));
    end
  endtask

  initial begin
    start = 0; q_in = 0; type_in = 0;
    start2 = 0; q2 = 0; type2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run3(vec("10000001"), 1'b0);
    run3(vec("11001100"), 1'b1);
    for (int i = 0; i < 8; i++) check(got[i] == vec("00110011"), "11001100 gives 00110011");
    run3(vec("11100000"), 1'b0);
    for (int t = 0; t < 20; t++) run3(8'($urandom), 1'($urandom));
    // default size: 2-input NAND
    for (int i = 0; i < 4; i++) nwr2[i] = 0;
    @(negedge clk);
    q2 = 4'b0111; type2 = 2'd3; start2 = 1;
    @(negedge clk);
    start2 = 0;
    while (!done2) @(negedge clk);
    check(wr_type2 == 2'd3, "type carried to the write port");
    for (int i = 0; i < 4; i++) begin
      check(nwr2[i] == 1, "default size row written once");
      for (int a = 0; a < 4; a++)
        check(got2[i][a] == (q2[i ^ a] ^ q2[i]), "default size NAND row");
    end
    check(got2[2] == 4'b0010, "NAND on input set 10 gives 0100");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dv_synth: checks the single deductive-vector operator. The reference is
// the definition of a deductive vector, d[a] = Q[x xor a] xor Q[x] (fault
// combination a flips the output), evaluated for every Q-vector and input set
// of a 2-input element and for chosen 3-input elements. Also checked by name:
// the 2-input NAND (Q = 1110) on input set 10 gives 0100, the XOR and XNOR
// vectors give 0110 on every input set, and the 3-input element 11001100
// gives 00110011 on every input set. Vectors are written with address 0 first.
module tb_dv_synth;
  int checks = 0, failures = 0;

  logic [3:0] q2;
  logic [1:0] x2;
  logic [1:0] h2 [4];
  logic       y2;
  logic [3:0] d2;

  logic [7:0] q3;
  logic [2:0] x3;
  logic [2:0] h3 [8];
  logic       y3;
  logic [7:0] d3;

  dv_synth       dut2 (.q(q2), .x(x2), .h_row(h2), .y(y2), .d(d2));
  dv_synth #(.N(3)) dut3 (.q(q3), .x(x3), .h_row(h3), .y(y3), .d(d3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // string "b0 b1 ... " with address 0 first -> packed vector
  function automatic logic [7:0] vec(input string s);
    logic [7:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  function automatic logic [3:0] vec4(input string s);
    logic [7:0] v = vec(s);
    return v[3:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply2(input logic [3:0] q, input logic [1:0] x);
    q2 = q; x2 = x;
    for (int j = 0; j < 4; j++) h2[j] = 2'(int'(x) ^ j);
    #1;
  endtask

  task automatic apply3(input logic [7:0] q, input logic [2:0] x);
    q3 = q; x3 = x;
    for (int j = 0; j < 8; j++) h3[j] = 3'(int'(x) ^ j);
    #1;
  endtask

  initial begin
    // exhaustive, 2 inputs
    for (int q = 0; q < 16; q++)
      for (int x = 0; x < 4; x++) begin
        apply2(4'(q), 2'(x));
        check(y2 == q2[x], "y = Q[x]");
        for (int a = 0; a < 4; a++)
          check(d2[a] == (q2[x ^ a] ^ q2[x]), $sformatf("Q=%b x=%0d a=%0d", q2, x, a));
      end
    // NAND on input set 10
    apply2(vec4("1110"), 2'b10);
    check(d2 == vec4("0100"), $sformatf("NAND on 10 gives %b", d2));
    // XOR / XNOR
    for (int x = 0; x < 4; x++) begin
      apply2(vec4("0110"), 2'(x));
      check(d2 == vec4("0110"), "XOR deductive vector 0110");
      apply2(vec4("1001"), 2'(x));
      check(d2 == vec4("0110"), "XNOR deductive vector 0110");
    end
    // inverter/repeater embedded as a function of one input
    for (int x = 0; x < 4; x++) begin
      apply2(vec4("1100"), 2'(x));
      check(d2 == vec4("0011"), "inverter of input 1 passes faults of input 1 only");
    end
    // 3 inputs
    for (int x = 0; x < 8; x++) begin
      apply3(vec("11001100"), 3'(x));
      check(d3 == vec("00110011"), $sformatf("11001100 on %0d gives %b", x, d3));
      apply3(vec("10000001"), 3'(x));
      for (int a = 0; a < 8; a++)
        check(d3[a] == (q3[x ^ a] ^ q3[x]), "10000001 element");
    end
    for (int t = 0; t < 200; t++) begin
      apply3(8'($urandom), 3'($urandom));
      for (int a = 0; a < 8; a++)
        check(d3[a] == (q3[int'(x3) ^ a] ^ q3[x3]), "random 3-input element");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

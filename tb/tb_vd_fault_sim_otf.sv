// tb_vd_fault_sim_otf: the fault simulator with on-the-fly deductive vectors
// (ONTHEFLY = 1, no stored matrices) for 3-input elements (16 lines, 10
// elements, 6 primary inputs). Element types include 10000001 and 11001100 and
// random vectors; random circuits on all 64 test sets are compared with serial
// fault injection, including the clock count, which must equal that of the
// stored-matrix configuration.
module tb_vd_fault_sim_otf;
  import vd_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int N = 3, T = 4, L = 16, E = 10, P = 6;
  localparam int LW = $clog2(L), EW = $clog2(E), TW = $clog2(T);

  logic             cfg_q_we, cfg_el_we, cov_clear, start, busy, done, cov_complete;
  logic [TW-1:0]    cfg_q_type, cfg_el_type;
  logic [2**N-1:0]  cfg_q_vec;
  logic [EW-1:0]    cfg_el_idx;
  logic [LW-1:0]    cfg_el_out;
  logic [LW-1:0]    cfg_el_in [N];
  logic [$clog2(E+1)-1:0] cfg_num_elems;
  logic [$clog2(L+1)-1:0] cfg_num_lines;
  logic [L-1:0]     cfg_po_mask, line_values, detected;
  logic [P-1:0]     test_vec;
  cov_t             cov [L];
  logic [$clog2(L+1)-1:0]   test_count;
  logic [$clog2(2*L+1)-1:0] total_count;

  vd_fault_sim #(.N(N), .NTYPES(T), .LINES(L), .ELEMS(E), .NPI(P), .ONTHEFLY(1'b1)) dut (
    .clk, .rst_n, .cfg_q_we, .cfg_q_type, .cfg_q_vec,
    .cfg_el_we, .cfg_el_idx, .cfg_el_out, .cfg_el_in, .cfg_el_type,
    .cfg_num_elems, .cfg_num_lines, .cfg_po_mask,
    .cov_clear, .start, .test_vec, .busy, .done, .line_values, .detected,
    .cov, .cov_complete, .test_count, .total_count);

  int              r_out [E];
  int              r_in  [E][N];
  int              r_typ [E];
  logic [2**N-1:0] r_q   [T];
  bit              r_sa0 [L], r_sa1 [L];
  int              n_full = 0;

  // a read whose bit address has all three inputs faulty
  always @(posedge clk)
    if (dut.u_seq.mem_rd_en && dut.u_seq.mem_bit_addr == 3'b111) n_full <= n_full + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] vec(input string s);
    logic [7:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  function automatic logic [L-1:0] ref_sim(input logic [P-1:0] tv, input int flip);
    logic [L-1:0] v = '0;
    for (int i = 0; i < P; i++) v[i] = tv[i] ^ (flip == i);
    for (int e = 0; e < E; e++) begin
      int a = 0;
      for (int k = 0; k < N; k++) a |= int'(v[r_in[e][k]]) << k;
      v[r_out[e]] = r_q[r_typ[e]][a] ^ (flip == r_out[e]);
    end
    return v;
  endfunction

  task automatic set_type(input int t, input logic [2**N-1:0] q);
    @(negedge clk);
    cfg_q_we = 1; cfg_q_type = TW'(t); cfg_q_vec = q;
    @(negedge clk);
    cfg_q_we = 0;
    while (busy) @(negedge clk);
    r_q[t] = q;
  endtask

  task automatic apply(input logic [P-1:0] tv);
    int cyc, exp_cyc, tc, tot;
    logic [L-1:0] good, bad, det;
    bit all;
    good = ref_sim(tv, -1);
    det  = '0;
    for (int j = 0; j < L; j++) begin
      bad = ref_sim(tv, j);
      det[j] = |((good ^ bad) & cfg_po_mask);
    end
    exp_cyc = 1 + 3;
    for (int e = 0; e < E; e++) exp_cyc += r_out[e] + 4;
    @(negedge clk);
    test_vec = tv; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == exp_cyc, $sformatf("%0d clocks, expected %0d", cyc, exp_cyc));
    check(line_values == good, $sformatf("values %b expected %b", line_values, good));
    check(detected == det, $sformatf("detected %b expected %b", detected, det));
    tc = 0; tot = 0; all = 1;
    for (int j = 0; j < L; j++) if (det[j]) begin
      tc++;
      if (good[j]) r_sa0[j] = 1;
      else         r_sa1[j] = 1;
    end
    for (int j = 0; j < L; j++) begin
      check(cov[j] == cov_t'({r_sa1[j], r_sa0[j]}), $sformatf("coverage of line %0d", j));
      tot += int'(r_sa0[j]) + int'(r_sa1[j]);
      if (!(r_sa0[j] && r_sa1[j])) all = 0;
    end
    check(int'(test_count) == tc, "per-test count");
    check(int'(total_count) == tot, "total count");
    check(cov_complete == all, "complete flag");
  endtask

  initial begin
    cfg_q_we = 0; cfg_el_we = 0; cov_clear = 0; start = 0; test_vec = 0;
    cfg_q_type = 0; cfg_q_vec = 0; cfg_el_idx = 0; cfg_el_out = 0; cfg_el_type = 0;
    for (int k = 0; k < N; k++) cfg_el_in[k] = 0;
    cfg_num_elems = ($clog2(E+1))'(E); cfg_num_lines = ($clog2(L+1))'(L); cfg_po_mask = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 10; c++) begin
      set_type(0, vec("10000001"));
      set_type(1, vec("11001100"));
      set_type(2, (c % 2 == 0) ? vec("01111111") : 8'($urandom));   // NAND3 or random
      set_type(3, 8'($urandom));
      for (int e = 0; e < E; e++) begin
        @(negedge clk);
        cfg_el_we = 1; cfg_el_idx = EW'(e); cfg_el_out = LW'(P + e); cfg_el_type = TW'($urandom_range(0, T - 1));
        r_out[e] = P + e; r_typ[e] = int'(cfg_el_type);
        for (int k = 0; k < N; k++) begin
          r_in[e][k] = $urandom_range(0, P + e - 1);
          cfg_el_in[k] = LW'(r_in[e][k]);
        end
        @(negedge clk);
        cfg_el_we = 0;
      end
      cfg_po_mask = {1'b1, 15'($urandom) & 15'h7C00};
      @(negedge clk);
      cov_clear = 1;
      @(negedge clk);
      cov_clear = 0;
      for (int j = 0; j < L; j++) begin r_sa0[j] = 0; r_sa1[j] = 0; end
      for (int v = 0; v < 64; v++) apply(P'(v));
    end
    $display("reads with all three inputs faulty: %0d", n_full);
    check(n_full > 0, "three-input reconvergence exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

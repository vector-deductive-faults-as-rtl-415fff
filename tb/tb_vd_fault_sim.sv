// tb_vd_fault_sim: end-to-end test of the vector-deductive fault simulator at
// its default size (2-input elements, 4 element types, 12 lines, 7 elements,
// 5 primary inputs).
//
// 1. The ISCAS-85 circuit c17 (six 2-input NANDs, 11 lines) is simulated on all
//    32 test sets, starting with 11111. For every test set the fault-free line
//    values, the detected faults, the per-test count, the coverage matrix and
//    the cycle count (3 + sum over elements of (output line + 4)) are compared
//    with a reference that injects every single stuck-at fault one at a time
//    and re-simulates the circuit (serial fault simulation, no deductive
//    vectors). After all 32 sets the coverage must be complete.
// 2. Twenty random 7-element, 12-line circuits with random element types
//    (NAND, AND, XOR, NOR, OR, inverter, ...) are simulated the same way; the
//    element types are rewritten between circuits, which re-synthesizes the
//    deductive-vector matrices.
// Counted mechanisms (each must occur): matrix synthesis, a deductive read
// where both inputs carry the fault (reconvergence), a fault blocked by an
// element, a fault passed by an element, the skipped upper half of the table,
// a test set leaving some line fault undetected, coverage completion and coverage clear.
module tb_vd_fault_sim;
  import vd_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int L = 12, E = 7, P = 5;

  logic             cfg_q_we, cfg_el_we, cov_clear, start, busy, done, cov_complete;
  logic [1:0]       cfg_q_type, cfg_el_type;
  logic [3:0]       cfg_q_vec;
  logic [2:0]       cfg_el_idx;
  logic [3:0]       cfg_el_out;
  logic [3:0]       cfg_el_in [2];
  logic [2:0]       cfg_num_elems;
  logic [3:0]       cfg_num_lines;
  logic [L-1:0]     cfg_po_mask, line_values, detected;
  logic [P-1:0]     test_vec;
  cov_t             cov [L];
  logic [3:0]       test_count;
  logic [4:0]       total_count;

  vd_fault_sim dut (
    .clk, .rst_n, .cfg_q_we, .cfg_q_type, .cfg_q_vec,
    .cfg_el_we, .cfg_el_idx, .cfg_el_out, .cfg_el_in, .cfg_el_type,
    .cfg_num_elems, .cfg_num_lines, .cfg_po_mask,
    .cov_clear, .start, .test_vec, .busy, .done, .line_values, .detected,
    .cov, .cov_complete, .test_count, .total_count);

  // reference netlist
  int         n_el, n_lines;
  int         r_out [E];
  int         r_in  [E][2];
  int         r_typ [E];
  logic [3:0] r_q   [4];
  bit         r_sa0 [L], r_sa1 [L];

  // mechanism counters
  int n_synth = 0, n_reconv = 0, n_block = 0, n_pass = 0, n_skip = 0;
  int n_undet = 0, n_complete = 0, n_clear = 0;

  always @(posedge clk) begin
    if (dut.syn_done) n_synth <= n_synth + 1;
    if (dut.u_seq.mem_rd_en && dut.u_seq.mem_bit_addr == 2'b11) n_reconv <= n_reconv + 1;
    if (dut.u_seq.pending && dut.u_seq.j_d < 4'(L) && dut.u_seq.f_r[0][dut.u_seq.j_d[3:0]] | dut.u_seq.f_r[1][dut.u_seq.j_d[3:0]]) begin
      if (dut.u_seq.mem_rd_bit) n_pass  <= n_pass + 1;
      else                      n_block <= n_block + 1;
    end
    if (dut.u_seq.start) n_skip <= n_skip + (L - int'(dut.u_seq.count));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial reference: line values with line `flip` inverted (-1: none)
  function automatic logic [L-1:0] ref_sim(input logic [P-1:0] tv, input int flip);
    logic [L-1:0] v = '0;
    for (int i = 0; i < P; i++) v[i] = tv[i] ^ (flip == i);
    for (int e = 0; e < n_el; e++) begin
      int a = {30'b0, v[r_in[e][1]], v[r_in[e][0]]};
      v[r_out[e]] = r_q[r_typ[e]][a] ^ (flip == r_out[e]);
    end
    return v;
  endfunction

  task automatic set_type(input int t, input logic [3:0] q);
    @(negedge clk);
    cfg_q_we = 1; cfg_q_type = 2'(t); cfg_q_vec = q;
    @(negedge clk);
    cfg_q_we = 0;
    while (busy) @(negedge clk);
    r_q[t] = q;
  endtask

  task automatic set_el(input int e, input int o, input int i1, input int i0, input int t);
    @(negedge clk);
    cfg_el_we = 1; cfg_el_idx = 3'(e); cfg_el_out = 4'(o);
    cfg_el_in[1] = 4'(i1); cfg_el_in[0] = 4'(i0); cfg_el_type = 2'(t);
    @(negedge clk);
    cfg_el_we = 0;
    r_out[e] = o; r_in[e][1] = i1; r_in[e][0] = i0; r_typ[e] = t;
  endtask

  task automatic clear_cov();
    @(negedge clk);
    cov_clear = 1;
    @(negedge clk);
    cov_clear = 0;
    n_clear++;
    for (int i = 0; i < L; i++) begin r_sa0[i] = 0; r_sa1[i] = 0; end
  endtask

  task automatic apply(input logic [P-1:0] tv);
    int cyc, exp_cyc, tc, tot;
    logic [L-1:0] good, bad, det, mask;
    bit all;
    mask = '0;
    for (int i = 0; i < n_lines; i++) mask[i] = 1'b1;
    good = ref_sim(tv, -1);
    det  = '0;
    for (int j = 0; j < n_lines; j++) begin
      bad = ref_sim(tv, j);
      det[j] = |((good ^ bad) & cfg_po_mask);
    end
    exp_cyc = 1 + 3;
    for (int e = 0; e < n_el; e++) exp_cyc += r_out[e] + 4;
    @(negedge clk);
    test_vec = tv; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == exp_cyc, $sformatf("test %b: %0d clocks, expected %0d", tv, cyc, exp_cyc));
    check((line_values & mask) == (good & mask), $sformatf("test %b: values %b expected %b", tv, line_values, good));
    check((detected & mask) == det, $sformatf("test %b: detected %b expected %b", tv, detected & mask, det));
    tc = 0;
    all = 1;
    tot = 0;
    for (int j = 0; j < n_lines; j++) if (det[j]) begin
      tc++;
      if (good[j]) r_sa0[j] = 1;
      else         r_sa1[j] = 1;
    end
    check(int'(test_count) == tc, "faults detected by this test");
    begin
      for (int j = 0; j < L; j++) begin
        check(cov[j] == cov_t'({r_sa1[j], r_sa0[j]}), $sformatf("coverage of line %0d", j));
        if (j < n_lines) begin
          tot += int'(r_sa0[j]) + int'(r_sa1[j]);
          if (!(r_sa0[j] && r_sa1[j])) all = 0;
        end
      end
      check(int'(total_count) == tot, $sformatf("total %0d expected %0d", total_count, tot));
      check(cov_complete == all, "coverage complete flag");
      if (all) n_complete++;
      if (tc < n_lines) n_undet++;
    end
  endtask

  initial begin
    cfg_q_we = 0; cfg_el_we = 0; cov_clear = 0; start = 0; test_vec = 0;
    cfg_q_type = 0; cfg_q_vec = 0; cfg_el_idx = 0; cfg_el_out = 0; cfg_el_type = 0;
    cfg_el_in[0] = 0; cfg_el_in[1] = 0; cfg_num_elems = 0; cfg_num_lines = 0; cfg_po_mask = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---------------- c17 ----------------
    // lines 0..4 = c17 inputs 1,2,3,6,7; 5=10, 6=11, 7=16, 8=19, 9=22, 10=23
    set_type(0, 4'b0111);                     // NAND: 1110 with address 0 first
    set_el(0, 5, 0, 2, 0);
    set_el(1, 6, 2, 3, 0);
    set_el(2, 7, 1, 6, 0);
    set_el(3, 8, 6, 4, 0);
    set_el(4, 9, 5, 7, 0);
    set_el(5, 10, 7, 8, 0);
    n_el = 6; n_lines = 11;
    cfg_num_elems = 3'(n_el); cfg_num_lines = 4'(n_lines);
    cfg_po_mask = 12'b0110_0000_0000;
    clear_cov();
    apply(5'b11111);
    for (int v = 0; v < 32; v++) apply(5'(v));
    check(cov_complete, "c17: all 22 stuck-at faults covered by the 32 test sets");
    check(total_count == 5'd22, "c17: 22 faults");

    // ---------------- random circuits ----------------
    for (int c = 0; c < 20; c++) begin
      static logic [3:0] lib [8] = '{4'b0111, 4'b1000, 4'b0110, 4'b0001, 4'b1110, 4'b0011, 4'b1001, 4'b0101};
      for (int t = 0; t < 4; t++) set_type(t, (c % 3 == 2) ? 4'($urandom) : lib[$urandom_range(0, 7)]);
      n_el = E; n_lines = L;
      for (int e = 0; e < E; e++)
        set_el(e, P + e, $urandom_range(0, P + e - 1), $urandom_range(0, P + e - 1), $urandom_range(0, 3));
      cfg_num_elems = 3'(n_el); cfg_num_lines = 4'(n_lines);
      cfg_po_mask = {1'b1, 11'($urandom) & 11'b111_1110_0000};
      clear_cov();
      for (int v = 0; v < 32; v++) apply(5'($urandom));
    end

    $display("mechanisms: synth=%0d reconvergent=%0d blocked=%0d passed=%0d skipped=%0d undetected=%0d complete=%0d clear=%0d",
             n_synth, n_reconv, n_block, n_pass, n_skip, n_undet, n_complete, n_clear);
    check(n_synth > 0, "matrix synthesis happened");
    check(n_reconv > 0, "reconvergent fault read happened");
    check(n_block > 0, "fault blocked by an element");
    check(n_pass > 0, "fault passed by an element");
    check(n_skip > 0, "upper half of the table skipped");
    check(n_undet > 0, "a test set leaving a line fault undetected");
    check(n_complete > 0, "coverage completion");
    check(n_clear > 0, "coverage clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

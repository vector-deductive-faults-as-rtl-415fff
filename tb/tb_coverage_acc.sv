// tb_coverage_acc: applies random detected/value vectors and checks the
// per-line coverage code, the per-test and total counts and the complete flag
// against a model; a detected line with value 1 is a stuck-at-0 detection and
// with value 0 a stuck-at-1 detection. Lines outside line_mask never count.
module tb_coverage_acc;
  import vd_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int L = 12;

  logic          clear, update, complete;
  logic [L-1:0]  detected, values, line_mask;
  cov_t          cov [L];
  logic [3:0]    test_count;
  logic [4:0]    total_count;

  coverage_acc dut (.clk, .rst_n, .clear, .update, .detected, .values, .line_mask,
                    .cov, .complete, .test_count, .total_count);

  bit m0 [L], m1 [L];

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

  initial begin
    int tc, tot;
    bit all;
    static int completes = 0;
    clear = 0; update = 0; detected = 0; values = 0; line_mask = '1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      line_mask = (run % 2 == 1) ? 12'h7FF : 12'hFFF;
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int i = 0; i < L; i++) begin m0[i] = 0; m1[i] = 0; end
      for (int t = 0; t < 12; t++) begin
        detected = L'($urandom); values = L'($urandom);
        tc = 0;
        for (int i = 0; i < L; i++) if (line_mask[i] && detected[i]) begin
          tc++;
          if (values[i]) m0[i] = 1; else m1[i] = 1;
        end
        update = 1;
        @(negedge clk);
        update = 0;
        tot = 0; all = 1;
        for (int i = 0; i < L; i++) begin
          check(cov[i] == cov_t'({m1[i], m0[i]}), $sformatf("line %0d coverage", i));
          if (line_mask[i]) begin
            tot += int'(m0[i]) + int'(m1[i]);
            if (!(m0[i] && m1[i])) all = 0;
          end
        end
        check(int'(test_count) == tc, "test count");
        check(int'(total_count) == tot, "total count");
        check(complete == all, "complete flag");
        if (all) completes++;
      end
    end
    check(completes > 0, "complete reached at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// coverage_acc: the fault coverage matrix over the test sets applied so far.
//
// A fault detected on line j is the inverse of the line's fault-free value:
// with value 1 it is stuck-at-0, with value 0 stuck-at-1. On update the
// detected vector of one test set is merged into per-line sa0/sa1 flags; cov
// then reads COV_NONE, COV_SA0, COV_SA1 or COV_BOTH (the "x" entry) per line.
// complete is high when every line in line_mask reads COV_BOTH. test_count is
// the number of faults the last applied test set detected, total_count the
// number of distinct faults detected so far (out of 2 per valid line). clear
// empties the matrix. Counts are registered one clock after update.
// The 0/1/x coverage row and the completeness rule follow the method; the
// counts and the clear input are this design's additions.
module coverage_acc
  import vd_pkg::*;
#(
  parameter int unsigned LINES = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     update,
  input  logic [LINES-1:0]         detected,
  input  logic [LINES-1:0]         values,
  input  logic [LINES-1:0]         line_mask,
  output cov_t                     cov [LINES],
  output logic                     complete,
  output logic [$clog2(LINES+1)-1:0]   test_count,
  output logic [$clog2(2*LINES+1)-1:0] total_count
);
  logic [LINES-1:0] sa0, sa1;
  logic [LINES-1:0] det_m;

  assign det_m = detected & line_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa0        <= '0;
      sa1        <= '0;
      test_count <= '0;
    end else if (clear) begin
      sa0        <= '0;
      sa1        <= '0;
      test_count <= '0;
    end else if (update) begin
      sa0        <= sa0 | (det_m &  values);
      sa1        <= sa1 | (det_m & ~values);
      test_count <= $bits(test_count)'($countones(det_m));
    end
  end

  always_comb begin
    for (int i = 0; i < LINES; i++)
      cov[i] = cov_t'({sa1[i], sa0[i]});
    total_count = $bits(total_count)'($countones(sa0 & line_mask) + $countones(sa1 & line_mask));
    complete    = ((sa0 & sa1 & line_mask) == line_mask);
  end

endmodule

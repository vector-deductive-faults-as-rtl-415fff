// hmatrix_synth: builds the coordinate permutation matrix H used to turn the
// modified output vector L = Q xor Y_i into the deductive vector D_i (D_ij = L[H_ij]).
//
// The matrix is grown by the quadrant recursion, one level per clock: starting
// from the 1x1 matrix [0], level i (size s = 2^(i-1) -> 2s) keeps the first
// quarter, computes the second quarter as H[r][s+j] = (2s-1) - H[r][s-1-j],
// copies it into the third quarter and copies the first quarter into the
// fourth. After N levels H[r][c] equals r xor c, i.e. the bit of L that a
// fault combination c reads when the element sits on input set r.
// The mirrored column index s-1-j is this design's reading of the second
// quarter rule; it is the one that yields a permutation in every row.
//
// Interface: pulse start; busy is high for N cycles, done pulses for one cycle
// in the cycle after the last level. Row rd_row of the matrix is available
// combinationally on rd_data once done has been seen (the matrix is held until
// the next start).
module hmatrix_synth #(
  parameter int unsigned N = 2            // inputs of the element
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  input  logic [N-1:0]         rd_row,
  output logic [N-1:0]         rd_data [2**N]
);
  localparam int unsigned SZ = 2**N;

  logic [N-1:0]  h [SZ][SZ];
  logic [N:0]    level;      // recursion level being built, 1..N
  logic [N:0]    s;          // size of the matrix built so far

  assign s = (N+1)'(1) << (level - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      level <= '0;
      for (int r = 0; r < SZ; r++)
        for (int c = 0; c < SZ; c++)
          h[r][c] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        level <= (N+1)'(1);
        for (int r = 0; r < SZ; r++)
          for (int c = 0; c < SZ; c++)
            h[r][c] <= '0;                       // level 0: H = [0]
      end else if (busy) begin
        for (int r = 0; r < SZ; r++) begin
          for (int c = 0; c < SZ; c++) begin
            if (r < int'(s) && c >= int'(s) && c < 2*int'(s))
              // second quarter
              h[r][c] <= N'(2*s - 1) - h[r][2*int'(s) - 1 - c];
            else if (r >= int'(s) && r < 2*int'(s) && c < int'(s))
              // third quarter = second quarter
              h[r][c] <= N'(2*s - 1) - h[r - int'(s)][int'(s) - 1 - c];
            else if (r >= int'(s) && r < 2*int'(s) && c >= int'(s) && c < 2*int'(s))
              // fourth quarter = first quarter
              h[r][c] <= h[r - int'(s)][c - int'(s)];
          end
        end
        if (level == (N+1)'(N)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          level <= level + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int c = 0; c < SZ; c++)
      rd_data[c] = h[rd_row][c];
  end

endmodule

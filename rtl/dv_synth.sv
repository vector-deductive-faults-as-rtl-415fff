// dv_synth: the single deductive-vector operator D_i = (Q xor Y_i)_H.
//
// For an element with truth vector q (bit a = output on input word a) standing
// on input set x, the fault-free output is y = q[x]; the modified vector is
// L = q xor {y,...,y}, and the deductive vector is the row of H for x applied as
// a bit permutation: d[j] = L[h_row[j]]. Bit j of d is 1 when the input fault
// combination j (bit k set = input k carries the fault) changes the output.
// Purely combinational; one operator evaluation per call, with all 2^N
// coordinates handled in parallel. The two steps (modify Q by the output
// state, permute by H) are the method's; the bit order (input k = address
// bit k, address 0 = bit 0) is this design's convention.
module dv_synth #(
  parameter int unsigned N = 2
) (
  input  logic [2**N-1:0] q,                 // Q-vector, bit a = output for input word a
  input  logic [N-1:0]    x,                 // input set (vector address)
  input  logic [N-1:0]    h_row [2**N],      // row x of the permutation matrix H
  output logic            y,                 // fault-free output Q[x]
  output logic [2**N-1:0] d                  // deductive vector for input set x
);
  localparam int unsigned SZ = 2**N;

  logic [SZ-1:0] l;

  always_comb begin
    y = q[x];
    l = q ^ {SZ{y}};
    for (int j = 0; j < SZ; j++)
      d[j] = l[h_row[j]];
  end

endmodule

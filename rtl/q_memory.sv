// q_memory: memory of functional vectors (Q-vectors), one per element type.
//
// This is the functional element F of the simulator: fault-free simulation of
// an element is one read whose bit address is the element's input word, so no
// gate logic is evaluated. Writing a Q-vector takes one clock; the read is
// registered (rd_bit valid one clock after rd_en). The whole stored vector of
// the addressed type is also readable combinationally on q_out (used when
// deductive vectors are formed on demand). Reading the output state at the
// input word is the method's; the per-type layout and timing are this design's.
module q_memory #(
  parameter int unsigned N      = 2,
  parameter int unsigned NTYPES = 4
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [$clog2(NTYPES)-1:0] wr_type,
  input  logic [2**N-1:0]           wr_q,
  input  logic                      rd_en,
  input  logic [$clog2(NTYPES)-1:0] rd_type,
  input  logic [N-1:0]              rd_addr,
  output logic                      rd_bit,
  output logic [2**N-1:0]           q_out
);
  logic [2**N-1:0] mem [NTYPES];

  initial begin
    for (int i = 0; i < NTYPES; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_type] <= wr_q;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_bit <= mem[rd_type][rd_addr];
  end

  assign q_out = mem[rd_type];

endmodule

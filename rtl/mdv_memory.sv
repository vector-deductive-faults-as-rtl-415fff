// mdv_memory: the single memory block of the vector-deductive sequencer. It
// holds, per element type, the 2^N x 2^N matrix of deductive vectors.
//
// Read side: the Vector address (the element's input set) selects one
// deductive vector, the Bit address (the same-index bits of the element's
// input fault vectors) selects one bit of it; rd_bit is registered, one clock
// after rd_en. Write side: one whole deductive vector (row) per clock, used by
// the matrix synthesizer. Rows are stored as an array so a tool can map it to
// a RAM; a read of a row written in the same clock returns the old row.
// The two address inputs and their meaning are the method's; the per-type
// upper address bits and the registered read are this design's choices.
module mdv_memory #(
  parameter int unsigned N      = 2,
  parameter int unsigned NTYPES = 4
) (
  input  logic                      clk,
  // row write port
  input  logic                      wr_en,
  input  logic [$clog2(NTYPES)-1:0] wr_type,
  input  logic [N-1:0]              wr_row,
  input  logic [2**N-1:0]           wr_data,
  // bit read port
  input  logic                      rd_en,
  input  logic [$clog2(NTYPES)-1:0] rd_type,
  input  logic [N-1:0]              vec_addr,
  input  logic [N-1:0]              bit_addr,
  output logic                      rd_bit
);

  logic [2**N-1:0] mem [NTYPES * 2**N];

  // Contents are defined only after the synthesizer has written them; start
  // from zero so every read is defined.
  initial begin
    for (int i = 0; i < NTYPES * 2**N; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_type, wr_row}] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_bit <= mem[{rd_type, vec_addr}][bit_addr];
  end

endmodule

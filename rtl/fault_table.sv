// fault_table: the fault simulation table of a circuit, one fault vector (row)
// per line, LINES coordinates per row; coordinate j of row i is 1 when a fault
// on line j reaches line i under the current test set.
//
// init prepares the table for a new test set: ones on the diagonal (each line
// carries its own fault), zeros elsewhere. A row is written with wr_en in one
// clock. NRD combinational read ports return the rows of an element's inputs.
// detected is the union of the rows selected by po_mask (the primary outputs):
// the faults this test set detects. init has priority over a write in the same
// clock. The diagonal preparation and one row per line follow the method; the
// register-file form, the read ports and the union over several outputs are
// this design's choices.
module fault_table #(
  parameter int unsigned LINES = 12,
  parameter int unsigned NRD   = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     init,
  input  logic                     wr_en,
  input  logic [$clog2(LINES)-1:0] wr_idx,
  input  logic [LINES-1:0]         wr_data,
  input  logic [$clog2(LINES)-1:0] rd_idx  [NRD],
  output logic [LINES-1:0]         rd_data [NRD],
  input  logic [LINES-1:0]         po_mask,
  output logic [LINES-1:0]         detected
);
  logic [LINES-1:0] rows [LINES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) rows[i] <= '0;
    end else if (init) begin
      for (int i = 0; i < LINES; i++) rows[i] <= LINES'(1) << i;
    end else if (wr_en) begin
      rows[wr_idx] <= wr_data;
    end
  end

  always_comb begin
    for (int p = 0; p < NRD; p++)
      rd_data[p] = (int'(rd_idx[p]) < LINES) ? rows[rd_idx[p]] : '0;
  end

  always_comb begin
    detected = '0;
    for (int i = 0; i < LINES; i++)
      if (po_mask[i]) detected |= rows[i];
  end

endmodule

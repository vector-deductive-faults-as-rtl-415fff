// mdv_synth: synthesizes the matrix of deductive vectors (MDV) of one element
// and writes it, one deductive vector per clock, into the MDV memory.
//
// On start the element's Q-vector is captured and the permutation matrix H is
// built by hmatrix_synth (N clocks). Then, for every input set i = 0..2^N-1,
// dv_synth forms D_i = (Q xor Q[i])_H(i) from row i of H, and the row is written
// to the memory through the wr_* port in the same clock. done pulses in the
// clock after the last row write, so a full run takes N + 2^N + 2 clocks from
// the start pulse to done. The write port carries the element type given with
// start, so one memory can hold matrices of several element types.
// The row-by-row synthesis from H and the Q-vector is the method's; rebuilding
// H on every run and the one-row-per-clock schedule are this design's choices.
module mdv_synth #(
  parameter int unsigned N      = 2,
  parameter int unsigned NTYPES = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [$clog2(NTYPES)-1:0] type_in,
  input  logic [2**N-1:0]           q_in,
  output logic                      busy,
  output logic                      done,
  output logic                      wr_en,
  output logic [$clog2(NTYPES)-1:0] wr_type,
  output logic [N-1:0]              wr_row,
  output logic [2**N-1:0]           wr_data
);
  localparam int unsigned SZ = 2**N;

  typedef enum logic [1:0] {M_IDLE, M_HMAT, M_ROWS, M_DONE} mstate_t;
  mstate_t st;

  logic [2**N-1:0] q_r;
  logic [N-1:0]    row;
  logic            h_start, h_busy, h_done;
  logic [N-1:0]    h_row [SZ];
  logic            y_unused;

  assign h_start = (st == M_IDLE) && start;

  hmatrix_synth #(.N(N)) u_hmat (
    .clk, .rst_n,
    .start  (h_start),
    .busy   (h_busy),
    .done   (h_done),
    .rd_row (row),
    .rd_data(h_row)
  );

  dv_synth #(.N(N)) u_dv (
    .q    (q_r),
    .x    (row),
    .h_row(h_row),
    .y    (y_unused),
    .d    (wr_data)
  );

  assign busy   = (st != M_IDLE);
  assign wr_en  = (st == M_ROWS);
  assign wr_row = row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= M_IDLE;
      q_r     <= '0;
      row     <= '0;
      wr_type <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        M_IDLE: if (start) begin
          q_r     <= q_in;
          wr_type <= type_in;
          row     <= '0;
          st      <= M_HMAT;
        end
        M_HMAT: if (h_done) st <= M_ROWS;
        M_ROWS: begin
          if (row == N'(SZ - 1)) st <= M_DONE;
          else                   row <= row + 1'b1;
        end
        M_DONE: begin
          done <= 1'b1;
          st   <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

  // h_busy is implied by the M_HMAT state; y is recomputed where it is needed.
  logic unused_ok;
  assign unused_ok = h_busy ^ y_unused;

endmodule

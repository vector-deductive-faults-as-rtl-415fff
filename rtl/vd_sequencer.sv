// vd_sequencer: vector-deductive sequencer. It forms the output fault vector of
// one element from its N input fault vectors by reading the matrix of
// deductive vectors; the fault data themselves are the read addresses.
//
// On start, the input set x (Vector address) and the N input fault vectors of
// K coordinates are captured. For coordinate j = 0..count-1 the sequencer
// issues one memory read with Bit address {f[N-1][j], ..., f[0][j]}, i.e. input
// k of the element supplies address bit k, and stores the returned bit as
// coordinate j of the output fault vector. Coordinates from count upward are
// zero. One read per clock, the memory answers one clock later: done pulses
// count+1 clocks after start (k reads, k = count). count = 0 gives done one
// clock after start and an all-zero vector.
// Using the input fault bits as the bit address, one read per coordinate, is
// the method's; the count input (to skip the empty upper half of the fault
// table) and the handshake are this design's.
module vd_sequencer #(
  parameter int unsigned N = 2,        // inputs of the element
  parameter int unsigned K = 12        // coordinates of a fault vector (lines)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [N-1:0]           x,               // input set
  input  logic [K-1:0]           in_faults [N],   // input fault vectors
  input  logic [$clog2(K+1)-1:0] count,           // coordinates to form
  output logic                   busy,
  output logic                   done,
  output logic [K-1:0]           out_faults,
  // read port of the deductive-vector memory
  output logic                   mem_rd_en,
  output logic [N-1:0]           mem_vec_addr,
  output logic [N-1:0]           mem_bit_addr,
  input  logic                   mem_rd_bit
);
  localparam int unsigned CW = $clog2(K+1);
  localparam int unsigned IW = (K > 1) ? $clog2(K) : 1;

  logic [N-1:0]  x_r;
  logic [K-1:0]  f_r [N];
  logic [CW-1:0] cnt_r;
  logic [CW-1:0] j;          // coordinate being addressed
  logic [CW-1:0] j_d;        // coordinate whose bit is returning
  logic          issuing;    // a read is issued this clock
  logic          pending;    // a read was issued last clock

  assign issuing      = busy && (j < cnt_r);
  assign mem_rd_en    = issuing;
  assign mem_vec_addr = x_r;

  always_comb begin
    mem_bit_addr = '0;
    for (int k = 0; k < N; k++)
      if (j < CW'(K)) mem_bit_addr[k] = f_r[k][IW'(j)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      pending    <= 1'b0;
      x_r        <= '0;
      cnt_r      <= '0;
      j          <= '0;
      j_d        <= '0;
      out_faults <= '0;
      for (int k = 0; k < N; k++) f_r[k] <= '0;
    end else begin
      done    <= 1'b0;
      pending <= issuing;
      j_d     <= j;
      if (pending && j_d < CW'(K))
        out_faults[IW'(j_d)] <= mem_rd_bit;
      if (start && !busy) begin
        busy       <= 1'b1;
        x_r        <= x;
        cnt_r      <= (count > CW'(K)) ? CW'(K) : count;
        j          <= '0;
        out_faults <= '0;
        for (int k = 0; k < N; k++) f_r[k] <= in_faults[k];
      end else if (busy) begin
        if (issuing) begin
          j <= j + 1'b1;
        end else begin
          // the last read (if any) returns in this clock
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // done ends a run: the sequencer is idle in the clock done is high, and no
  // read is issued beyond the requested coordinates.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_read_range: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rd_en |-> (j < cnt_r));

endmodule

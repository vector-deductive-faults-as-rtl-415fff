// vd_fault_sim: vector-deductive fault simulator for combinational circuits of
// N-input elements, built only from memory reads and writes of vectors.
//
// Each element type is given by its Q-vector (output state for every input
// word). Writing a Q-vector stores it in q_memory and makes mdv_synth write
// the element's 2^N x 2^N matrix of deductive vectors into mdv_memory (busy
// meanwhile). The netlist is a table of elements (output line, N input lines,
// type), numbered so that every element output has a higher line number than
// its inputs; lines 0..NPI-1 are the primary inputs, po_mask marks the
// primary outputs. An input that an element does not use may name any lower
// line: a Q-vector that ignores it gives a deductive vector that ignores it.
//
// start applies one test set (test_vec, bit i drives line i). The fault table
// is prepared with ones on its diagonal, then the elements are processed in
// table order: the input word addresses the Q-vector (fault-free value of the
// output line) and the deductive vector; vd_sequencer reads that vector with
// the input fault vectors' same-index bits as bit addresses, for the o
// coordinates below the element's output line o (the upper half of the table
// is zero), and coordinate o is set (the line's own fault always reaches it).
// Finally the union of the primary-output rows gives the detected faults and
// is merged into the coverage matrix. An element with output line o takes o+4
// clocks; done pulses when the test set is finished.
//
// With ONTHEFLY = 1 no matrix is stored: the one deductive vector an element
// needs is formed from its Q-vector and row x of H while the element is
// fetched (one clock, all coordinates in parallel) and read from a register,
// with the same timing. This trades the 2^N x 2^N memory per type for the
// H-matrix and the operator logic; ONTHEFLY = 0, the stored-matrix sequencer,
// is the default.
//
// Design choices not fixed by the method: a programmable netlist table, up to
// NTYPES element types sharing one deductive-vector memory, registered memory
// reads, and topological line numbering as the ordering rule.
module vd_fault_sim
  import vd_pkg::*;
#(
  parameter int unsigned N      = 2,    // inputs per element
  parameter int unsigned NTYPES = 4,    // element types (Q-vectors) held
  parameter int unsigned LINES  = 12,   // lines of the circuit (fault vector length)
  parameter int unsigned ELEMS  = 7,    // elements of the circuit
  parameter int unsigned NPI    = 5,    // primary inputs (lines 0..NPI-1)
  parameter bit          ONTHEFLY = 1'b0 // 1: form each deductive vector when needed
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // element type configuration
  input  logic                          cfg_q_we,
  input  logic [$clog2(NTYPES)-1:0]     cfg_q_type,
  input  logic [2**N-1:0]               cfg_q_vec,
  // netlist configuration
  input  logic                          cfg_el_we,
  input  logic [$clog2(ELEMS)-1:0]      cfg_el_idx,
  input  logic [$clog2(LINES)-1:0]      cfg_el_out,
  input  logic [$clog2(LINES)-1:0]      cfg_el_in [N],
  input  logic [$clog2(NTYPES)-1:0]     cfg_el_type,
  input  logic [$clog2(ELEMS+1)-1:0]    cfg_num_elems,
  input  logic [$clog2(LINES+1)-1:0]    cfg_num_lines,
  input  logic [LINES-1:0]              cfg_po_mask,
  // simulation
  input  logic                          cov_clear,
  input  logic                          start,
  input  logic [NPI-1:0]                test_vec,
  output logic                          busy,
  output logic                          done,
  output logic [LINES-1:0]              line_values,
  output logic [LINES-1:0]              detected,
  output cov_t                          cov [LINES],
  output logic                          cov_complete,
  output logic [$clog2(LINES+1)-1:0]    test_count,
  output logic [$clog2(2*LINES+1)-1:0]  total_count
);
  localparam int unsigned LW = $clog2(LINES);
  localparam int unsigned EW = $clog2(ELEMS);
  localparam int unsigned TW = $clog2(NTYPES);
  localparam int unsigned CW = $clog2(LINES+1);

  state_t st;

  // netlist table
  logic [LW-1:0] el_out  [ELEMS];
  logic [LW-1:0] el_in   [ELEMS][N];
  logic [TW-1:0] el_type [ELEMS];

  logic [LINES-1:0] val;           // fault-free line values
  logic [EW:0]      e;             // element being processed
  logic [EW-1:0]    ei;
  logic [N-1:0]     x;             // input word of element e
  logic [LW-1:0]    o;             // output line of element e
  logic [TW-1:0]    t;

  assign ei = e[EW-1:0];
  assign o  = el_out[ei];
  assign t  = el_type[ei];

  always_comb begin
    for (int k = 0; k < N; k++) x[k] = val[el_in[ei][k]];
  end

  // ---------------- element type memories ----------------
  logic            syn_start, syn_done;
  logic            q_bit;
  logic [2**N-1:0] q_vec;          // whole Q-vector of the current element's type
  logic            seq_rd_en, seq_bit;
  logic [N-1:0]    seq_vec, seq_baddr;

  assign syn_start = (st == S_IDLE) && cfg_q_we;

  q_memory #(.N(N), .NTYPES(NTYPES)) u_qmem (
    .clk,
    .wr_en  (syn_start),
    .wr_type(cfg_q_type),
    .wr_q   (cfg_q_vec),
    .rd_en  (st == S_FETCH),
    .rd_type(t),
    .rd_addr(x),
    .rd_bit (q_bit),
    .q_out  (q_vec)
  );

  if (ONTHEFLY == 0) begin : g_stored
    // Stored matrices: a Q-vector write synthesizes the type's whole matrix
    // of deductive vectors into the sequencer's memory block.
    logic            mw_en;
    logic [TW-1:0]   mw_type;
    logic [N-1:0]    mw_row;
    logic [2**N-1:0] mw_data;
    logic            syn_busy;

    mdv_synth #(.N(N), .NTYPES(NTYPES)) u_synth (
      .clk, .rst_n,
      .start  (syn_start),
      .type_in(cfg_q_type),
      .q_in   (cfg_q_vec),
      .busy   (syn_busy),
      .done   (syn_done),
      .wr_en  (mw_en),
      .wr_type(mw_type),
      .wr_row (mw_row),
      .wr_data(mw_data)
    );

    mdv_memory #(.N(N), .NTYPES(NTYPES)) u_mdv (
      .clk,
      .wr_en   (mw_en),
      .wr_type (mw_type),
      .wr_row  (mw_row),
      .wr_data (mw_data),
      .rd_en   (seq_rd_en),
      .rd_type (t),
      .vec_addr(seq_vec),
      .bit_addr(seq_baddr),
      .rd_bit  (seq_bit)
    );

    logic unused_g;
    assign unused_g = syn_busy ^ (^q_vec);
  end else begin : g_onthefly
    // One deductive vector per element: while the element is fetched,
    // dv_synth forms D_x from its Q-vector and row x of H, and the sequencer
    // reads that register instead of a stored matrix. A Q-vector write only
    // (re)builds H.
    logic            h_busy;
    logic [N-1:0]    h_row [2**N];
    logic [2**N-1:0] d_now, d_reg;
    logic            y_unused;

    hmatrix_synth #(.N(N)) u_hmat (
      .clk, .rst_n,
      .start  (syn_start),
      .busy   (h_busy),
      .done   (syn_done),
      .rd_row (x),
      .rd_data(h_row)
    );

    dv_synth #(.N(N)) u_dv (
      .q    (q_vec),
      .x    (x),
      .h_row(h_row),
      .y    (y_unused),
      .d    (d_now)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        d_reg   <= '0;
        seq_bit <= 1'b0;
      end else begin
        if (st == S_FETCH) d_reg <= d_now;
        if (seq_rd_en)     seq_bit <= d_reg[seq_baddr];
      end
    end

    logic unused_g;
    assign unused_g = h_busy ^ y_unused ^ (^seq_vec);
  end

  // ---------------- fault table and sequencer ----------------
  logic [LW-1:0]    ft_rd_idx  [N];
  logic [LINES-1:0] ft_rd_data [N];
  logic [LINES-1:0] seq_out;
  logic             seq_start, seq_busy, seq_done;
  logic             ft_wr;

  always_comb begin
    for (int k = 0; k < N; k++) ft_rd_idx[k] = el_in[ei][k];
  end

  assign ft_wr = (st == S_SEQ) && seq_done;

  fault_table #(.LINES(LINES), .NRD(N)) u_ft (
    .clk, .rst_n,
    .init    (st == S_INIT),
    .wr_en   (ft_wr),
    .wr_idx  (o),
    .wr_data (seq_out | (LINES'(1) << o)),
    .rd_idx  (ft_rd_idx),
    .rd_data (ft_rd_data),
    .po_mask (cfg_po_mask),
    .detected(detected)
  );

  assign seq_start = (st == S_VALUE);

  vd_sequencer #(.N(N), .K(LINES)) u_seq (
    .clk, .rst_n,
    .start       (seq_start),
    .x           (x),
    .in_faults   (ft_rd_data),
    .count       (CW'(o)),
    .busy        (seq_busy),
    .done        (seq_done),
    .out_faults  (seq_out),
    .mem_rd_en   (seq_rd_en),
    .mem_vec_addr(seq_vec),
    .mem_bit_addr(seq_baddr),
    .mem_rd_bit  (seq_bit)
  );

  // ---------------- coverage ----------------
  logic [LINES-1:0] line_mask;
  always_comb begin
    for (int i = 0; i < LINES; i++) line_mask[i] = (i < int'(cfg_num_lines));
  end

  coverage_acc #(.LINES(LINES)) u_cov (
    .clk, .rst_n,
    .clear      (cov_clear),
    .update     (st == S_DETECT),
    .detected   (detected),
    .values     (val),
    .line_mask  (line_mask),
    .cov        (cov),
    .complete   (cov_complete),
    .test_count (test_count),
    .total_count(total_count)
  );

  // ---------------- controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      e    <= '0;
      val  <= '0;
      done <= 1'b0;
      for (int i = 0; i < ELEMS; i++) begin
        el_out[i]  <= '0;
        el_type[i] <= '0;
        for (int k = 0; k < N; k++) el_in[i][k] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (st == S_IDLE && cfg_el_we) begin
        el_out[cfg_el_idx]  <= cfg_el_out;
        el_type[cfg_el_idx] <= cfg_el_type;
        for (int k = 0; k < N; k++) el_in[cfg_el_idx][k] <= cfg_el_in[k];
      end
      unique case (st)
        S_IDLE: begin
          if (cfg_q_we)   st <= S_SYNTH;
          else if (start) st <= S_INIT;
        end
        S_SYNTH: if (syn_done) st <= S_IDLE;
        S_INIT: begin
          val <= LINES'(test_vec);
          e   <= '0;
          st  <= (cfg_num_elems == '0) ? S_DETECT : S_FETCH;
        end
        S_FETCH: st <= S_VALUE;
        S_VALUE: begin
          val[o] <= q_bit;
          st     <= S_SEQ;
        end
        S_SEQ: if (seq_done) begin
          if (e + 1'b1 == (EW+1)'(cfg_num_elems)) st <= S_DETECT;
          else begin
            e  <= e + 1'b1;
            st <= S_FETCH;
          end
        end
        S_DETECT: st <= S_DONE;
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy        = (st != S_IDLE);
  assign line_values = val;

  // ---------------- usage rules ----------------
  // Every input line of an element must lie below its output line; otherwise
  // its fault vector is not formed yet and the upper half of the table, which
  // is never read, would be needed.
  logic topo_ok;
  always_comb begin
    topo_ok = 1'b1;
    for (int k = 0; k < N; k++)
      if (el_in[ei][k] >= o) topo_ok = 1'b0;
  end

  a_topological: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_FETCH) |-> topo_ok)
    else $error("element %0d: an input line is not below its output line", ei);

  // Configuration writes are taken only while idle.
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (cfg_el_we || (cfg_q_we && st != S_IDLE)) |-> (st == S_IDLE))
    else $error("configuration write while busy is ignored");

  logic unused_ok;
  assign unused_ok = seq_busy;

endmodule

// vd_pkg: types shared by the vector-deductive fault simulator.
//
// cov_t encodes one entry of the fault coverage matrix: which stuck-at faults
// of a line have been detected by the test sets applied so far. COV_BOTH is the
// "x" entry of the coverage row (line detected both stuck-at-0 and
// stuck-at-1); a test is complete when every line reads COV_BOTH.
package vd_pkg;

  typedef enum logic [1:0] {
    COV_NONE = 2'b00,   // neither fault of the line detected yet
    COV_SA0  = 2'b01,   // only stuck-at-0 detected
    COV_SA1  = 2'b10,   // only stuck-at-1 detected
    COV_BOTH = 2'b11    // both detected ("x")
  } cov_t;

  // Controller states of the circuit-level simulator.
  typedef enum logic [3:0] {
    S_IDLE,
    S_SYNTH,     // matrix of deductive vectors being written for a new element type
    S_INIT,      // fault table set to the identity, primary inputs loaded
    S_FETCH,     // element descriptor read, input word formed, Q-vector read issued
    S_VALUE,     // fault-free output value written, sequencer started
    S_SEQ,       // sequencer forming the output fault vector
    S_DETECT,    // union of primary-output rows, coverage update
    S_DONE
  } state_t;

endpackage

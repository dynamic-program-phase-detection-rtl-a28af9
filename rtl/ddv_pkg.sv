// ddv_pkg: constants and helpers shared by the BBV+DDV phase detector.
//
// The default sizes follow the configuration the design is built around: a
// 32-node distributed shared-memory machine, a 32-entry basic-block vector
// (BBV) accumulator, a 32-vector footprint table and a sampling interval of
// 3M committed non-synchronization instructions divided by the node count.
// Counter widths, the phase-ID width and the distance width are this
// design's own choices (24-bit counters hold the 3M-instruction interval).
package ddv_pkg;

  localparam int unsigned NODES_DEF        = 32;
  localparam int unsigned ACC_ENTRIES_DEF  = 32;
  localparam int unsigned FT_ENTRIES_DEF   = 32;
  localparam int unsigned TOTAL_INTERVAL   = 3_000_000;
  localparam int unsigned CNT_W_DEF        = 24;
  localparam int unsigned D_W_DEF          = 8;
  localparam int unsigned PC_W_DEF         = 32;
  localparam int unsigned PHASE_W_DEF      = 16;

  // Controller states of one node's detector.
  typedef enum logic [1:0] {
    ND_IDLE,    // counting the current interval
    ND_XCHG,    // collecting the F_i vectors of every node
    ND_DDS,     // computing the data distribution scalar
    ND_SEARCH   // matching against the footprint table
  } node_state_e;

  // Reset value of the distance matrix: hop count between two nodes of a
  // binary hypercube (population count of i XOR j), with 1 on the diagonal.
  function automatic int unsigned hop_distance(int unsigned i, int unsigned j);
    int unsigned n;
    n = $countones(i ^ j);
    return (n == 0) ? 1 : n;
  endfunction

endpackage

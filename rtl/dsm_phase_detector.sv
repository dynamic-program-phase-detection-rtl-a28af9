// dsm_phase_detector: BBV+DDV phase detection for a NODES-node distributed
// shared-memory multiprocessor.
//
// One phase_detector_node sits beside each processor and classifies that
// processor's sampling intervals into phases from two signatures: the
// basic-block vector (which code ran) and the data distribution scalar
// (how much the data it touched cost, given where that data lives, how far
// away it is and how hard the whole system was using it). The nodes share
// the F_i vectors they count on each other's behalf through
// ddv_exchange_fabric.
//
// Ports are arrays indexed by node: each processor's commit stream in, each
// node's phase reports out. The two match thresholds and the distance
// matrix write port are common to all nodes (every node holds the same D).
// Timing per node: an interval of INTERVAL_LEN committed non-sync
// instructions, then a collection of NODES+2 cycles (plus waiting for the
// fabric), NODES+1 cycles of DDS and FT_ENTRIES+2 cycles of search.
//
// The structure follows the source design; the fabric and the shared
// configuration ports are this design's own choices.
module dsm_phase_detector #(
  parameter int unsigned NODES        = ddv_pkg::NODES_DEF,
  parameter int unsigned ACC_ENTRIES  = ddv_pkg::ACC_ENTRIES_DEF,
  parameter int unsigned FT_ENTRIES   = ddv_pkg::FT_ENTRIES_DEF,
  parameter int unsigned INTERVAL_LEN = ddv_pkg::TOTAL_INTERVAL / NODES,
  parameter int unsigned CNT_W        = ddv_pkg::CNT_W_DEF,
  parameter int unsigned D_W          = ddv_pkg::D_W_DEF,
  parameter int unsigned PC_W         = ddv_pkg::PC_W_DEF,
  parameter int unsigned PHASE_W      = ddv_pkg::PHASE_W_DEF,
  localparam int unsigned ID_W  = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int unsigned C_W   = CNT_W + ID_W,
  localparam int unsigned DDS_W = CNT_W + D_W + C_W + ID_W,
  localparam int unsigned MD_W  = CNT_W + $clog2(ACC_ENTRIES + 1),
  localparam int unsigned E_W   = (FT_ENTRIES > 1) ? $clog2(FT_ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               commit_valid  [NODES],
  input  logic               commit_sync   [NODES],
  input  logic               commit_branch [NODES],
  input  logic [PC_W-1:0]    commit_pc     [NODES],
  input  logic               commit_mem    [NODES],
  input  logic [ID_W-1:0]    commit_home   [NODES],
  input  logic [MD_W-1:0]    bbv_thresh,
  input  logic [DDS_W-1:0]   dds_thresh,
  input  logic               d_wr_en,
  input  logic [ID_W-1:0]    d_wr_i,
  input  logic [ID_W-1:0]    d_wr_j,
  input  logic [D_W-1:0]     d_wr_data,
  input  logic               phase_flush   [NODES],
  output logic               phase_valid   [NODES],
  output logic [PHASE_W-1:0] phase_id      [NODES],
  output logic               phase_new     [NODES],
  output logic [E_W-1:0]     phase_entry   [NODES],
  output logic [DDS_W-1:0]   phase_dds     [NODES],
  output logic [MD_W-1:0]    phase_dist    [NODES],
  output logic               interval_end  [NODES],
  output logic               interval_stretched [NODES],
  output logic               xchg_grant
);
  logic             xreq    [NODES];
  logic             r_valid [NODES];
  logic [ID_W-1:0]  r_src;
  logic             r_last;
  logic [CNT_W-1:0] r_data  [NODES];
  logic             q_valid [NODES];
  logic [ID_W-1:0]  q_row;
  logic             h_valid [NODES];
  logic [CNT_W-1:0] h_data  [NODES][NODES];

  ddv_exchange_fabric #(.NODES(NODES), .CNT_W(CNT_W)) u_fabric (
    .clk, .rst_n,
    .xreq, .r_valid, .r_src, .r_last, .r_data,
    .q_valid, .q_row, .h_valid, .h_data,
    .grant (xchg_grant)
  );

  for (genvar n = 0; n < NODES; n++) begin : g_node
    phase_detector_node #(
      .NODES(NODES), .NODE_ID(n), .ACC_ENTRIES(ACC_ENTRIES),
      .FT_ENTRIES(FT_ENTRIES), .INTERVAL_LEN(INTERVAL_LEN), .CNT_W(CNT_W),
      .D_W(D_W), .PC_W(PC_W), .PHASE_W(PHASE_W)
    ) u_node (
      .clk, .rst_n,
      .commit_valid  (commit_valid[n]),
      .commit_sync   (commit_sync[n]),
      .commit_branch (commit_branch[n]),
      .commit_pc     (commit_pc[n]),
      .commit_mem    (commit_mem[n]),
      .commit_home   (commit_home[n]),
      .bbv_thresh, .dds_thresh,
      .d_wr_en, .d_wr_i, .d_wr_j, .d_wr_data,
      .phase_flush   (phase_flush[n]),
      .xreq          (xreq[n]),
      .r_valid       (r_valid[n]),
      .r_src, .r_last, .r_data,
      .q_valid       (q_valid[n]),
      .q_row,
      .h_valid       (h_valid[n]),
      .h_data        (h_data[n]),
      .phase_valid   (phase_valid[n]),
      .phase_id      (phase_id[n]),
      .phase_new     (phase_new[n]),
      .phase_entry   (phase_entry[n]),
      .phase_dds     (phase_dds[n]),
      .phase_dist    (phase_dist[n]),
      .interval_end  (interval_end[n]),
      .interval_stretched (interval_stretched[n])
    );
  end

endmodule

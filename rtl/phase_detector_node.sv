// phase_detector_node: BBV+DDV phase detector of one processor.
//
// The processor presents its commit stream, one instruction per cycle: a
// commit flag, whether it is a synchronization instruction, whether it is
// a branch (with its address) and whether it is a load or store (with the
// home node of the data). Non-synchronization instructions advance the
// sampling interval and the BBV accumulator; loads and stores count in the
// frequency matrix F.
//
// When the interval ends the controller
//   1. snapshots and restarts the BBV accumulator and clears C (ND_IDLE),
//   2. requests the F_i vector of every node through the exchange fabric
//      (`xreq`) and sums them into C, keeping its own as F_i (ND_XCHG),
//   3. computes DDS = sum_j F_ij * D_ij * C_j (ND_DDS, NODES+1 cycles),
//   4. searches the footprint table with the accumulator and the DDS
//      (ND_SEARCH, FT_ENTRIES+2 cycles) and reports the phase with
//      `phase_valid`: its ID, whether it is new, and the DDS.
// Meanwhile this node answers the fabric's queries for its own F matrix at
// any time (`q_valid`, `q_row` -> `h_valid`, `h_data` one cycle later).
// `phase_flush` empties the footprint table while the node is idle, so that
// a new thread starts without the old thread's phases (context switch).
// An interval that ends while a classification is still running is
// stretched until the controller is idle again (`interval_stretched`).
//
// The sequence of steps, the structures and their sizes follow the source
// design; the commit interface, the snapshot of the accumulator at the
// interval boundary and the stretching rule are this design's own.
module phase_detector_node #(
  parameter int unsigned NODES        = ddv_pkg::NODES_DEF,
  parameter int unsigned NODE_ID      = 0,
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
  // commit stream
  input  logic               commit_valid,
  input  logic               commit_sync,
  input  logic               commit_branch,
  input  logic [PC_W-1:0]    commit_pc,
  input  logic               commit_mem,
  input  logic [ID_W-1:0]    commit_home,
  // configuration
  input  logic [MD_W-1:0]    bbv_thresh,
  input  logic [DDS_W-1:0]   dds_thresh,
  input  logic               d_wr_en,
  input  logic [ID_W-1:0]    d_wr_i,
  input  logic [ID_W-1:0]    d_wr_j,
  input  logic [D_W-1:0]     d_wr_data,
  input  logic               phase_flush,  // drop the phase history (idle only)
  // exchange fabric, requester side
  output logic               xreq,
  input  logic               r_valid,
  input  logic [ID_W-1:0]    r_src,
  input  logic               r_last,
  input  logic [CNT_W-1:0]   r_data [NODES],
  // exchange fabric, hand-out side
  input  logic               q_valid,
  input  logic [ID_W-1:0]    q_row,
  output logic               h_valid,
  output logic [CNT_W-1:0]   h_data [NODES],
  // classification result
  output logic               phase_valid,
  output logic [PHASE_W-1:0] phase_id,
  output logic               phase_new,
  output logic [E_W-1:0]     phase_entry,
  output logic [DDS_W-1:0]   phase_dds,
  output logic [MD_W-1:0]    phase_dist,   // Manhattan distance of a match
  output logic               interval_end,
  output logic               interval_stretched
);
  import ddv_pkg::*;

  node_state_e state;

  logic             counted;   // a non-synchronization instruction commits
  logic [CNT_W-1:0] acc_q [ACC_ENTRIES];
  logic [C_W-1:0]   c_vec [NODES];
  logic [CNT_W-1:0] f_own [NODES];
  logic [ID_W-1:0]  d_j;
  logic [D_W-1:0]   d_val;
  logic             dds_start, dds_done, dds_busy;
  logic [DDS_W-1:0] dds;
  logic             ft_start, ft_done, ft_busy;

  assign counted = commit_valid && !commit_sync;

  interval_timer #(.LEN(INTERVAL_LEN)) u_timer (
    .clk, .rst_n,
    .commit_valid (counted),
    .ready        (state == ND_IDLE),
    .interval_end (interval_end),
    .stretched    (interval_stretched)
  );

  bbv_accumulator #(.ENTRIES(ACC_ENTRIES), .CNT_W(CNT_W), .PC_W(PC_W)) u_acc (
    .clk, .rst_n,
    .commit_valid  (counted),
    .commit_branch (commit_branch),
    .branch_pc     (commit_pc),
    .snap          (interval_end),
    .acc_q         (acc_q)
  );

  ddv_freq_matrix #(.NODES(NODES), .CNT_W(CNT_W)) u_freq (
    .clk, .rst_n,
    .mem_valid (commit_valid && commit_mem),
    .mem_home  (commit_home),
    .rd_en     (q_valid),
    .rd_row    (q_row),
    .rd_valid  (h_valid),
    .rd_data   (h_data)
  );

  ddv_contention_vector #(.NODES(NODES), .CNT_W(CNT_W), .NODE_ID(NODE_ID)) u_cvec (
    .clk, .rst_n,
    .clear     (interval_end),
    .rsp_valid (r_valid && state == ND_XCHG),
    .rsp_src   (r_src),
    .rsp_data  (r_data),
    .c_vec     (c_vec),
    .f_own     (f_own)
  );

  ddv_distance_matrix #(.NODES(NODES), .D_W(D_W)) u_dist (
    .clk, .rst_n,
    .wr_en   (d_wr_en),
    .wr_i    (d_wr_i),
    .wr_j    (d_wr_j),
    .wr_data (d_wr_data),
    .rd_i    (ID_W'(NODE_ID)),
    .rd_j    (d_j),
    .rd_data (d_val)
  );

  dds_unit #(.NODES(NODES), .CNT_W(CNT_W), .D_W(D_W)) u_dds (
    .clk, .rst_n,
    .start (dds_start),
    .f_own (f_own),
    .c_vec (c_vec),
    .d_j   (d_j),
    .d_val (d_val),
    .dds   (dds),
    .done  (dds_done),
    .busy  (dds_busy)
  );

  footprint_table #(
    .ENTRIES(FT_ENTRIES), .DIM(ACC_ENTRIES), .CNT_W(CNT_W),
    .DDS_W(DDS_W), .PHASE_W(PHASE_W)
  ) u_ft (
    .clk, .rst_n,
    .start      (ft_start),
    .flush      (phase_flush && state == ND_IDLE && !interval_end),
    .acc        (acc_q),
    .dds        (dds),
    .bbv_thresh (bbv_thresh),
    .dds_thresh (dds_thresh),
    .done       (ft_done),
    .phase_id   (phase_id),
    .new_phase  (phase_new),
    .entry      (phase_entry),
    .match_dist (phase_dist),
    .busy       (ft_busy)
  );

  assign xreq        = (state == ND_XCHG);
  assign dds_start   = (state == ND_XCHG) && r_valid && r_last;
  assign ft_start    = (state == ND_DDS) && dds_done;
  assign phase_valid = (state == ND_SEARCH) && ft_done;
  assign phase_dds   = dds;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ND_IDLE;
    else begin
      unique case (state)
        ND_IDLE:   if (interval_end) state <= ND_XCHG;
        ND_XCHG:   if (dds_start)    state <= ND_DDS;
        ND_DDS:    if (ft_start)     state <= ND_SEARCH;
        ND_SEARCH: if (phase_valid)  state <= ND_IDLE;
        default:   state <= ND_IDLE;
      endcase
    end
  end

  // The DDS and footprint units only run in their own controller state.
  a_dds_state: assert property (@(posedge clk) disable iff (!rst_n)
                                dds_busy |-> state == ND_DDS);
  a_ft_state:  assert property (@(posedge clk) disable iff (!rst_n)
                                ft_busy |-> state == ND_SEARCH);

endmodule

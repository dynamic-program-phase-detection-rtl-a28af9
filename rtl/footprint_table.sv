// footprint_table: footprint table and phase classifier of one node.
//
// Each of ENTRIES entries holds a footprint vector (a past BBV accumulator),
// its DDS footprint, a phase ID and a valid bit. On `start` the table is
// searched one entry per cycle. For entry e it forms the Manhattan distance
// between the accumulator `acc` and the footprint vector (DIM absolute
// differences summed in one cycle) and the absolute difference between
// `dds` and the DDS footprint. An entry matches when both are below their
// thresholds (`bbv_thresh`, `dds_thresh`, strict); among matching entries the
// one with the smallest Manhattan distance wins (lowest index on a tie).
//
// One cycle after the last entry the result is given with `done`:
//  - a match: `phase_id` of the entry, `new_phase` = 0, the entry becomes
//    most recently used;
//  - no match: a new entry is allocated (the first invalid one, else the
//    least recently used), it stores `acc`, `dds` and a fresh phase ID, and
//    `new_phase` = 1.
// `flush` (accepted only while idle) invalidates every entry, for instance on
// a context switch when the phase history of the old thread is dropped; it
// does not restart the phase-ID counter.
// Latency: ENTRIES + 2 cycles from `start` to `done`. `acc` and `dds` must
// stay stable meanwhile. LRU order is kept exactly with a rank per entry
// (0 = most recently used).
//
// Matching on both distances, the smallest-Manhattan rule, allocation of a
// new entry with LRU replacement and the 32 x 32 size follow the source
// design. Entry-serial search, phase-ID numbering by a wrapping counter,
// strict comparisons, the flush port and the widths are this design's own
// choices.
module footprint_table #(
  parameter int unsigned ENTRIES = ddv_pkg::FT_ENTRIES_DEF,
  parameter int unsigned DIM     = ddv_pkg::ACC_ENTRIES_DEF,
  parameter int unsigned CNT_W   = ddv_pkg::CNT_W_DEF,
  parameter int unsigned DDS_W   = 66,
  parameter int unsigned PHASE_W = ddv_pkg::PHASE_W_DEF,
  localparam int unsigned MD_W   = CNT_W + $clog2(DIM + 1),
  localparam int unsigned E_W    = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               flush,      // invalidate all entries (idle only)
  input  logic [CNT_W-1:0]   acc [DIM],
  input  logic [DDS_W-1:0]   dds,
  input  logic [MD_W-1:0]    bbv_thresh,
  input  logic [DDS_W-1:0]   dds_thresh,
  output logic               done,
  output logic [PHASE_W-1:0] phase_id,
  output logic               new_phase,
  output logic [E_W-1:0]     entry,      // entry matched or allocated
  output logic [MD_W-1:0]    match_dist, // Manhattan distance of the match
  output logic               busy
);
  typedef enum logic [1:0] {FT_IDLE, FT_SCAN, FT_RESOLVE} ft_state_e;

  logic [CNT_W-1:0]   fp_vec  [ENTRIES][DIM];
  logic [DDS_W-1:0]   fp_dds  [ENTRIES];
  logic [PHASE_W-1:0] fp_pid  [ENTRIES];
  logic               fp_valid[ENTRIES];
  logic [E_W-1:0]     rank    [ENTRIES];
  logic [PHASE_W-1:0] next_pid;

  ft_state_e      state;
  logic [E_W-1:0] e_q;

  // Running results of the scan.
  logic           best_found, inv_found;
  logic [E_W-1:0] best_e, inv_e, lru_e, lru_rank;
  logic [MD_W-1:0] best_dist;

  // Distances to the entry under test.
  logic [MD_W-1:0]  man;
  logic [DDS_W-1:0] ddiff;
  logic             is_match;

  always_comb begin
    man = '0;
    for (int k = 0; k < DIM; k++) begin
      logic [CNT_W-1:0] diff;
      diff = (acc[k] >= fp_vec[e_q][k]) ? acc[k] - fp_vec[e_q][k] : fp_vec[e_q][k] - acc[k];
      man += MD_W'(diff);
    end
    ddiff    = (dds >= fp_dds[e_q]) ? dds - fp_dds[e_q] : fp_dds[e_q] - dds;
    is_match = fp_valid[e_q] && (man < bbv_thresh) && (ddiff < dds_thresh);
  end

  // Entry that is used this cycle (touched in the LRU order).
  logic           touch;
  logic [E_W-1:0] touch_e;
  logic           alloc;
  assign touch   = (state == FT_RESOLVE);
  assign alloc   = touch && !best_found;
  assign touch_e = best_found ? best_e : (inv_found ? inv_e : lru_e);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= FT_IDLE;
      e_q        <= '0;
      done       <= 1'b0;
      phase_id   <= '0;
      new_phase  <= 1'b0;
      entry      <= '0;
      match_dist <= '0;
      next_pid   <= '0;
      best_found <= 1'b0;
      inv_found  <= 1'b0;
      best_e     <= '0;
      inv_e      <= '0;
      lru_e      <= '0;
      lru_rank   <= '0;
      best_dist  <= '0;
      for (int e = 0; e < ENTRIES; e++) begin
        fp_valid[e] <= 1'b0;
        fp_dds[e]   <= '0;
        fp_pid[e]   <= '0;
        rank[e]     <= E_W'(ENTRIES - 1);
        for (int k = 0; k < DIM; k++) fp_vec[e][k] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        FT_IDLE: if (flush) begin
          for (int e = 0; e < ENTRIES; e++) fp_valid[e] <= 1'b0;
        end else if (start) begin
          state      <= FT_SCAN;
          e_q        <= '0;
          best_found <= 1'b0;
          inv_found  <= 1'b0;
          lru_rank   <= '0;
          lru_e      <= '0;
        end
        FT_SCAN: begin
          if (is_match && (!best_found || man < best_dist)) begin
            best_found <= 1'b1;
            best_e     <= e_q;
            best_dist  <= man;
          end
          if (!fp_valid[e_q] && !inv_found) begin
            inv_found <= 1'b1;
            inv_e     <= e_q;
          end
          if (fp_valid[e_q] && rank[e_q] >= lru_rank) begin
            lru_rank <= rank[e_q];
            lru_e    <= e_q;
          end
          if (e_q == E_W'(ENTRIES - 1)) state <= FT_RESOLVE;
          else                          e_q   <= e_q + 1'b1;
        end
        FT_RESOLVE: begin
          state      <= FT_IDLE;
          done       <= 1'b1;
          entry      <= touch_e;
          new_phase  <= alloc;
          match_dist <= best_found ? best_dist : '0;
          if (alloc) begin
            phase_id         <= next_pid;
            next_pid         <= next_pid + 1'b1;
            fp_valid[touch_e] <= 1'b1;
            fp_dds[touch_e]   <= dds;
            fp_pid[touch_e]   <= next_pid;
            for (int k = 0; k < DIM; k++) fp_vec[touch_e][k] <= acc[k];
          end else begin
            phase_id <= fp_pid[touch_e];
          end
          // LRU update: entries more recent than the touched one age by one.
          for (int e = 0; e < ENTRIES; e++) begin
            if (E_W'(e) == touch_e) rank[e] <= '0;
            else if (fp_valid[e] && (rank[e] < rank[touch_e] || !fp_valid[touch_e]))
              rank[e] <= rank[e] + 1'b1;
          end
        end
        default: state <= FT_IDLE;
      endcase
    end
  end

  assign busy = (state != FT_IDLE);

endmodule

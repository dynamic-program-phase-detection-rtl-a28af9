// dsm_tb_core: end-to-end test of dsm_phase_detector, shared by the
// reduced-size and the full-size testbench.
//
// Every node runs a synthetic program at one instruction per cycle. Its
// phase changes at its own interval boundaries following a schedule; a phase
// fixes the code (branch addresses and basic-block lengths) and the data
// distribution (how often it accesses memory and which homes it touches).
// Phase 2 runs the code of phase 0 on remote data, so only the data
// distribution scalar can tell them apart.
//
// A reference model, written independently of the RTL, follows the system
// cycle by cycle: a BBV accumulator per node, the frequency matrices of all
// nodes (observing which node is queried for which row), each requester's
// contention vector and DDS, and a footprint table per node with LRU
// recency by time stamps. Every phase report is compared with it (DDS,
// new-phase flag, phase ID, entry). The test also counts every mechanism
// the design has and fails if one never happened: interval ends, stretched
// intervals, collections, hand-outs from remote nodes, recurring phases,
// new phases, LRU evictions, phases split by the DDS alone, reprogrammed
// distances, and a flush of node 0's phase history after its second report
// (a context switch).
//
// FULL = 1 instantiates the top with no parameter override (its defaults).
module dsm_tb_core #(
  parameter bit          FULL         = 1'b0,
  parameter int unsigned NODES        = 8,
  parameter int unsigned INTERVAL_LEN = 64,
  parameter int unsigned FT_ENTRIES   = 4,
  parameter int unsigned N_INTERVALS  = 14,
  parameter int unsigned MAX_CYCLES   = 100000
) ();
  localparam int unsigned ACC_ENTRIES = 32;
  localparam int unsigned CNT_W   = 24;
  localparam int unsigned D_W     = 8;
  localparam int unsigned PC_W    = 32;
  localparam int unsigned PHASE_W = 16;
  localparam int unsigned ID_W  = (NODES > 1) ? $clog2(NODES) : 1;
  localparam int unsigned C_W   = CNT_W + ID_W;
  localparam int unsigned DDS_W = CNT_W + D_W + C_W + ID_W;
  localparam int unsigned MD_W  = CNT_W + $clog2(ACC_ENTRIES + 1);
  localparam int unsigned E_W   = (FT_ENTRIES > 1) ? $clog2(FT_ENTRIES) : 1;

  logic               clk = 0, rst_n = 0;
  logic               commit_valid  [NODES];
  logic               commit_sync   [NODES];
  logic               commit_branch [NODES];
  logic [PC_W-1:0]    commit_pc     [NODES];
  logic               commit_mem    [NODES];
  logic [ID_W-1:0]    commit_home   [NODES];
  logic [MD_W-1:0]    bbv_thresh;
  logic [DDS_W-1:0]   dds_thresh;
  logic               d_wr_en = 0;
  logic [ID_W-1:0]    d_wr_i = '0, d_wr_j = '0;
  logic [D_W-1:0]     d_wr_data = '0;
  logic               phase_flush   [NODES];
  logic               phase_valid   [NODES];
  logic [PHASE_W-1:0] phase_id      [NODES];
  logic               phase_new     [NODES];
  logic [E_W-1:0]     phase_entry   [NODES];
  logic [DDS_W-1:0]   phase_dds     [NODES];
  logic [MD_W-1:0]    phase_dist    [NODES];
  logic               interval_end  [NODES];
  logic               interval_stretched [NODES];
  logic               xchg_grant;
  logic               q_tap [NODES];
  logic [ID_W-1:0]    q_row_tap;

  if (FULL) begin : g_full
    dsm_phase_detector dut (.*);
    assign q_tap     = dut.q_valid;
    assign q_row_tap = dut.q_row;
  end else begin : g_red
    dsm_phase_detector #(
      .NODES(NODES), .INTERVAL_LEN(INTERVAL_LEN), .FT_ENTRIES(FT_ENTRIES)
    ) dut (.*);
    assign q_tap     = dut.q_valid;
    assign q_row_tap = dut.q_row;
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: stopped after %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // Workload
  // ------------------------------------------------------------------
  localparam int NSCHED = 14;
  int sched [NSCHED] = '{0, 0, 1, 1, 0, 2, 2, 0, 3, 4, 5, 6, 1, 0};

  function automatic int code_of(int ph);
    return (ph == 2) ? 0 : ph;
  endfunction

  // per-node program state
  int unsigned iv     [NODES];  // intervals completed
  int unsigned bb_pos [NODES];  // position inside the current basic block
  int unsigned bb_idx [NODES];  // which basic block
  int unsigned n_acc  [NODES];  // memory accesses so far
  int unsigned insn   [NODES];

  function automatic int unsigned bb_len(int code, int unsigned b);
    return 3 + ((code * 7 + b * 3) % 9);
  endfunction
  function automatic int unsigned bb_count(int code);
    return 4 + (code % 4);
  endfunction
  function automatic logic [PC_W-1:0] bb_pc(int code, int unsigned b);
    return PC_W'(32'h0040_0000 + code * 32'h1234 + b * 32'h84);
  endfunction

  // ------------------------------------------------------------------
  // Reference model
  // ------------------------------------------------------------------
  longint unsigned m_since [NODES];
  longint unsigned m_acc   [NODES][ACC_ENTRIES];
  longint unsigned m_snap  [NODES][ACC_ENTRIES];
  longint unsigned m_f     [NODES][NODES][NODES];   // [p][i][j]
  longint unsigned m_c     [NODES][NODES];
  longint unsigned m_own   [NODES][NODES];
  int unsigned     m_d     [NODES][NODES];
  // footprint tables
  longint unsigned t_vec [NODES][FT_ENTRIES][ACC_ENTRIES];
  longint unsigned t_dds [NODES][FT_ENTRIES];
  int unsigned     t_pid [NODES][FT_ENTRIES];
  bit              t_val [NODES][FT_ENTRIES];
  int unsigned     t_ts  [NODES][FT_ENTRIES];
  int unsigned     t_now [NODES];
  int unsigned     t_next[NODES];

  // mechanism counters
  int n_end = 0, n_stretch = 0, n_coll = 0, n_remote = 0, n_match = 0;
  int n_new = 0, n_evict = 0, n_dds_split = 0, n_dwr = 0, n_reports = 0, n_flush = 0;
  bit flush_next = 0;

  function automatic int unsigned hash_of(logic [PC_W-1:0] pc);
    int unsigned h = 0;
    logic [PC_W-1:0] w = pc >> 2;
    for (int b = 0; b < PC_W - 2; b += ID_W_H) h ^= (w >> b) & ((1 << ID_W_H) - 1);
    return h;
  endfunction
  localparam int ID_W_H = $clog2(ACC_ENTRIES);

  function automatic int unsigned hops(int unsigned a, int unsigned b);
    int unsigned n = $countones(a ^ b);
    return n == 0 ? 1 : n;
  endfunction

  task automatic classify(int n);
    longint unsigned dds, man, dd, best_man;
    bit found, inv;
    int best_e, inv_e, lru_e, e_exp;
    int unsigned pid_exp;
    bit bbv_only;
    dds = 0;
    for (int j = 0; j < NODES; j++) dds += m_own[n][j] * m_d[n][j] * m_c[n][j];
    found = 0; inv = 0; best_man = 0; best_e = 0; inv_e = 0; lru_e = -1; bbv_only = 0;
    for (int e = 0; e < FT_ENTRIES; e++) begin
      man = 0;
      for (int k = 0; k < ACC_ENTRIES; k++)
        man += (m_snap[n][k] >= t_vec[n][e][k]) ? m_snap[n][k] - t_vec[n][e][k]
                                                : t_vec[n][e][k] - m_snap[n][k];
      dd = (dds >= t_dds[n][e]) ? dds - t_dds[n][e] : t_dds[n][e] - dds;
      if (t_val[n][e] && man < bbv_thresh && dd >= dds_thresh) bbv_only = 1;
      if (t_val[n][e] && man < bbv_thresh && dd < dds_thresh && (!found || man < best_man)) begin
        found = 1; best_man = man; best_e = e;
      end
      if (!t_val[n][e] && !inv) begin inv = 1; inv_e = e; end
      if (t_val[n][e] && (lru_e < 0 || t_ts[n][e] < t_ts[n][lru_e])) lru_e = e;
    end
    t_now[n]++;
    if (found) begin
      e_exp = best_e; pid_exp = t_pid[n][best_e]; n_match++;
    end else begin
      e_exp = inv ? inv_e : lru_e;
      if (!inv) n_evict++;
      if (bbv_only) n_dds_split++;
      n_new++;
      pid_exp = t_next[n] % (1 << PHASE_W); t_next[n]++;
      for (int k = 0; k < ACC_ENTRIES; k++) t_vec[n][e_exp][k] = m_snap[n][k];
      t_dds[n][e_exp] = dds; t_pid[n][e_exp] = pid_exp; t_val[n][e_exp] = 1;
    end
    t_ts[n][e_exp] = t_now[n];
    checks += 4;
    if (phase_dds[n] != DDS_W'(dds)) begin
      failures++;
      $display("node %0d interval %0d: DDS %0d expected %0d", n, iv[n], phase_dds[n], dds);
    end
    if (phase_new[n] != !found) begin
      failures++;
      $display("node %0d interval %0d: new %0b expected %0b", n, iv[n], phase_new[n], !found);
    end
    if (phase_id[n] != PHASE_W'(pid_exp)) begin
      failures++;
      $display("node %0d interval %0d: phase %0d expected %0d", n, iv[n], phase_id[n], pid_exp);
    end
    if (phase_entry[n] != E_W'(e_exp)) begin
      failures++;
      $display("node %0d interval %0d: entry %0d expected %0d", n, iv[n], phase_entry[n], e_exp);
    end
  endtask

  // ------------------------------------------------------------------
  // Stimulus and checking, one pass per cycle
  // ------------------------------------------------------------------
  bit all_done;
  bit thresh_set = 0;

  initial begin
    for (int n = 0; n < NODES; n++) begin
      commit_valid[n] = 0; commit_sync[n] = 0; commit_branch[n] = 0;
      commit_pc[n] = '0; commit_mem[n] = 0; commit_home[n] = '0; phase_flush[n] = 0;
      iv[n] = 0; bb_pos[n] = 0; bb_idx[n] = 0; n_acc[n] = 0; insn[n] = 0;
      m_since[n] = 0; t_now[n] = 0; t_next[n] = 0;
      for (int k = 0; k < ACC_ENTRIES; k++) begin m_acc[n][k] = 0; m_snap[n][k] = 0; end
      for (int i = 0; i < NODES; i++) begin
        m_c[n][i] = 0; m_own[n][i] = 0; m_d[n][i] = hops(n, i);
        for (int j = 0; j < NODES; j++) m_f[n][i][j] = 0;
      end
      for (int e = 0; e < FT_ENTRIES; e++) begin
        t_val[n][e] = 0; t_dds[n][e] = 0; t_pid[n][e] = 0; t_ts[n][e] = 0;
        for (int k = 0; k < ACC_ENTRIES; k++) t_vec[n][e][k] = 0;
      end
    end
    bbv_thresh = MD_W'(INTERVAL_LEN / 4);
    dds_thresh = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reprogram two distances (symmetric)
    for (int w = 0; w < 2; w++) begin
      @(negedge clk);
      d_wr_en = 1;
      d_wr_i = ID_W'(NODES - 1 - w);
      d_wr_j = ID_W'(w);
      d_wr_data = D_W'(9 + w);
      m_d[NODES - 1 - w][w] = 9 + w;
      m_d[w][NODES - 1 - w] = 9 + w;
      n_dwr++;
    end
    @(negedge clk);
    d_wr_en = 0;

    forever begin
      @(negedge clk);
      cyc++;
      // ---- context switch on node 0 right after its second report ----
      phase_flush[0] = flush_next;
      flush_next = 0;
      // ---- drive one instruction per node ----
      for (int n = 0; n < NODES; n++) begin
        int ph, code;
        int unsigned per;
        ph   = sched[iv[n] % NSCHED];
        code = code_of(ph);
        commit_valid[n]  = (iv[n] < N_INTERVALS + 1);
        commit_sync[n]   = (insn[n] % 29 == 28);   // an occasional sync instruction
        commit_branch[n] = !commit_sync[n] && (bb_pos[n] + 1 == bb_len(code, bb_idx[n]));
        commit_pc[n]     = bb_pc(code, bb_idx[n]);
        per              = (ph == 2) ? 1 : 3;
        commit_mem[n]    = !commit_sync[n] && (insn[n] % per == 0);
        if (ph == 2)      commit_home[n] = ID_W'(n ^ (NODES - 1));             // far data
        else if (ph == 1) commit_home[n] = ID_W'((n + 1 + n_acc[n]) % NODES);  // spread
        else              commit_home[n] = (n_acc[n] % 4 == 3) ? ID_W'((n + 1) % NODES) : ID_W'(n);
      end
      #1;
      if (phase_flush[0] && !interval_end[0]) begin
        for (int e = 0; e < FT_ENTRIES; e++) t_val[0][e] = 0;
        n_flush++;
      end
      // ---- reference model: hand-outs (value before this cycle's access) ----
      for (int p = 0; p < NODES; p++) begin
        if (q_tap[p]) begin
          int i;
          i = int'(q_row_tap);
          for (int j = 0; j < NODES; j++) begin
            m_c[i][j] += m_f[p][i][j];
            if (p == i) m_own[i][j] = m_f[p][i][j];
            if (p != i && m_f[p][i][j] != 0) n_remote++;
            m_f[p][i][j] = 0;
          end
        end
      end
      // ---- reference model: commits ----
      for (int n = 0; n < NODES; n++) begin
        if (commit_valid[n] && commit_mem[n])
          for (int k = 0; k < NODES; k++) m_f[n][k][commit_home[n]]++;
        if (commit_valid[n] && !commit_sync[n]) begin
          m_since[n]++;
          if (commit_branch[n]) begin
            m_acc[n][hash_of(commit_pc[n])] += m_since[n];
            m_since[n] = 0;
          end
        end
      end
      if (xchg_grant) n_coll++;
      // ---- interval ends and phase reports ----
      for (int n = 0; n < NODES; n++) begin
        if (phase_valid[n]) begin
          n_reports++;
          classify(n);
          if (n == 0 && t_now[0] == 2) flush_next = 1;
          if (!thresh_set) begin
            // DDS threshold: a third of the first DDS seen
            dds_thresh = phase_dds[n] / 3;
            thresh_set = 1;
          end
        end
        if (interval_end[n]) begin
          n_end++;
          if (interval_stretched[n]) n_stretch++;
          for (int k = 0; k < ACC_ENTRIES; k++) begin
            m_snap[n][k] = m_acc[n][k];
            m_acc[n][k] = 0;
          end
          for (int j = 0; j < NODES; j++) m_c[n][j] = 0;
        end
      end
      // ---- advance the programs ----
      for (int n = 0; n < NODES; n++) begin
        if (commit_valid[n]) begin
          int code;
          code = code_of(sched[iv[n] % NSCHED]);
          insn[n]++;
          if (commit_mem[n]) n_acc[n]++;
          if (!commit_sync[n]) begin
            if (commit_branch[n]) begin
              bb_pos[n] = 0;
              bb_idx[n] = (bb_idx[n] + 1) % bb_count(code);
            end else begin
              bb_pos[n]++;
            end
          end
          if (interval_end[n]) begin
            iv[n]++;
            bb_pos[n] = 0; bb_idx[n] = 0;
          end
        end
      end
      all_done = 1;
      for (int n = 0; n < NODES; n++) if (t_now[n] < N_INTERVALS) all_done = 0;
      if (all_done) break;
    end

    $display("cycles %0d: interval ends %0d (stretched %0d), collections %0d, remote hand-out counts %0d",
             cyc, n_end, n_stretch, n_coll, n_remote);
    $display("reports %0d: recurring %0d, new %0d, evictions %0d, DDS-only splits %0d, distance writes %0d, flushes %0d",
             n_reports, n_match, n_new, n_evict, n_dds_split, n_dwr, n_flush);
    checks += 10;
    if (n_flush == 0)    begin failures++; $display("never: phase flush"); end
    if (n_end == 0)      begin failures++; $display("never: interval end"); end
    if (n_coll == 0)     begin failures++; $display("never: collection"); end
    if (n_remote == 0)   begin failures++; $display("never: remote hand-out"); end
    if (n_new == 0)      begin failures++; $display("never: new phase"); end
    if (n_dwr == 0)      begin failures++; $display("never: distance write"); end
    if (n_reports != NODES * N_INTERVALS) begin failures++; $display("reports %0d", n_reports); end
    if (!FULL) begin
      if (n_stretch == 0)   begin failures++; $display("never: stretched interval"); end
      if (n_match == 0)     begin failures++; $display("never: recurring phase"); end
      if (n_evict == 0)     begin failures++; $display("never: LRU eviction"); end
      if (n_dds_split == 0) begin failures++; $display("never: DDS-only split"); end
      checks += 4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_footprint_table: classifies random accumulators drawn around a few
// prototypes (so that both matches and new phases occur) and compares every
// result with a reference classifier that keeps the table as plain arrays
// and tracks recency with time stamps. Checks the phase ID, the new-phase
// flag, the entry, the match distance and the ENTRIES+2 cycle latency, and
// that LRU replacement happened. The table is flushed twice on the way.
module tb_footprint_table;
  localparam int unsigned ENTRIES = 8;
  localparam int unsigned DIM     = 8;
  localparam int unsigned CNT_W   = 16;
  localparam int unsigned DDS_W   = 20;
  localparam int unsigned PHASE_W = 8;
  localparam int unsigned MD_W    = CNT_W + $clog2(DIM + 1);
  localparam int unsigned E_W     = 3;

  logic clk = 0, rst_n = 0, start = 0, flush = 0;
  logic [CNT_W-1:0] acc [DIM];
  logic [DDS_W-1:0] dds = '0;
  logic [MD_W-1:0] bbv_thresh = '0;
  logic [DDS_W-1:0] dds_thresh = '0;
  logic done, new_phase, busy;
  logic [PHASE_W-1:0] phase_id;
  logic [E_W-1:0] entry;
  logic [MD_W-1:0] match_dist;
  int checks = 0, failures = 0;
  int n_match = 0, n_new = 0, n_evict = 0, n_dds_reject = 0, n_flush = 0;

  footprint_table #(.ENTRIES(ENTRIES), .DIM(DIM), .CNT_W(CNT_W), .DDS_W(DDS_W),
                    .PHASE_W(PHASE_W)) dut (.*);

  always #5 clk = ~clk;

  // reference table
  int unsigned mv [ENTRIES][DIM];
  int unsigned md [ENTRIES];
  int unsigned mp [ENTRIES];
  bit          mval [ENTRIES];
  int unsigned mts [ENTRIES];
  int unsigned now = 0, next_pid = 0;
  int unsigned proto [12][DIM];
  int unsigned proto_dds [12];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (acc[k]) acc[k] = '0;
    foreach (mval[e]) mval[e] = 0;
    for (int p = 0; p < 12; p++) begin
      for (int k = 0; k < DIM; k++) proto[p][k] = $urandom_range(0, 5000);
      proto_dds[p] = $urandom_range(0, 100000);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int p, lat;
      int unsigned man, dd, best_man, e_exp, pid_exp;
      bit found, inv;
      int best_e, inv_e, lru_e;
      @(negedge clk);
      if (t % 150 == 149) begin
        // drop the whole history: the next intervals must all be new
        flush = 1;
        foreach (mval[e]) mval[e] = 0;
        n_flush++;
        @(negedge clk);
        flush = 0;
      end
      // phase locality: stay within a window of prototypes that drifts
      p = (t / 60 + $urandom_range(0, 5)) % 12;
      for (int k = 0; k < DIM; k++)
        acc[k] = CNT_W'(proto[p][k] + $urandom_range(0, 200));
      dds = DDS_W'(proto_dds[p] + (($urandom_range(0, 9) == 0) ? 50000 : $urandom_range(0, 500)));
      bbv_thresh = MD_W'(2000);
      dds_thresh = DDS_W'(5000);
      // reference classification
      found = 0; inv = 0; best_man = 0; best_e = 0; inv_e = 0; lru_e = -1;
      for (int e = 0; e < ENTRIES; e++) begin
        man = 0;
        for (int k = 0; k < DIM; k++)
          man += (acc[k] >= mv[e][k]) ? acc[k] - mv[e][k] : mv[e][k] - acc[k];
        dd = (dds >= md[e]) ? dds - md[e] : md[e] - dds;
        if (mval[e] && man < bbv_thresh && dd >= dds_thresh) n_dds_reject++;
        if (mval[e] && man < bbv_thresh && dd < dds_thresh && (!found || man < best_man)) begin
          found = 1; best_man = man; best_e = e;
        end
        if (!mval[e] && !inv) begin inv = 1; inv_e = e; end
        if (mval[e] && (lru_e < 0 || mts[e] < mts[lru_e])) lru_e = e;
      end
      now++;
      if (found) begin
        e_exp = best_e; pid_exp = mp[best_e]; n_match++;
      end else begin
        e_exp = inv ? inv_e : lru_e;
        if (!inv) n_evict++;
        n_new++;
        pid_exp = next_pid % (1 << PHASE_W); next_pid++;
        for (int k = 0; k < DIM; k++) mv[e_exp][k] = acc[k];
        md[e_exp] = dds; mp[e_exp] = pid_exp; mval[e_exp] = 1;
      end
      mts[e_exp] = now;
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 1000) begin @(negedge clk); lat++; end
      checks += 5;
      if (lat != ENTRIES + 2) begin failures++; $display("latency %0d", lat); end
      if (new_phase != !found) failures++;
      if (entry != E_W'(e_exp)) failures++;
      if (phase_id != PHASE_W'(pid_exp)) failures++;
      if (found && match_dist != MD_W'(best_man)) failures++;
      if (failures > 0 && failures < 5)
        $display("t=%0d found=%0b e=%0d/%0d pid=%0d/%0d", t, found, entry, e_exp, phase_id, pid_exp);
    end
    $display("matches %0d new %0d evictions %0d dds-rejects %0d", n_match, n_new, n_evict, n_dds_reject);
    checks += 4;
    if (n_flush == 0) failures++;
    if (n_match == 0) failures++;
    if (n_evict == 0) failures++;
    if (n_dds_reject == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_phase_detector_node: one node with the testbench acting as the
// exchange fabric and the other nodes. The node runs a random commit stream
// with random homes; the testbench answers its collections (its own row
// queried from the node itself, the other rows made up) and also queries
// rows on behalf of other requesters. Checks every hand-out against a model
// of the F matrix, every DDS against the formula with hypercube distances,
// the latency from interval end to phase report (2*NODES + FT_ENTRIES + 4
// cycles when the fabric answers at once), and phase numbering: with open
// thresholds every interval after the first recurs as phase 0; with a zero
// DDS threshold every interval is a new phase and the table wraps (LRU).
module tb_phase_detector_node;
  localparam int unsigned NODES = 4;
  localparam int unsigned ME    = 2;
  localparam int unsigned FT    = 4;
  localparam int unsigned LEN   = 100;
  localparam int unsigned CNT_W = 24;
  localparam int unsigned D_W   = 8;
  localparam int unsigned ID_W  = 2;
  localparam int unsigned C_W   = CNT_W + ID_W;
  localparam int unsigned DDS_W = CNT_W + D_W + C_W + ID_W;
  localparam int unsigned MD_W  = CNT_W + 6;

  logic clk = 0, rst_n = 0;
  logic commit_valid = 0, commit_sync = 0, commit_branch = 0, commit_mem = 0;
  logic [31:0] commit_pc = '0;
  logic [ID_W-1:0] commit_home = '0;
  logic [MD_W-1:0] bbv_thresh = '1;
  logic [DDS_W-1:0] dds_thresh = '1;
  logic d_wr_en = 0, phase_flush = 0;
  logic [ID_W-1:0] d_wr_i = '0, d_wr_j = '0;
  logic [D_W-1:0] d_wr_data = '0;
  logic xreq, r_valid = 0, r_last = 0, q_valid = 0;
  logic [ID_W-1:0] r_src = '0, q_row = '0;
  logic [CNT_W-1:0] r_data [NODES];
  logic h_valid;
  logic [CNT_W-1:0] h_data [NODES];
  logic phase_valid, phase_new, interval_end, interval_stretched;
  logic [15:0] phase_id;
  logic [1:0] phase_entry;
  logic [DDS_W-1:0] phase_dds;
  logic [MD_W-1:0] phase_dist;
  int checks = 0, failures = 0;

  phase_detector_node #(.NODES(NODES), .NODE_ID(ME), .FT_ENTRIES(FT),
                        .INTERVAL_LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  longint unsigned mf [NODES][NODES];
  longint unsigned mc [NODES], mown [NODES], exp_h [NODES];
  bit exp_hv = 0;
  int unsigned cyc = 0, t_end = 0, n_rep = 0, n_new = 0, n_rec = 0;
  // collection driven by the testbench
  int xphase = -1;   // -1 idle, 0 own query issued, 1.. delivering
  longint unsigned own_row [NODES];

  function automatic int unsigned hops(int unsigned a, int unsigned b);
    int unsigned n = $countones(a ^ b);
    return n == 0 ? 1 : n;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mf[i, j]) mf[i][j] = 0;
    foreach (r_data[j]) r_data[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n_rep < 16) begin
      @(negedge clk);
      cyc++;
      // hand-out of last cycle's query
      checks++;
      if (h_valid != exp_hv) failures++;
      if (exp_hv) for (int j = 0; j < NODES; j++) begin
        checks++;
        if (h_data[j] != CNT_W'(exp_h[j])) begin
          failures++;
          if (failures < 6) $display("hand-out col %0d: %0d expected %0d", j, h_data[j], exp_h[j]);
        end
      end
      // fabric side: deliver the collection
      r_valid = 0; r_last = 0; q_valid = 0;
      if (xphase >= 1) begin
        int p;
        p = xphase - 1;
        r_valid = 1;
        r_src   = ID_W'(p);
        r_last  = (p == NODES - 1);
        for (int j = 0; j < NODES; j++) begin
          r_data[j] = (p == ME) ? CNT_W'(own_row[j]) : CNT_W'($urandom_range(0, 50));
          mc[j] += r_data[j];
          if (p == ME) mown[j] = r_data[j];
        end
        xphase = r_last ? -1 : xphase + 1;
      end
      if (xphase == 0) begin
        // the node's own row came back: now deliver
        for (int j = 0; j < NODES; j++) own_row[j] = h_data[j];
        xphase = 1;
        r_valid = 1; r_src = '0; r_last = 0;
        for (int j = 0; j < NODES; j++) begin
          r_data[j] = CNT_W'($urandom_range(0, 50));
          mc[j] += r_data[j];
        end
        xphase = 2;
      end
      if (xreq && xphase == -1 && !phase_valid && cyc != t_end && !q_valid && !dut.u_cvec.rsp_valid) begin
        if (cyc > t_end && (cyc - t_end) >= 1 && mc[0] == 0 && mc[1] == 0 && mc[2] == 0 && mc[3] == 0) begin
          q_valid = 1; q_row = ID_W'(ME); xphase = 0;
        end
      end
      if (!q_valid && xphase == -1 && $urandom_range(0, 9) == 0) begin
        q_valid = 1; q_row = ID_W'($urandom_range(0, NODES - 1));
        if (q_row == ID_W'(ME)) q_valid = 0;
      end
      // commit stream
      commit_valid  = 1;
      commit_sync   = ($urandom_range(0, 19) == 0);
      commit_branch = ($urandom_range(0, 4) == 0);
      commit_pc     = 32'h100 + 4 * $urandom_range(0, 7);
      commit_mem    = ($urandom_range(0, 2) == 0);
      commit_home   = ID_W'($urandom_range(0, NODES - 1));
      #1;
      // model F: query first (value before this cycle's access), then count
      exp_hv = q_valid;
      if (q_valid) for (int j = 0; j < NODES; j++) begin
        exp_h[j] = mf[q_row][j];
        mf[q_row][j] = 0;
      end
      if (commit_mem) for (int i = 0; i < NODES; i++) mf[i][commit_home]++;
      if (interval_end) begin
        t_end = cyc;
        foreach (mc[j]) begin mc[j] = 0; mown[j] = 0; end
      end
      if (phase_valid) begin
        longint unsigned dds;
        dds = 0;
        for (int j = 0; j < NODES; j++) dds += mown[j] * hops(ME, j) * mc[j];
        checks += 3;
        if (phase_dds != DDS_W'(dds)) begin failures++; $display("DDS %0d expected %0d", phase_dds, dds); end
        if (cyc - t_end != 2 * NODES + FT + 4) begin
          failures++; $display("report %0d cycles after interval end", cyc - t_end);
        end
        if (n_rep < 8) begin
          // open thresholds: the first interval is new, the rest recur as phase 0
          if (phase_new != (n_rep == 0) || phase_id != 0) begin
            failures++; $display("rep %0d: new %0b id %0d", n_rep, phase_new, phase_id);
          end
        end else begin
          // zero DDS threshold: always new, IDs keep counting, entries wrap
          if (!phase_new || phase_id != 16'(n_rep - 7) || phase_entry != 2'((n_rep - 7) % FT)) begin
            failures++; $display("rep %0d: new %0b id %0d entry %0d", n_rep, phase_new, phase_id, phase_entry);
          end
        end
        if (phase_new) n_new++; else n_rec++;
        n_rep++;
        if (n_rep == 8) dds_thresh = '0;
      end
    end
    $display("reports %0d new %0d recurring %0d", n_rep, n_new, n_rec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

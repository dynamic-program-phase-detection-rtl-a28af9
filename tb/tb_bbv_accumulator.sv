// tb_bbv_accumulator: random commit stream against a reference model.
// The model keeps its own instructions-since-branch count and counters,
// hashes the branch address by XOR-folding its word address, and is
// compared with the snapshot after every end of interval.
module tb_bbv_accumulator;
  localparam int unsigned ENTRIES = 32;
  localparam int unsigned CNT_W   = 24;
  localparam int unsigned PC_W    = 32;

  logic clk = 0, rst_n = 0;
  logic commit_valid = 0, commit_branch = 0, snap = 0;
  logic [PC_W-1:0] branch_pc = '0;
  logic [CNT_W-1:0] acc_q [ENTRIES];
  int checks = 0, failures = 0;

  bbv_accumulator #(.ENTRIES(ENTRIES), .CNT_W(CNT_W), .PC_W(PC_W)) dut (.*);

  always #5 clk = ~clk;

  longint unsigned m_acc [ENTRIES];
  longint unsigned m_since;

  function automatic int unsigned fold(logic [PC_W-1:0] pc);
    int unsigned h = 0;
    logic [PC_W-1:0] w = pc >> 2;
    for (int b = 0; b < PC_W - 2; b += 5) h ^= (w >> b) & 5'h1f;
    return h;
  endfunction

  // a few hot branches so that counters get large
  logic [PC_W-1:0] pcs [8];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) pcs[i] = $urandom();
    for (int e = 0; e < ENTRIES; e++) m_acc[e] = 0;
    m_since = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      commit_valid  = ($urandom_range(0, 9) != 0);
      commit_branch = ($urandom_range(0, 5) == 0);
      branch_pc     = ($urandom_range(0, 3) == 0) ? $urandom() : pcs[$urandom_range(0, 7)];
      snap          = ($urandom_range(0, 999) == 0) || cyc == 19999;
      // model
      if (commit_valid) begin
        m_since++;
        if (commit_branch) begin
          m_acc[fold(branch_pc)] += m_since;
          m_since = 0;
        end
      end
      @(posedge clk);
      #1;
      if (snap) begin
        for (int e = 0; e < ENTRIES; e++) begin
          checks++;
          if (acc_q[e] != CNT_W'(m_acc[e])) begin
            failures++;
            if (failures < 10) $display("entry %0d: got %0d expected %0d", e, acc_q[e], m_acc[e]);
          end
          m_acc[e] = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

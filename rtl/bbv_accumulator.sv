// bbv_accumulator: basic-block vector accumulator of one processor.
//
// Every committed instruction advances a count of instructions since the last
// branch. When a branch commits, its address is hashed to one of ENTRIES
// counters and that counter adds the count (the branch itself included); the
// count then restarts. The counters therefore hold how many instructions were
// executed in the basic blocks ending at each hashed branch in this interval.
//
// On `snap` (end of interval) the counters, with this cycle's update applied,
// are copied to `acc_q` and the live counters restart from zero, so counting
// of the next interval never stops while the previous one is classified.
// `acc_q` holds its value until the next `snap`.
//
// Follows the source mechanism: hashed branch address, add of the
// instructions since the last branch, 32 entries. This design's own choices:
// the hash (XOR-fold of the word address, bits [1:0] dropped), saturating
// CNT_W-bit counters, one committed instruction per cycle, and the
// snapshot/restart at the interval boundary.
module bbv_accumulator #(
  parameter int unsigned ENTRIES = ddv_pkg::ACC_ENTRIES_DEF,
  parameter int unsigned CNT_W   = ddv_pkg::CNT_W_DEF,
  parameter int unsigned PC_W    = ddv_pkg::PC_W_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 commit_valid,   // one non-sync instruction committed
  input  logic                 commit_branch,  // ... and it is a branch
  input  logic [PC_W-1:0]      branch_pc,
  input  logic                 snap,           // end of interval
  output logic [CNT_W-1:0]     acc_q [ENTRIES] // accumulator of the last interval
);
  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic [CNT_W-1:0] acc   [ENTRIES];
  logic [CNT_W-1:0] acc_n [ENTRIES];
  logic [CNT_W-1:0] since_br, since_br_inc;
  logic [IDX_W-1:0] idx;

  // XOR-fold of the word address into IDX_W bits.
  always_comb begin
    idx = '0;
    for (int b = 2; b < PC_W; b++) idx[(b - 2) % IDX_W] ^= branch_pc[b];
  end

  assign since_br_inc = (since_br == CNT_MAX) ? since_br : since_br + 1'b1;

  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      acc_n[e] = acc[e];
      if (commit_valid && commit_branch && idx == IDX_W'(e)) begin
        acc_n[e] = (CNT_MAX - acc[e] < since_br_inc) ? CNT_MAX : acc[e] + since_br_inc;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      since_br <= '0;
      for (int e = 0; e < ENTRIES; e++) begin
        acc[e]   <= '0;
        acc_q[e] <= '0;
      end
    end else begin
      if (commit_valid) since_br <= commit_branch ? '0 : since_br_inc;
      for (int e = 0; e < ENTRIES; e++) begin
        acc[e] <= snap ? '0 : acc_n[e];
        if (snap) acc_q[e] <= acc_n[e];
      end
    end
  end

endmodule

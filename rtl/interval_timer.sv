// interval_timer: sampling-interval counter of one processor.
//
// Counts committed non-synchronization instructions. When the count of the
// current interval reaches LEN and the detector is `ready`, it raises
// `interval_end` for one cycle and restarts; the instruction committed in
// that cycle is the last one of the ending interval. If the detector is
// still classifying the previous interval when LEN is reached, the interval
// is stretched until `ready` returns and `stretched` is raised with
// `interval_end`.
//
// The interval length (3M instructions divided by the node count) follows
// the source design; the stretching rule is this design's own choice.
module interval_timer #(
  parameter int unsigned LEN = ddv_pkg::TOTAL_INTERVAL / ddv_pkg::NODES_DEF,
  parameter int unsigned W   = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic commit_valid,  // a non-sync instruction commits this cycle
  input  logic ready,         // detector can start a new classification
  output logic interval_end,
  output logic stretched
);
  logic [W-1:0] cnt, cnt_n;
  logic         late;     // LEN reached while the detector was busy

  assign cnt_n        = commit_valid ? cnt + 1'b1 : cnt;
  assign interval_end = ready && (cnt_n >= W'(LEN));
  assign stretched    = interval_end && late;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      late <= 1'b0;
    end else if (interval_end) begin
      cnt  <= '0;
      late <= 1'b0;
    end else if (cnt_n >= W'(LEN)) begin
      cnt  <= W'(LEN);  // hold at the limit until ready
      late <= 1'b1;
    end else begin
      cnt  <= cnt_n;
    end
  end

endmodule

// ddv_freq_matrix: frequency matrix F of the data distribution vector (DDV)
// held at one node p.
//
// NODES x NODES counters. Row i counts, on behalf of node i, the loads and
// stores committed by this node since node i last started an interval,
// split by the home node j of the data accessed (column j). A committed
// access with home j increments column j of every row. When node i ends an
// interval it queries row i of every node (`rd_en`, `rd_row`): the row is
// handed out on `rd_data` one cycle later with `rd_valid`, and the stored
// row restarts from zero. An access committed in the query cycle is counted
// in the fresh row, so no access is lost or counted twice.
//
// The counting rule and the read-and-clear on hand-out follow the source
// design. Saturating CNT_W-bit counters and the one-cycle read latency are
// this design's own choices.
module ddv_freq_matrix #(
  parameter int unsigned NODES = ddv_pkg::NODES_DEF,
  parameter int unsigned CNT_W = ddv_pkg::CNT_W_DEF,
  localparam int unsigned ID_W = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mem_valid,   // committed load or store
  input  logic [ID_W-1:0]  mem_home,    // home node of the data it accessed
  input  logic             rd_en,       // hand out row rd_row
  input  logic [ID_W-1:0]  rd_row,
  output logic             rd_valid,
  output logic [CNT_W-1:0] rd_data [NODES]
);
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic [CNT_W-1:0] f [NODES][NODES];  // f[i][j] = F_ij

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      for (int i = 0; i < NODES; i++) begin
        rd_data[i] <= '0;
        for (int j = 0; j < NODES; j++) f[i][j] <= '0;
      end
    end else begin
      rd_valid <= rd_en;
      for (int i = 0; i < NODES; i++) begin
        for (int j = 0; j < NODES; j++) begin
          logic hit, clr;
          hit = mem_valid && (mem_home == ID_W'(j));
          clr = rd_en && (rd_row == ID_W'(i));
          if (clr)                          f[i][j] <= hit ? CNT_W'(1) : '0;
          else if (hit && f[i][j] != CNT_MAX) f[i][j] <= f[i][j] + 1'b1;
        end
      end
      if (rd_en) begin
        for (int j = 0; j < NODES; j++) rd_data[j] <= f[rd_row][j];
      end
    end
  end

endmodule

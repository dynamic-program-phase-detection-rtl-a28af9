// ddv_distance_matrix: distance matrix D of the data distribution vector.
//
// D_ij is the cost of reaching node j from node i, with D_ii = 1. Distances
// are symmetric, so only the lower triangle (j <= i) is stored:
// NODES*(NODES+1)/2 entries, entry (i,j) at i*(i+1)/2 + j. Reading (i,j) or
// (j,i) gives the same entry. The entries come out of reset with the hop
// count of a binary hypercube (1 on the diagonal) and may be reprogrammed
// through the write port; reads are combinational.
//
// That D is a matrix of pre-programmed constants with 1 on the diagonal
// follows the source design, as does the triangular storage of a symmetric
// matrix. The hypercube reset values, the write port and D_W are this
// design's own choices.
module ddv_distance_matrix #(
  parameter int unsigned NODES = ddv_pkg::NODES_DEF,
  parameter int unsigned D_W   = ddv_pkg::D_W_DEF,
  localparam int unsigned ID_W = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  logic [ID_W-1:0] wr_i,
  input  logic [ID_W-1:0] wr_j,
  input  logic [D_W-1:0]  wr_data,
  input  logic [ID_W-1:0] rd_i,
  input  logic [ID_W-1:0] rd_j,
  output logic [D_W-1:0]  rd_data
);
  localparam int unsigned TRI = NODES * (NODES + 1) / 2;
  localparam int unsigned TA_W = (TRI > 1) ? $clog2(TRI) : 1;

  logic [D_W-1:0] d [TRI];

  function automatic logic [TA_W-1:0] tri_addr(logic [ID_W-1:0] a, logic [ID_W-1:0] b);
    int unsigned hi, lo;
    hi = (a >= b) ? int'(a) : int'(b);
    lo = (a >= b) ? int'(b) : int'(a);
    return TA_W'(hi * (hi + 1) / 2 + lo);
  endfunction

  assign rd_data = d[tri_addr(rd_i, rd_j)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NODES; i++)
        for (int j = 0; j <= i; j++)
          d[i * (i + 1) / 2 + j] <= D_W'(ddv_pkg::hop_distance(i, j));
    end else if (wr_en) begin
      d[tri_addr(wr_i, wr_j)] <= wr_data;
    end
  end

endmodule

// ddv_contention_vector: contention vector C of one node, and its own F_i.
//
// When node i ends an interval, every node (itself included) hands out its
// F_i vector. Each hand-out arrives here as `rsp_valid` with the vector on
// `rsp_data` and its sender on `rsp_src`; it is added element by element
// into C, so that after all NODES hand-outs C_j counts the accesses to data
// with home j made by the whole system during node i's interval. The vector
// handed out by node i itself is also kept in `f_own` (F_ij of the DDS
// formula). `clear` zeroes both at the start of a collection.
//
// The summation of the n vectors into C follows the source design. Widths
// are sized so that the sum cannot overflow: C_W = CNT_W + clog2(NODES).
module ddv_contention_vector #(
  parameter int unsigned NODES = ddv_pkg::NODES_DEF,
  parameter int unsigned CNT_W = ddv_pkg::CNT_W_DEF,
  parameter int unsigned NODE_ID = 0,
  localparam int unsigned ID_W = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int unsigned C_W  = CNT_W + ID_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             rsp_valid,
  input  logic [ID_W-1:0]  rsp_src,
  input  logic [CNT_W-1:0] rsp_data [NODES],
  output logic [C_W-1:0]   c_vec    [NODES],
  output logic [CNT_W-1:0] f_own    [NODES]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NODES; j++) begin
        c_vec[j] <= '0;
        f_own[j] <= '0;
      end
    end else if (clear) begin
      for (int j = 0; j < NODES; j++) begin
        c_vec[j] <= '0;
        f_own[j] <= '0;
      end
    end else if (rsp_valid) begin
      for (int j = 0; j < NODES; j++) begin
        c_vec[j] <= c_vec[j] + C_W'(rsp_data[j]);
        if (rsp_src == ID_W'(NODE_ID)) f_own[j] <= rsp_data[j];
      end
    end
  end

endmodule

// dds_unit: data distribution scalar of node i.
//
//   DDS = sum over j of F_ij * D_ij * C_j
//
// F_ij is the number of accesses node i made to data with home j in its
// interval, D_ij the distance from i to j and C_j the system-wide count of
// accesses to data with home j in that interval. The sum is formed one term
// per cycle with a single multiply-accumulate: `start` loads j = 0, each
// following cycle adds term j and reads D_i(j+1) through `d_j`/`d_val`, and
// `done` is raised for one cycle NODES+1 cycles after `start`, with the
// result on `dds` (held until the next `start`).
//
// The formula follows the source design; serial evaluation, the D read port
// and the full-precision width DDS_W are this design's own choices.
module dds_unit #(
  parameter int unsigned NODES = ddv_pkg::NODES_DEF,
  parameter int unsigned CNT_W = ddv_pkg::CNT_W_DEF,
  parameter int unsigned D_W   = ddv_pkg::D_W_DEF,
  localparam int unsigned ID_W  = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int unsigned C_W   = CNT_W + ID_W,
  localparam int unsigned DDS_W = CNT_W + D_W + C_W + ID_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] f_own [NODES],
  input  logic [C_W-1:0]   c_vec [NODES],
  output logic [ID_W-1:0]  d_j,     // column of D_ij read this cycle
  input  logic [D_W-1:0]   d_val,   // D_ij for j = d_j
  output logic [DDS_W-1:0] dds,
  output logic             done,
  output logic             busy
);
  localparam int unsigned J_W = ID_W + 1;

  logic [J_W-1:0]   j_q;
  logic [DDS_W-1:0] term;

  assign d_j  = ID_W'(j_q);
  assign term = DDS_W'(f_own[ID_W'(j_q)]) * DDS_W'(d_val) * DDS_W'(c_vec[ID_W'(j_q)]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j_q  <= '0;
      dds  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        j_q  <= '0;
        dds  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        dds <= dds + term;
        if (j_q == J_W'(NODES - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          j_q <= j_q + 1'b1;
        end
      end
    end
  end

endmodule

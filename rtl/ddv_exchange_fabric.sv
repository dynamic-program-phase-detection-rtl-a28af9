// ddv_exchange_fabric: carries F_i-vector hand-outs between the nodes.
//
// A node that ends an interval raises `xreq[i]` and holds it until it has
// received the last hand-out. The fabric grants one requester at a time,
// round robin, and then queries the nodes in turn, p = 0 .. NODES-1: in one
// cycle it raises `q_valid[p]` with `q_row` = i, node p answers one cycle
// later with `h_valid[p]` and its row F_i on `h_data[p]`, and the fabric
// passes that vector on to node i in the same cycle (`r_valid[i]`, `r_src`
// = p, `r_data`, `r_last` on p = NODES-1). Queries are pipelined, one per
// cycle, so the last hand-out reaches the requester NODES + 1 cycles after
// the grant, which comes in the first cycle the fabric is idle and sees the
// request.
//
// That the requester collects the F_i vector of every node, and that each
// node clears its copy as it hands it out, follows the source design, which
// leaves the transport to the machine's interconnect. This fabric, a single
// shared query/response path with round-robin arbitration, is this design's
// own stand-in for it.
module ddv_exchange_fabric #(
  parameter int unsigned NODES = ddv_pkg::NODES_DEF,
  parameter int unsigned CNT_W = ddv_pkg::CNT_W_DEF,
  localparam int unsigned ID_W = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // requesters
  input  logic             xreq    [NODES],
  output logic             r_valid [NODES],
  output logic [ID_W-1:0]  r_src,
  output logic             r_last,
  output logic [CNT_W-1:0] r_data  [NODES],
  // hand-out side
  output logic             q_valid [NODES],
  output logic [ID_W-1:0]  q_row,
  input  logic             h_valid [NODES],
  input  logic [CNT_W-1:0] h_data  [NODES][NODES],
  output logic             grant          // a collection starts this cycle
);
  typedef enum logic [1:0] {FX_IDLE, FX_SERVE, FX_DRAIN} fx_state_e;

  fx_state_e       state;
  logic [ID_W-1:0] req_q, ptr, p_q, pend_src;
  logic            pend_valid;
  logic            found;
  logic [ID_W-1:0] pick;

  // Round-robin choice: first requester at or after ptr.
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 0; k < NODES; k++) begin
      logic [ID_W-1:0] c;
      c = ID_W'((int'(ptr) + k) % NODES);
      if (!found && xreq[c]) begin
        found = 1'b1;
        pick  = c;
      end
    end
  end

  assign grant = (state == FX_IDLE) && found;
  assign q_row = req_q;

  always_comb begin
    for (int n = 0; n < NODES; n++) begin
      q_valid[n] = (state == FX_SERVE) && (p_q == ID_W'(n));
      r_valid[n] = pend_valid && (req_q == ID_W'(n));
    end
    r_src  = pend_src;
    r_last = pend_valid && (pend_src == ID_W'(NODES - 1));
    for (int j = 0; j < NODES; j++) r_data[j] = h_data[pend_src][j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= FX_IDLE;
      req_q      <= '0;
      ptr        <= '0;
      p_q        <= '0;
      pend_src   <= '0;
      pend_valid <= 1'b0;
    end else begin
      pend_valid <= (state == FX_SERVE);
      pend_src   <= p_q;
      unique case (state)
        FX_IDLE: if (found) begin
          state <= FX_SERVE;
          req_q <= pick;
          p_q   <= '0;
        end
        FX_SERVE: begin
          if (p_q == ID_W'(NODES - 1)) state <= FX_DRAIN;
          else                         p_q   <= p_q + 1'b1;
        end
        FX_DRAIN: begin
          state <= FX_IDLE;
          ptr   <= ID_W'((int'(req_q) + 1) % NODES);
        end
        default: state <= FX_IDLE;
      endcase
    end
  end

  // Every query is answered in the following cycle.
  a_answer: assert property (@(posedge clk) disable iff (!rst_n)
                             pend_valid |-> h_valid[pend_src]);
  // The requester keeps asking until its collection is complete.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (state != FX_IDLE) |-> xreq[req_q]);

endmodule

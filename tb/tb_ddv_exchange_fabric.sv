// tb_ddv_exchange_fabric: the testbench plays NODES nodes. Each answers a
// query one cycle later with a vector that encodes (responder, row, column,
// query count), and raises requests at random, holding them until its last
// hand-out. Checks that every collection delivers the vectors of nodes
// 0..NODES-1 in order, unchanged, to the requester only, that grants follow
// round-robin order, and that a collection takes NODES+1 cycles from grant
// to last hand-out.
module tb_ddv_exchange_fabric;
  localparam int unsigned NODES = 4;
  localparam int unsigned CNT_W = 16;
  localparam int unsigned ID_W  = 2;
  logic clk = 0, rst_n = 0;
  logic xreq [NODES];
  logic r_valid [NODES];
  logic [ID_W-1:0] r_src, q_row;
  logic r_last, grant;
  logic [CNT_W-1:0] r_data [NODES];
  logic q_valid [NODES];
  logic h_valid [NODES];
  logic [CNT_W-1:0] h_data [NODES][NODES];
  int checks = 0, failures = 0;

  ddv_exchange_fabric #(.NODES(NODES), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  int unsigned qcount [NODES];
  // node models: answer one cycle after a query
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NODES; n++) begin
        h_valid[n] <= 0;
        qcount[n]  <= 0;
        for (int j = 0; j < NODES; j++) h_data[n][j] <= '0;
      end
    end else begin
      for (int n = 0; n < NODES; n++) begin
        h_valid[n] <= q_valid[n];
        if (q_valid[n]) begin
          qcount[n] <= qcount[n] + 1;
          for (int j = 0; j < NODES; j++)
            h_data[n][j] <= CNT_W'((n << 12) | (q_row << 8) | (j << 4) | (qcount[n] & 15));
        end
      end
    end
  end

  int next_src [NODES];
  bit want [NODES];
  int grants = 0, collections = 0, g_cycle = 0, cyc = 0;
  int exp_ptr = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (xreq[n]) begin xreq[n] = 0; next_src[n] = 0; want[n] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // requesters whose collection ended last cycle have left their
      // collecting state
      for (int n = 0; n < NODES; n++) if (want[n]) begin xreq[n] = 0; want[n] = 0; end
      // hand-outs delivered this cycle
      for (int n = 0; n < NODES; n++) begin
        if (r_valid[n]) begin
          checks++;
          if (!xreq[n] || int'(r_src) != next_src[n]) begin
            failures++;
            $display("node %0d got src %0d expected %0d", n, r_src, next_src[n]);
          end
          for (int j = 0; j < NODES; j++) begin
            checks++;
            if ((r_data[j] >> 4) != CNT_W'((r_src << 8) | (n << 4) | j)) failures++;
          end
          checks++;
          if (r_last != (next_src[n] == NODES - 1)) failures++;
          next_src[n]++;
          if (r_last) begin
            checks++;
            if (cyc - g_cycle != NODES + 1) begin
              failures++;
              $display("collection took %0d cycles", cyc - g_cycle);
            end
            next_src[n] = 0;
            want[n] = 1;
            collections++;
          end
        end
      end
      // raise new requests
      for (int n = 0; n < NODES; n++)
        if (!xreq[n] && $urandom_range(0, 20) == 0) xreq[n] = 1;
      #1;
      if (grant) begin
        int pick;
        pick = -1;
        for (int k = 0; k < NODES; k++)
          if (pick < 0 && xreq[(exp_ptr + k) % NODES]) pick = (exp_ptr + k) % NODES;
        checks++;
        if (int'(dut.pick) != pick) begin failures++; $display("grant %0d expected %0d", dut.pick, pick); end
        exp_ptr = (pick + 1) % NODES;
        g_cycle = cyc;
        grants++;
      end
    end
    $display("grants %0d collections %0d", grants, collections);
    checks++;
    if (collections < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

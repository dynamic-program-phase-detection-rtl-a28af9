// tb_ddv_contention_vector: feeds NODES random hand-outs per collection and
// compares C with their element-wise sum and f_own with the vector sent by
// the node itself; also checks that clear restarts both.
module tb_ddv_contention_vector;
  localparam int unsigned NODES = 8;
  localparam int unsigned CNT_W = 24;
  localparam int unsigned ID_W  = 3;
  localparam int unsigned C_W   = CNT_W + ID_W;
  localparam int unsigned ME    = 5;
  logic clk = 0, rst_n = 0;
  logic clear = 0, rsp_valid = 0;
  logic [ID_W-1:0] rsp_src = '0;
  logic [CNT_W-1:0] rsp_data [NODES];
  logic [C_W-1:0] c_vec [NODES];
  logic [CNT_W-1:0] f_own [NODES];
  int checks = 0, failures = 0;

  ddv_contention_vector #(.NODES(NODES), .CNT_W(CNT_W), .NODE_ID(ME)) dut (.*);

  always #5 clk = ~clk;

  longint unsigned mc [NODES];
  longint unsigned mf [NODES];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (rsp_data[j]) rsp_data[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 50; round++) begin
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      foreach (mc[j]) begin mc[j] = 0; mf[j] = 0; end
      for (int p = 0; p < NODES; p++) begin
        rsp_valid = 1;
        rsp_src = ID_W'(p);
        foreach (rsp_data[j]) begin
          rsp_data[j] = CNT_W'($urandom_range(0, (round % 2) ? 32'hFFFFFF : 1000));
          mc[j] += rsp_data[j];
          if (p == ME) mf[j] = rsp_data[j];
        end
        @(negedge clk);
        rsp_valid = 0;
        if ($urandom_range(0, 1)) @(negedge clk);
      end
      foreach (mc[j]) begin
        checks += 2;
        if (c_vec[j] != C_W'(mc[j])) begin
          failures++;
          if (failures < 10) $display("C[%0d] = %0d, expected %0d", j, c_vec[j], mc[j]);
        end
        if (f_own[j] != CNT_W'(mf[j])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

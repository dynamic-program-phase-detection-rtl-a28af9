// tb_ddv_distance_matrix: checks the hypercube reset values of every (i,j),
// the symmetry of reads, and that a write to (i,j) is seen at (j,i) and
// leaves every other entry alone.
module tb_ddv_distance_matrix;
  localparam int unsigned NODES = 32;
  localparam int unsigned D_W   = 8;
  localparam int unsigned ID_W  = 5;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [ID_W-1:0] wr_i = '0, wr_j = '0, rd_i = '0, rd_j = '0;
  logic [D_W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;

  ddv_distance_matrix #(.NODES(NODES), .D_W(D_W)) dut (.*);

  always #5 clk = ~clk;

  int unsigned m [NODES][NODES];

  function automatic int unsigned hops(int unsigned a, int unsigned b);
    int unsigned n = $countones(a ^ b);
    return n == 0 ? 1 : n;
  endfunction

  task automatic check_all();
    for (int i = 0; i < NODES; i++)
      for (int j = 0; j < NODES; j++) begin
        rd_i = ID_W'(i); rd_j = ID_W'(j);
        #1;
        checks++;
        if (rd_data != D_W'(m[i][j])) begin
          failures++;
          if (failures < 10) $display("D[%0d][%0d] = %0d, expected %0d", i, j, rd_data, m[i][j]);
        end
      end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m[i, j]) m[i][j] = hops(i, j);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int w = 0; w < 40; w++) begin
      @(negedge clk);
      wr_en = 1;
      wr_i = ID_W'($urandom_range(0, NODES - 1));
      wr_j = ID_W'($urandom_range(0, NODES - 1));
      wr_data = D_W'($urandom_range(0, 255));
      m[wr_i][wr_j] = wr_data;
      m[wr_j][wr_i] = wr_data;
      @(negedge clk);
      wr_en = 0;
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

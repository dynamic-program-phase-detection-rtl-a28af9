// tb_ddv_freq_matrix: random accesses and random read-and-clear queries
// against a reference count per (requester, home) pair, including accesses
// that commit in the same cycle as the query of their row.
module tb_ddv_freq_matrix;
  localparam int unsigned NODES = 8;
  localparam int unsigned CNT_W = 24;
  localparam int unsigned ID_W  = 3;
  logic clk = 0, rst_n = 0;
  logic mem_valid = 0, rd_en = 0;
  logic [ID_W-1:0] mem_home = '0, rd_row = '0;
  logic rd_valid;
  logic [CNT_W-1:0] rd_data [NODES];
  int checks = 0, failures = 0;

  ddv_freq_matrix #(.NODES(NODES), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  int unsigned m [NODES][NODES];
  int unsigned exp_row [NODES];
  bit pending = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m[i, j]) m[i][j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // check the hand-out of the previous cycle's query
      if (pending) begin
        checks++;
        if (!rd_valid) failures++;
        for (int j = 0; j < NODES; j++) begin
          checks++;
          if (rd_data[j] != CNT_W'(exp_row[j])) begin
            failures++;
            if (failures < 10) $display("cyc %0d col %0d: got %0d exp %0d", cyc, j, rd_data[j], exp_row[j]);
          end
        end
      end else begin
        checks++;
        if (rd_valid) failures++;
      end
      mem_valid = ($urandom_range(0, 2) != 0);
      mem_home  = ID_W'($urandom_range(0, NODES - 1));
      rd_en     = ($urandom_range(0, 30) == 0);
      rd_row    = ID_W'($urandom_range(0, NODES - 1));
      pending   = rd_en;
      if (rd_en) begin
        for (int j = 0; j < NODES; j++) begin
          exp_row[j] = m[rd_row][j];
          m[rd_row][j] = 0;
        end
      end
      if (mem_valid) for (int i = 0; i < NODES; i++) m[i][mem_home]++;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

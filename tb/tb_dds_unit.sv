// tb_dds_unit: random F, C and D (D served through the unit's read port
// from a table in the testbench); checks DDS against the sum of products
// and that done comes NODES+1 cycles after start.
module tb_dds_unit;
  localparam int unsigned NODES = 32;
  localparam int unsigned CNT_W = 24;
  localparam int unsigned D_W   = 8;
  localparam int unsigned ID_W  = 5;
  localparam int unsigned C_W   = CNT_W + ID_W;
  localparam int unsigned DDS_W = CNT_W + D_W + C_W + ID_W;
  logic clk = 0, rst_n = 0, start = 0;
  logic [CNT_W-1:0] f_own [NODES];
  logic [C_W-1:0] c_vec [NODES];
  logic [ID_W-1:0] d_j;
  logic [D_W-1:0] d_val;
  logic [DDS_W-1:0] dds;
  logic done, busy;
  int checks = 0, failures = 0;

  dds_unit #(.NODES(NODES), .CNT_W(CNT_W), .D_W(D_W)) dut (.*);

  always #5 clk = ~clk;

  logic [D_W-1:0] dtab [NODES];
  assign d_val = dtab[d_j];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DDS_W-1:0] expv;
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      expv = '0;
      for (int j = 0; j < NODES; j++) begin
        f_own[j] = (t < 2) ? '1 : CNT_W'($urandom());
        c_vec[j] = (t < 2) ? '1 : C_W'($urandom());
        dtab[j]  = (t < 2) ? '1 : D_W'($urandom());
        expv += DDS_W'(f_own[j]) * DDS_W'(dtab[j]) * DDS_W'(c_vec[j]);
      end
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 1000) begin @(negedge clk); lat++; end
      checks += 2;
      if (dds != expv) begin
        failures++;
        $display("DDS %0h expected %0h", dds, expv);
      end
      if (lat != NODES + 1) begin
        failures++;
        $display("latency %0d expected %0d", lat, NODES + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_interval_timer: checks that an interval ends exactly after LEN counted
// instructions, that synchronization gaps do not count, and that an
// interval reaching LEN while the detector is busy is stretched and ends on
// the first ready cycle.
module tb_interval_timer;
  localparam int unsigned LEN = 37;
  logic clk = 0, rst_n = 0;
  logic commit_valid = 0, ready = 1;
  logic interval_end, stretched;
  int checks = 0, failures = 0;
  int n_stretch = 0;

  interval_timer #(.LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt = 0;
  bit late = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit exp_end, exp_str;
      @(negedge clk);
      commit_valid = ($urandom_range(0, 3) != 0);
      ready        = (cyc % 400) < 300 ? 1'b1 : ($urandom_range(0, 7) == 0);
      if (commit_valid && cnt < LEN) cnt++;
      exp_end = ready && cnt >= LEN;
      exp_str = exp_end && late;
      #1;
      checks++;
      if (interval_end !== exp_end || stretched !== exp_str) begin
        failures++;
        if (failures < 10) $display("cyc %0d: end %b/%b stretched %b/%b", cyc, interval_end, exp_end, stretched, exp_str);
      end
      if (stretched) n_stretch++;
      if (exp_end) begin cnt = 0; late = 0; end
      else if (cnt >= LEN) late = 1;
      @(posedge clk);
    end
    checks++;
    if (n_stretch == 0) failures++;
    $display("stretched intervals: %0d", n_stretch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_window_size_ctrl: runs the window-size controller at its real 1M-
// instruction interval (4 instructions retired per cycle) with misprediction
// counts on both sides of each threshold, and checks the chosen size against
// a reference rule and the cycle at which each decision appears.
module tb_window_size_ctrl;
  logic clk = 0, rst_n = 0;
  logic [2:0] retire_cnt = 0;
  logic mispred = 0;
  logic [3:0] size_log2;
  logic update;
  int checks = 0, failures = 0;

  window_size_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [3:0] ref_size(int k);   // k mispredictions per 1M
    if (k * 10 > 6000) return 7;        // > 0.6 per 1K
    if (k * 10 > 3000) return 8;        // > 0.3 per 1K
    if (k * 10 > 1500) return 9;        // > 0.15 per 1K
    return 10;
  endfunction

  // one interval of 1M instructions = 250,000 cycles at 4 per cycle
  task automatic interval(int k);
    for (int c = 0; c < 250_000; c++) begin
      @(negedge clk);
      retire_cnt = 4;
      mispred    = (c < k);
      if (c < 249_999) begin
        #4; check_quiet();
      end
    end
    @(negedge clk);
    retire_cnt = 0; mispred = 0;
    check(size_log2 == ref_size(k), $sformatf("k=%0d size_log2=%0d expected %0d", k, size_log2, ref_size(k)));
    check(update, "update pulse after the interval's last instruction");
  endtask

  int early = 0;
  task automatic check_quiet();
    if (update) early++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(size_log2 == 10, "reset size 1024");
    interval(601);
    interval(600);
    interval(301);
    interval(300);
    interval(151);
    interval(150);
    interval(0);
    interval(2000);
    @(negedge clk);
    check(!update, "update is a single pulse");
    check(early == 0, $sformatf("no decision inside an interval (%0d)", early));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

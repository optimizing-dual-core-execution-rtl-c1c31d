// tb_adaptive_enable_ctrl: runs the enable/disable controller at its real
// 1M-instruction interval with L2-miss and important-misprediction counts on
// both sides of the thresholds of conditions A, B and C. It also checks that
// important mispredictions are taken from the back core while enabled and from
// the front core's latency detector while disabled.
module tb_adaptive_enable_ctrl;
  logic clk = 0, rst_n = 0;
  logic [2:0] retire_cnt = 0, l2_miss_cnt = 0;
  logic back_mispred = 0, front_important = 0;
  logic enable, decide, cond_a, cond_b, cond_c;
  int checks = 0, failures = 0;

  adaptive_enable_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference rule, counts are per 1M instructions, thresholds per 1K x 1000.
  function automatic bit ref_en(int l2, int ibr, output bit a, output bit b, output bit c);
    a = (l2 * 10 > 500_000) && (ibr * 10 < 25_000);
    b = (l2 * 10 > 250_000) && (ibr * 10 < 2_500);
    c = (l2 * 10 > 25_000)  && (ibr * 10 < 200);
    return a | b | c;
  endfunction

  // One interval: l2 misses, nb back-core and nf front-core important mispredictions.
  task automatic interval(int l2, int nb, int nf);
    bit was_en = enable, a, b, c, e;
    int ibr = was_en ? nb : nf;
    e = ref_en(l2, ibr, a, b, c);
    for (int cy = 0; cy < 250_000; cy++) begin
      @(negedge clk);
      retire_cnt      = 4;
      l2_miss_cnt     = (cy < l2) ? 3'd1 : 3'd0;
      back_mispred    = (cy < nb);
      front_important = (cy < nf);
    end
    @(negedge clk);
    retire_cnt = 0; l2_miss_cnt = 0; back_mispred = 0; front_important = 0;
    check(enable == e, $sformatf("l2=%0d nb=%0d nf=%0d was_en=%0d: enable=%0d expected %0d",
                                 l2, nb, nf, was_en, enable, e));
    check(decide && {cond_a, cond_b, cond_c} == {a, b, c}, "decide pulse with conditions");
    @(negedge clk);
    check(!decide, "decide is a single pulse");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(enable, "enabled after reset");
    interval(50_001, 2_499, 0);   // A holds
    interval(50_000, 249, 0);     // A fails on L2, B holds
    interval(30_000, 250, 0);     // nothing holds: disable
    interval(3_000, 100, 10);     // disabled: front count 10 < 20, C holds
    interval(3_000, 25, 5);       // enabled: back count 25, C fails
    interval(2_500, 0, 0);        // L2 not above 2.5 per 1K: stays disabled
    interval(60_000, 0, 3_000);   // disabled, front count 3000: A fails, stays off
    interval(60_000, 0, 2_000);   // A holds: enable
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

// tb_recovery_ctrl: raises each recovery request and mode-switch request and
// checks the flush pulse, the reported cause, the 64-cycle copy window, the
// copy direction and the mode, and that back-core requests are ignored in
// single-core mode and while a copy is in progress.
module tb_recovery_ctrl;
  import dce_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_mispred = 0, req_mismatch = 0, req_parity = 0, req_watchdog = 0;
  logic want_dual = 1, mode_switch_en = 0;
  logic flush, copying, copy_to_back, dual_mode;
  rec_cause_t cause;
  int checks = 0, failures = 0;

  recovery_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Hold the current requests until the flush, then measure the copy window.
  task automatic expect_recovery(rec_cause_t c, bit to_back, bit mode_after);
    int n = 0;
    #1;
    check(flush && cause == c, $sformatf("flush with cause %s (got %0d/%s)", c.name(), flush, cause.name()));
    @(negedge clk);
    req_mispred = 0; req_mismatch = 0; req_parity = 0; req_watchdog = 0;
    check(dual_mode == mode_after, "mode after the flush");
    while (copying) begin
      check(copy_to_back == to_back && !flush, "copy direction, no flush while copying");
      n++;
      @(negedge clk);
    end
    check(n == 64, $sformatf("copy took %0d cycles", n));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; #1;
    check(dual_mode && !copying && !flush, "dual-core mode after reset");
    req_mispred = 1;  expect_recovery(REC_MISPRED, 0, 1);
    req_watchdog = 1; req_mispred = 1; expect_recovery(REC_WATCHDOG, 0, 1);
    req_mismatch = 1; req_watchdog = 1; expect_recovery(REC_MISMATCH, 0, 1);
    req_parity = 1; req_mismatch = 1; expect_recovery(REC_PARITY, 0, 1);
    // a request during the copy window is ignored
    req_mispred = 1; #1;
    check(flush, "misprediction flush");
    @(negedge clk); #1;
    check(!flush && copying, "request ignored while copying");
    req_mispred = 0;
    while (copying) @(negedge clk);
    // want_dual low but switching not allowed: stay in dual mode
    want_dual = 0;
    repeat (5) @(negedge clk);
    check(dual_mode && !flush, "no switch without mode_switch_en");
    mode_switch_en = 1;
    expect_recovery(REC_TO_SINGLE, 0, 0);
    req_mispred = 1; req_parity = 1;
    repeat (3) @(negedge clk);
    check(!flush && !copying, "back-core requests ignored in single-core mode");
    req_mispred = 0; req_parity = 0;
    want_dual = 1;
    expect_recovery(REC_TO_DUAL, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_watchdog_timer: checks that the timer fires exactly TIMEOUT cycles
// after the last retirement, never fires while instructions keep retiring or
// while inactive, and fires again after a further TIMEOUT idle cycles. A
// cycle-by-cycle reference count of idle cycles checks every cycle.
module tb_watchdog_timer;
  logic clk = 0, rst_n = 0, active = 0, progress = 0, expire;
  int checks = 0, failures = 0, cyc = 0, fires = 0, last_fire = 0;

  watchdog_timer dut (.*);
  always #5 clk = ~clk;
  // Reference: idle cycles since the last retirement while active; expire
  // must rise exactly when that count reaches 8192, and never otherwise.
  int idle = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && expire) begin fires <= fires + 1; last_fire <= cyc; end
    if (rst_n) begin
      checks++;
      if (expire != (active && !progress && idle == 8192)) begin
        failures++;
        if (failures < 10) $display("FAIL: expire=%0d with %0d idle cycles", expire, idle);
      end
      idle <= (!active || progress) ? 0 : expire ? 1 : idle + 1;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // inactive for longer than the timeout: no expiry
    repeat (10000) @(negedge clk);
    check(fires == 0, "quiet while inactive");
    // active with a retirement at least every 8000 cycles: no expiry
    active = 1;
    for (int i = 0; i < 5; i++) begin
      repeat (8000) @(negedge clk);
      progress = 1; @(negedge clk); progress = 0;
    end
    check(fires == 0, "quiet while retiring");
    // stop retiring: expiry after exactly 8192 cycles
    t0 = cyc;
    while (fires == 0) @(negedge clk);
    check(last_fire - t0 == 8192, $sformatf("expired after %0d cycles", last_fire - t0));
    t0 = last_fire;
    while (fires == 1) @(negedge clk);
    check(last_fire - t0 == 8192, $sformatf("second expiry after %0d cycles", last_fire - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

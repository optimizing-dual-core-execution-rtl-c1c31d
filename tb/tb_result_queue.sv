// tb_result_queue: self-checking test of the result queue at its full
// 1,024-entry depth. It checks the 16-cycle push-to-visible delay, FIFO order
// against a scoreboard under random back-pressure, the capacity limit, the
// change of logical size to 128 entries taking effect only at a flush with
// resize set, not at a plain flush (with pointer
// wrap-around), and detection of a bit flipped inside a stored entry.
module tb_result_queue;
  import dce_pkg::*;

  logic clk = 0, rst_n = 0, flush = 0, resize = 0;
  logic [3:0] size_log2_next = 4'd10, cur_size_log2;
  logic [10:0] count;
  logic push_valid = 0, push_ready, pop_valid, pop_ready = 0, pop_parity_err;
  rq_payload_t push_data = '0, pop_data;
  int checks = 0, failures = 0;
  int cycle = 0;

  result_queue dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", what, cycle); end
  endtask

  function automatic rq_payload_t mk(int unsigned i);
    rq_payload_t p;
    p.pc = 32'h1000 + 4*i; p.instr = i * 32'h9e3779b9; p.result = i * 7 + 3;
    p.f_inv = i[0]; p.is_load = i[1];
    return p;
  endfunction

  rq_payload_t sb[$];

  // Runs n pushes and pops with random valid/ready, compares pop order with sb.
  task automatic stream(int n);
    int pushed = 0, popped = 0;
    while (popped < n) begin
      @(negedge clk);
      push_valid = (pushed < n) && ($urandom_range(0, 3) != 0);
      push_data  = mk(pushed + 5000);
      pop_ready  = ($urandom_range(0, 2) != 0);
      #4;  // sample the handshake just before the rising edge
      if (push_valid && push_ready) begin sb.push_back(push_data); pushed++; end
      if (pop_valid && pop_ready) begin
        rq_payload_t exp = sb.pop_front();
        check(pop_data == exp && !pop_parity_err, "stream order/data");
        popped++;
      end
    end
    @(negedge clk);
    push_valid <= 0; pop_ready <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(cur_size_log2 == 4'd10, "reset size is 1024");

    // 1. latency: push one entry, count cycles until the back side sees it
    begin
      int t0;
      push_valid <= 1; push_data <= mk(1);
      @(posedge clk); #1; t0 = cycle;
      push_valid <= 0;
      while (!pop_valid) begin @(posedge clk); #1; end
      check(cycle - t0 == 16, $sformatf("visible after 16 cycles (got %0d)", cycle - t0));
      check(pop_data == mk(1), "latency entry data");
      check(count == 1, "count one");
      pop_ready <= 1; @(posedge clk); #1; pop_ready <= 0;
      check(!pop_valid && count == 0, "empty after pop");
    end

    // 2. random stream through the full-size queue
    stream(3000);

    // 3. capacity of 1024 entries
    push_valid <= 1;
    for (int i = 0; i < 1100; i++) begin
      push_data <= mk(i);
      @(posedge clk);
    end
    #1;
    check(count == 1024 && !push_ready, $sformatf("full at 1024 (count %0d)", count));
    push_valid <= 0;

    // 4. request 128 entries; takes effect only at a flush with resize
    size_log2_next <= 4'd7;
    @(posedge clk); #1;
    check(cur_size_log2 == 4'd10, "size unchanged before flush");
    flush <= 1; @(posedge clk); flush <= 0; #1;
    check(cur_size_log2 == 4'd10 && count == 0, "a flush without resize keeps the size");
    flush <= 1; resize <= 1; @(posedge clk); flush <= 0; resize <= 0; #1;
    check(cur_size_log2 == 4'd7 && count == 0 && !pop_valid, "flush applies 128 entries");
    push_valid <= 1;
    for (int i = 0; i < 200; i++) begin push_data <= mk(i); @(posedge clk); end
    #1;
    check(count == 128 && !push_ready, $sformatf("full at 128 (count %0d)", count));
    push_valid <= 0;
    // drain and check the oldest entries came out first
    pop_ready <= 1;
    for (int i = 0; i < 128; i++) begin
      #1;
      check(pop_valid && pop_data == mk(i), "drain order at 128");
      @(posedge clk);
    end
    pop_ready <= 0;
    stream(700);   // wraps the 128-entry ring several times

    // 5. a bit flipped while stored is caught by the parity check
    push_valid <= 1; push_data <= mk(77); @(posedge clk); push_valid <= 0;
    repeat (20) @(posedge clk);
    #1;
    check(pop_valid && !pop_parity_err, "stored entry parity clean");
    dut.mem[dut.head].payload.result[5] = ~dut.mem[dut.head].payload.result[5];
    #1;
    check(pop_parity_err, "flipped bit detected");

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

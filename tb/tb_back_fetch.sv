// tb_back_fetch: feeds a queue model into the back-core fetch stage under
// random back-pressure in each mode and checks the emitted stream against a
// reference: in full-redundancy mode every F_INV entry appears twice, copy
// first; in selective mode only loads and F_INV entries are marked for
// execution; a parity error stops the stream and raises parity_fault.
module tb_back_fetch;
  import dce_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, dual_exec = 0, sel_reexec = 0;
  logic rq_valid, rq_parity_err = 0, rq_ready;
  rq_payload_t rq_data;
  logic uop_valid, uop_ready = 0, uop_redundant, uop_exec, parity_fault;
  rq_payload_t uop_data;
  int checks = 0, failures = 0;
  int n_dup = 0;

  back_fetch dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct packed {rq_payload_t p; logic red; logic ex;} exp_t;
  rq_payload_t src[$];
  int head;

  function automatic rq_payload_t mk(int i);
    rq_payload_t p;
    p.pc = 32'(i * 4); p.instr = 32'(i * 977); p.result = 32'(i * 31);
    p.f_inv = ((i * 7) % 5 == 0); p.is_load = ((i * 3) % 4 == 0);
    return p;
  endfunction

  task automatic drive_head();
    rq_valid = head < src.size();
    rq_data  = rq_valid ? src[head] : '0;
  endtask

  // Expected stream for one mode
  task automatic run(bit dx, bit sr, int n);
    exp_t exp[$];
    int got = 0;
    src.delete(); head = 0;
    for (int i = 0; i < n; i++) begin
      rq_payload_t p = mk(i + (dx ? 1000 : 0) + (sr ? 2000 : 0));
      src.push_back(p);
      if (dx && p.f_inv) exp.push_back('{p, 1'b1, 1'b1});
      exp.push_back('{p, 1'b0, !sr || p.is_load || p.f_inv});
    end
    dual_exec = dx; sel_reexec = sr;
    while (exp.size() > 0) begin
      @(negedge clk);
      uop_ready = $urandom_range(0, 2) != 0;
      drive_head();
      #4;
      if (uop_valid && uop_ready) begin
        exp_t e = exp.pop_front();
        check(uop_data == e.p && uop_redundant == e.red && uop_exec == e.ex,
              $sformatf("mode %0d%0d item pc=%h red=%0d exec=%0d", dx, sr, uop_data.pc, uop_redundant, uop_exec));
        if (uop_redundant) n_dup++;
      end
      if (rq_ready) begin
        check(rq_valid && uop_valid && !uop_redundant, "pop only with the original");
        head++;
      end
      @(posedge clk);
    end
    @(negedge clk);
    check(head == n, "all entries consumed");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 0, 400);   // full redundancy
    run(0, 0, 200);   // plain checking
    run(0, 1, 400);   // selective re-execution
    check(n_dup == 80, $sformatf("80 redundant copies (%0d)", n_dup));
    // parity error on an F_INV head: nothing issued, fault raised until flush
    src.delete(); head = 0; src.push_back(mk(5)); dual_exec = 1; sel_reexec = 0; drive_head();
    rq_parity_err = 1; uop_ready = 1;
    @(negedge clk);
    check(parity_fault && !uop_valid && !rq_ready, "parity error blocks the stream");
    flush = 1;
    @(negedge clk); flush = 0; rq_parity_err = 0; #1;
    check(!parity_fault, "fault cleared after the refetch");
    check(uop_valid && uop_redundant, "refetched entry starts with its copy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

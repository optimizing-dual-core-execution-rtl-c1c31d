// tb_redundancy_checker: retires random instruction streams through the
// checker in the three modes (plain checking, full redundancy with redundant
// copies, selective re-execution) with injected result errors, and checks the
// mismatch flag and the coverage counters against a reference model.
module tb_redundancy_checker;
  import dce_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, check_en = 0, sel_reexec = 0;
  logic ret_valid = 0, ret_redundant = 0, ret_f_inv = 0, ret_is_load = 0, ret_has_result = 0;
  word_t ret_front_result = 0, ret_back_result = 0;
  logic mismatch, commit_ok;
  logic [31:0] n_retired, n_checked, n_mismatch;
  int checks = 0, failures = 0;
  int e_ret = 0, e_chk = 0, e_mis = 0;

  redundancy_checker dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic retire(bit red, bit finv, bit ld, bit hr, word_t fr, word_t br, bit exp_mis, bit exp_chk);
    ret_valid = 1; ret_redundant = red; ret_f_inv = finv; ret_is_load = ld;
    ret_has_result = hr; ret_front_result = fr; ret_back_result = br;
    #1;
    check(mismatch == exp_mis && commit_ok == !exp_mis,
          $sformatf("red=%0d finv=%0d ld=%0d mismatch=%0d expected %0d", red, finv, ld, mismatch, exp_mis));
    if (!red) begin
      if (exp_mis) e_mis++;
      else begin e_ret++; if (exp_chk) e_chk++; end
    end
    @(negedge clk);
    ret_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 3; mode++) begin
      check_en = (mode != 2); sel_reexec = (mode == 2);
      for (int n = 0; n < 3000; n++) begin
        automatic bit finv = ($urandom_range(0, 3) == 0);
        automatic bit ld = $urandom, hr = ($urandom_range(0, 5) != 0);
        automatic bit err = ($urandom_range(0, 19) == 0);
        automatic word_t v = $urandom, f = finv ? 32'hdead_0000 : v;
        automatic word_t b = err ? v ^ (32'h1 << $urandom_range(0, 31)) : v;
        if (mode == 1 && finv) begin
          // redundant copy then original: copy or original may be faulty
          automatic bit copy_bad = err && $urandom;
          retire(1, 1, ld, hr, f, copy_bad ? b : v, 0, 0);
          retire(0, 1, ld, hr, f, copy_bad ? v : b, err && hr, 1);
        end else begin
          automatic bit chk = !finv && hr && (check_en || (sel_reexec && ld));
          retire(0, finv, ld, hr, f, b, chk && err, chk);
        end
      end
    end
    check(n_retired == 32'(e_ret) && n_checked == 32'(e_chk) && n_mismatch == 32'(e_mis),
          $sformatf("counters %0d/%0d/%0d expected %0d/%0d/%0d", n_retired, n_checked, n_mismatch, e_ret, e_chk, e_mis));
    // flush drops a held redundant result
    check_en = 1; sel_reexec = 0;
    retire(1, 1, 0, 1, 0, 32'h55, 0, 0);
    flush = 1; @(negedge clk); flush = 0;
    retire(0, 0, 0, 1, 32'h77, 32'h77, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rename_unit: first replays the worked renaming example of a pair of
// invalidated instructions (A', A, B', B, C) and checks every mapping, then
// runs a long random mix of normal and redundant instructions with in-order
// retirement and occasional recoveries against a reference model of the
// rename table, the architectural map and the free list.
module tb_rename_unit;
  import dce_pkg::*;
  localparam int NP = 160;
  logic clk = 0, rst_n = 0, recover = 0;
  logic ren_valid = 0, ren_ready, ren_redundant = 0, ren_has_dst = 0;
  areg_t ren_src1 = 0, ren_src2 = 0, ren_dst = 0;
  logic [7:0] ren_psrc1, ren_psrc2, ren_pdst, ren_old_pdst;
  logic commit_valid = 0, commit_redundant = 0, commit_has_dst = 0;
  areg_t commit_dst = 0;
  logic [7:0] commit_pdst = 0, commit_old_pdst = 0;
  logic [8:0] free_count;
  int checks = 0, failures = 0;

  rename_unit dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference state
  int rmap[32], amap[32];
  bit rfree[NP];
  typedef struct packed {logic red; logic hd; logic [4:0] d; logic [7:0] p; logic [7:0] op;} rob_t;
  rob_t rob[$];

  function automatic int nfree();
    int n = 0;
    foreach (rfree[i]) n += rfree[i];
    return n;
  endfunction

  // Rename one instruction at the current negedge; returns its mappings.
  task automatic ren(bit red, bit hd, int d, int s1, int s2, output int p1, output int p2, output int pd);
    ren_valid = 1; ren_redundant = red; ren_has_dst = hd;
    ren_dst = 5'(d); ren_src1 = 5'(s1); ren_src2 = 5'(s2);
    #1;
    p1 = ren_psrc1; p2 = ren_psrc2; pd = ren_pdst;
    check(ren_psrc1 == 8'(rmap[s1]) && ren_psrc2 == 8'(rmap[s2]), "source mapping");
    if (hd && ren_ready) begin
      check(rfree[ren_pdst], $sformatf("p%0d allocated while in use", ren_pdst));
      check(ren_old_pdst == 8'(rmap[d]), "previous mapping");
      rfree[ren_pdst] = 0;
      rob.push_back('{red, hd, 5'(d), ren_pdst, ren_old_pdst});
      if (!red) rmap[d] = ren_pdst;
    end else if (!hd) begin
      rob.push_back('{red, hd, 5'(d), 8'd0, 8'd0});
    end
    @(negedge clk);
    ren_valid = 0;
  endtask

  task automatic retire_one();
    rob_t r = rob.pop_front();
    commit_valid = 1; commit_redundant = r.red; commit_has_dst = r.hd;
    commit_dst = r.d; commit_pdst = r.p; commit_old_pdst = r.op;
    if (r.hd) begin
      if (r.red) rfree[r.p] = 1;
      else begin amap[r.d] = r.p; rfree[r.op] = 1; end
    end
  endtask

  initial begin
    int p1, p2, pd, a_p, ap_p, b_p, bp_p, c_p, r1_0, r3_0;
    for (int a = 0; a < 32; a++) begin rmap[a] = a; amap[a] = a; end
    foreach (rfree[i]) rfree[i] = (i >= 32);
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(free_count == 128, "128 free after reset");

    // Worked example: A' A = load r1,8(r1); B' B = add r2,r1,10; C = load r1,0(r3)
    r1_0 = rmap[1]; r3_0 = rmap[3];
    ren(1, 1, 1, 1, 0, p1, p2, ap_p);
    check(p1 == r1_0 && rmap[1] == r1_0, "A' reads r1 and leaves the table");
    ren(0, 1, 1, 1, 0, p1, p2, a_p);
    check(p1 == r1_0 && a_p != ap_p, "A reads the same r1 as A', new register");
    ren(1, 1, 2, 1, 0, p1, p2, bp_p);
    check(p1 == a_p, "B' reads r1 from A");
    ren(0, 1, 2, 1, 0, p1, p2, b_p);
    check(p1 == a_p && b_p != bp_p, "B reads r1 from A");
    ren(0, 1, 1, 3, 0, p1, p2, c_p);
    check(p1 == r3_0, "C reads r3");
    #1;
    check(dut.map[1] == 8'(c_p) && dut.map[2] == 8'(b_p), "table holds C and B");
    // retire the five: redundant copies release their registers at once
    repeat (5) begin retire_one(); @(negedge clk); end
    commit_valid = 0;
    #1;
    check(free_count == 8'(nfree()), "free count after the example");

    // random run
    for (int n = 0; n < 20000; n++) begin
      automatic bit red = ($urandom_range(0, 3) == 0);
      automatic int d = $urandom_range(1, 31), s1 = $urandom_range(0, 31), s2 = $urandom_range(0, 31);
      automatic bit hd = ($urandom_range(0, 7) != 0);
      commit_valid = 0;
      // retire from the head with some probability (keep pairs in order)
      if (rob.size() > 0 && ($urandom_range(0, 2) != 0 || rob.size() > 100)) retire_one();
      if ($urandom_range(0, 999) == 0) begin
        // recovery: squash everything not retired
        recover = 1; ren_valid = 0;
        @(negedge clk);
        recover = 0; commit_valid = 0;
        rob.delete();
        for (int a = 0; a < 32; a++) rmap[a] = amap[a];
        foreach (rfree[i]) rfree[i] = 1;
        for (int a = 0; a < 32; a++) rfree[amap[a]] = 0;
        #1;
        check(free_count == 9'(nfree()), "free list rebuilt after recovery");
        continue;
      end
      ren(red, hd, d, s1, s2, p1, p2, pd);
      if (red) begin
        commit_valid = 0;
        ren(0, hd, d, s1, s2, p1, p2, pd);
      end
      #1;
      check(free_count == 9'(nfree()), "free count");
    end
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

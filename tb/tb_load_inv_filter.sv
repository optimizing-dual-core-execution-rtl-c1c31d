// tb_load_inv_filter: drives random instruction words (and directed traversal
// loads) with random miss, I/O and enable inputs, and checks the decision
// against a reference decoder written from the MIPS field layout.
module tb_load_inv_filter;
  logic valid, l2_miss, io_access, inv_enable;
  logic [31:0] instr;
  logic is_load, traversal, invalidate;
  int checks = 0, failures = 0;
  int n_trav = 0, n_inv = 0, n_kept = 0;

  load_inv_filter dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s instr=%h", what, instr); end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      bit [5:0] op;
      bit ld, tr, inv;
      bit [5:0] loads [7] = '{6'h20, 6'h21, 6'h23, 6'h24, 6'h25, 6'h27, 6'h37};
      instr = $urandom;
      if (n % 2 == 0) instr[31:26] = loads[$urandom_range(0, 6)];
      if (n % 4 == 0) instr[20:16] = instr[25:21];           // load ra, x(ra)
      valid = ($urandom_range(0, 9) != 0);
      l2_miss = $urandom; io_access = ($urandom_range(0, 7) == 0); inv_enable = $urandom;
      #1;
      op  = instr[31:26];
      ld  = valid && (op == 6'h20 || op == 6'h21 || op == 6'h23 || op == 6'h24 ||
                      op == 6'h25 || op == 6'h27 || op == 6'h37);
      tr  = ld && instr[25:21] == instr[20:16] && instr[25:21] != 0;
      inv = ld && (io_access || (l2_miss && inv_enable && !tr));
      check(is_load == ld, "is_load");
      check(traversal == tr, "traversal");
      check(invalidate == inv, "invalidate");
      if (tr && l2_miss && inv_enable && !io_access) n_kept++;
      if (tr) n_trav++;
      if (inv) n_inv++;
    end
    check(n_kept > 100 && n_inv > 100, "traversal loads kept valid on L2 misses");
    // the example from the text: lw r5, 8(r5) that misses is not invalidated
    instr = {6'h23, 5'd5, 5'd5, 16'd8}; valid = 1; l2_miss = 1; io_access = 0; inv_enable = 1; #1;
    check(traversal && !invalidate, "lw r5,8(r5) kept");
    instr = {6'h23, 5'd5, 5'd6, 16'd8}; #1;
    check(!traversal && invalidate, "lw r6,8(r5) invalidated");
    inv_enable = 0; #1;
    check(!invalidate, "nothing invalidated when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

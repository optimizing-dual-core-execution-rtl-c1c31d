// tb_important_mispred_detect: allocates checkpoints at known times, resolves
// them after chosen delays around the 100-cycle threshold, and checks the
// reported latency and the important flag against the cycle count.
module tb_important_mispred_detect;
  logic clk = 0, rst_n = 0;
  logic alloc_valid = 0, resolve_valid = 0, resolve_mispred = 0;
  logic [4:0] alloc_id = 0, resolve_id = 0;
  logic important;
  logic [31:0] latency;
  int checks = 0, failures = 0;
  int cyc = 0;
  int t_alloc [32];

  important_mispred_detect dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int delay [32];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // allocate all 32 checkpoints on consecutive cycles
    for (int i = 0; i < 32; i++) begin
      alloc_valid = 1; alloc_id = 5'(i); t_alloc[i] = cyc;
      @(negedge clk);
    end
    alloc_valid = 0;
    // resolve them in a scrambled order, checking latency each time
    for (int k = 0; k < 32; k++) begin
      automatic int i = (k * 13) % 32;
      int lat;
      while (cyc - t_alloc[i] < 60 + 3 * k) @(negedge clk);
      resolve_valid = 1; resolve_id = 5'(i); resolve_mispred = (k % 5 != 4);
      #1;
      lat = cyc - t_alloc[i];
      check(latency == 32'(lat), $sformatf("ckpt %0d latency %0d expected %0d", i, latency, lat));
      check(important == (resolve_mispred && lat > 100),
            $sformatf("ckpt %0d lat %0d important=%0d", i, lat, important));
      @(negedge clk);
      resolve_valid = 0;
    end
    // re-allocation overwrites the stamp
    alloc_valid = 1; alloc_id = 5'd3; t_alloc[3] = cyc; @(negedge clk); alloc_valid = 0;
    repeat (99) @(negedge clk);
    resolve_valid = 1; resolve_mispred = 1; resolve_id = 5'd3; #1;
    check(latency == 32'(cyc - t_alloc[3]) && !important, "exactly 100 cycles is not important");
    @(negedge clk);
    check(important, "101 cycles is important");
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

// tb_dce_top_full: end-to-end test of the dual-core execution machine with
// every parameter of dce_top at its default, including the published
// adaptation interval of 1M retired instructions.
//
// The behavioural cores of dce_env run each phase for 5M cycles, long enough
// for several intervals, so the window size, the load invalidation and the
// dual/single mode decisions are all taken at their published thresholds.
// As in tb_dce_top, the environment checks every commit and every state copy
// against a golden program and counts each mechanism, and this file flips one
// bit inside the result queue to provoke a parity recovery, and one bit each of
// the ECC-protected PC and register file, which must be corrected. About 28M cycles;
// a watchdog ends a run that hangs.
module tb_dce_top_full;
  import dce_pkg::*;
  `include "dce_tb_signals.svh"

  dce_top dut (.*);
  dce_env #(.PHASE(5_000_000), .EXPECT_ADAPT(1'b1)) env (.*);

  bit flipped = 1'b0;
  always @(negedge clk) begin
    if (parity_req && !flipped && dut.u_rq.stored != 0) begin
      dut.u_rq.mem[dut.u_rq.head].payload.pc[3] = ~dut.u_rq.mem[dut.u_rq.head].payload.pc[3];
      flipped = 1'b1;
    end
  end

  // One single-bit upset in the architectural PC and one in a register,
  // both of which the SECDED code must repair without a trace in the state
  // copies that the environment checks.
  initial begin
    wait (env.cyc == 20_000);
    @(negedge clk);
    dut.pc_cw[10] = ~dut.pc_cw[10];
    dut.u_arf.mem[7][3] = ~dut.u_arf.mem[7][3];
  end

  initial begin
    #1;                 // let the environment clear done first
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

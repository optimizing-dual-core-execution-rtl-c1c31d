// tb_dce_top: end-to-end test of the dual-core execution machine.
//
// dce_top runs at its published sizes except for the adaptation interval,
// which is shortened from 1M to 2000 retired instructions so that the window
// size, the load invalidation and the dual/single mode decisions change several
// times within the run. The front and back cores, the L2 miss source and the
// fault injection are the behavioural models in dce_env; this file adds the
// faults that need access inside the design: when the environment asks, it
// flips one bit of the entry at the head of the result queue, which must come
// back as a parity recovery, and it flips one bit each of the ECC-protected PC
// and register file, which must be corrected. The environment checks every commit and
// every state copy against a golden program and counts each mechanism; one
// that never happened is a failure. A watchdog ends a run that hangs.
module tb_dce_top;
  import dce_pkg::*;
  `include "dce_tb_signals.svh"

  dce_top #(.INTERVAL(2000)) dut (.*);
  dce_env #(.PHASE(15000), .EXPECT_ADAPT(1'b1)) env (.*);

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
    repeat (400_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

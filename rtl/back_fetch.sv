// back_fetch: the back core's fetch stage, which reads instructions from the
// result queue instead of an instruction cache.
//
// Full-redundancy mode (dual_exec): an instruction the front core invalidated
// (F_INV set) has no front result to check against, so it is fetched twice.
// The redundant copy is sent first and the original second; that order lets
// the rename stage give the copy the same source mappings as the original
// without a second rename table. The queue entry is popped only when the
// original is accepted.
//
// Selective re-execution mode (sel_reexec): without a reliability requirement
// only loads and invalidated instructions need to execute again, because the
// front core's other valid results are correct. uop_exec is cleared for the
// rest, which then skip the execution units and only write their carried
// result into the register file.
//
// A result-queue entry that fails its parity check is not passed on;
// parity_fault is raised instead so the recovery controller rewinds both cores,
// exactly like a branch misprediction, and the entry is refetched.
//
// Interface: valid-ready on both sides, one instruction per cycle, combinational
// from queue head to uop outputs. flush clears the duplication state; it does
// not gate the outputs combinationally (the flush is derived from them), so
// whatever is handed over in a flush cycle is discarded by the receiver.
//
// Published: the duplication rule, its order, the selective rule, the parity
// reaction. This design's own choice: a single-instruction-wide fetch.
module back_fetch
  import dce_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        dual_exec,
  input  logic        sel_reexec,

  input  logic        rq_valid,
  input  rq_payload_t rq_data,
  input  logic        rq_parity_err,
  output logic        rq_ready,

  output logic        uop_valid,
  input  logic        uop_ready,
  output rq_payload_t uop_data,
  output logic        uop_redundant,
  output logic        uop_exec,
  output logic        parity_fault
);
  logic dup_done;   // the redundant copy of the head entry has been sent
  logic dup;

  always_comb begin
    dup           = dual_exec && rq_data.f_inv && !dup_done;
    parity_fault  = rq_valid && rq_parity_err;
    uop_valid     = rq_valid && !rq_parity_err;
    uop_data      = rq_data;
    uop_redundant = dup;
    uop_exec      = dup || !sel_reexec || rq_data.is_load || rq_data.f_inv;
    rq_ready      = uop_valid && uop_ready && !dup;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              dup_done <= 1'b0;
    else if (flush)                          dup_done <= 1'b0;
    else if (uop_valid && uop_ready && dup)  dup_done <= 1'b1;
    else if (rq_ready)                       dup_done <= 1'b0;
  end

endmodule

// redundancy_checker: the retire-stage check that turns the back core's
// re-execution into transient-fault detection.
//
// Three comparisons are made, in retirement order:
//  * a redundant copy retires first and its result is held; the original,
//    which retires next, must produce the same value (full redundancy for
//    instructions the front core invalidated);
//  * with checking on (check_en), every other original that carries a valid
//    front-core result is compared with the back core's result;
//  * with selective re-execution (sel_reexec) and checking off, only loads are
//    compared: the reloaded value must equal the value the front core loaded.
// Any difference, whether a wrong speculation or a transient fault, raises
// mismatch in the same cycle. The instruction then must not commit: the back
// core rewinds to its architectural state with its misprediction recovery.
//
// Interface: one retiring instruction per cycle (ret_*), combinational
// mismatch and commit_ok, plus running counts of committed originals, of those
// that were checked (redundancy coverage) and of mismatches. flush drops a
// held redundant result on the clock edge; it does not gate mismatch, which
// is itself a source of the flush.
//
// Published: what is compared in each mode and the recovery reaction. This
// design's own choices: single-wide retirement; instructions without a result
// value (has_result low, such as branches) are checked only through their
// redundant copy pairing.
module redundancy_checker
  import dce_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        check_en,
  input  logic        sel_reexec,

  input  logic        ret_valid,
  input  logic        ret_redundant,
  input  logic        ret_f_inv,
  input  logic        ret_is_load,
  input  logic        ret_has_result,
  input  word_t       ret_front_result,
  input  word_t       ret_back_result,

  output logic        mismatch,
  output logic        commit_ok,
  output logic [31:0] n_retired,
  output logic [31:0] n_checked,
  output logic [31:0] n_mismatch
);
  logic  pend_valid;
  word_t pend_result;
  logic  checked;

  always_comb begin
    checked  = 1'b0;
    mismatch = 1'b0;
    if (ret_valid && !ret_redundant) begin
      if (pend_valid) begin
        checked  = 1'b1;
        mismatch = ret_has_result && (ret_back_result != pend_result);
      end else if (!ret_f_inv && ret_has_result && (check_en || (sel_reexec && ret_is_load))) begin
        checked  = 1'b1;
        mismatch = ret_back_result != ret_front_result;
      end
    end
    commit_ok = ret_valid && !mismatch;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_valid  <= 1'b0;
      pend_result <= '0;
      n_retired   <= '0;
      n_checked   <= '0;
      n_mismatch  <= '0;
    end else if (flush) begin
      pend_valid <= 1'b0;
    end else if (ret_valid) begin
      if (ret_redundant) begin
        pend_valid  <= 1'b1;
        pend_result <= ret_back_result;
      end else begin
        pend_valid <= 1'b0;
        if (mismatch) n_mismatch <= n_mismatch + 1;
        else begin
          n_retired <= n_retired + 1;
          if (checked) n_checked <= n_checked + 1;
        end
      end
    end
  end

  // A redundant copy is always followed by its original.
  a_pair: assert property (@(posedge clk) disable iff (!rst_n || flush)
    ret_valid && ret_redundant |-> !pend_valid);

endmodule

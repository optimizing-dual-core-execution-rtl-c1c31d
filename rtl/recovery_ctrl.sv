// recovery_ctrl: the one recovery mechanism of DCE, reused for every kind of
// error and for switching between dual-core and single-core execution.
//
// In dual-core mode a branch misprediction resolved in the back core, a
// redundancy-check mismatch, a result-queue parity error or a watchdog expiry
// all cause the same action: flush the front core, the back core, the result
// queue and the run-ahead cache (flush, one cycle), then copy the back core's
// architectural registers and PC to the front core, which takes COPY_LAT
// cycles (copying high). The front core restarts when copying falls.
//
// Mode switching follows want_dual (from the adaptive controller) when
// mode_switch_en is set. Dual to single is the same as a recovery: flush and
// copy back-to-front; afterwards the front core runs alone with invalidation
// and the run-ahead cache off, and the back core is idle. Single to dual copies
// the front core's state to the back core (copy_to_back high) and re-enables
// DCE. In single-core mode the back-core error inputs are ignored.
//
// Interface: request inputs are level or pulse, sampled while not copying;
// flush and cause are valid together for one cycle. Priority when several
// requests meet: parity, mismatch, watchdog, misprediction, mode switch.
//
// Published: flushing all three structures, the copy of registers and PC, the
// 64-cycle latency, the two switch directions. This design's own choices: the
// flush is also issued when entering dual-core mode so both cores start from
// a clean pipeline, the copy takes 64 cycles in both directions, and the
// priority order.
module recovery_ctrl
  import dce_pkg::*;
#(
  parameter int unsigned COPY_LAT = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_mispred,
  input  logic       req_mismatch,
  input  logic       req_parity,
  input  logic       req_watchdog,
  input  logic       want_dual,
  input  logic       mode_switch_en,
  output logic       flush,
  output rec_cause_t cause,
  output logic       copying,
  output logic       copy_to_back,
  output logic       dual_mode
);
  logic [$clog2(COPY_LAT+1)-1:0] cnt;
  rec_cause_t next_cause;

  always_comb begin
    next_cause = REC_NONE;
    if (!copying) begin
      if (dual_mode) begin
        if (req_parity)                        next_cause = REC_PARITY;
        else if (req_mismatch)                 next_cause = REC_MISMATCH;
        else if (req_watchdog)                 next_cause = REC_WATCHDOG;
        else if (req_mispred)                  next_cause = REC_MISPRED;
        else if (mode_switch_en && !want_dual) next_cause = REC_TO_SINGLE;
      end else if (mode_switch_en && want_dual) begin
        next_cause = REC_TO_DUAL;
      end
    end
    flush = (next_cause != REC_NONE);
    cause = next_cause;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      copying      <= 1'b0;
      copy_to_back <= 1'b0;
      dual_mode    <= 1'b1;
    end else if (flush) begin
      copying      <= 1'b1;
      cnt          <= ($bits(cnt))'(COPY_LAT - 1);
      copy_to_back <= (next_cause == REC_TO_DUAL);
      if (next_cause == REC_TO_SINGLE) dual_mode <= 1'b0;
      if (next_cause == REC_TO_DUAL)   dual_mode <= 1'b1;
    end else if (copying) begin
      if (cnt == '0) copying <= 1'b0;
      else           cnt     <= cnt - 1'b1;
    end
  end

endmodule

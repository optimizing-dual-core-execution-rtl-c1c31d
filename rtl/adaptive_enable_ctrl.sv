// adaptive_enable_ctrl: turns a DCE feature on only in program phases that
// profit from it. One instance controls the invalidation of cache-missing
// loads in the front core; a second instance, with the same thresholds,
// switches between dual-core and single-core mode.
//
// Over every INTERVAL retired instructions the block counts L2 cache misses and
// "important" mispredictions, i.e. mispredictions that depend on an L2 miss.
// At the end of the interval it evaluates
//   A: L2 misses > 50 per 1K   and important mispredictions < 2.5 per 1K
//   B: L2 misses > 25 per 1K   and important mispredictions < 0.25 per 1K
//   C: L2 misses > 2.5 per 1K  and important mispredictions < 0.02 per 1K
// and sets enable to A|B|C: a disabled feature is enabled when any condition
// holds and an enabled one disabled when none holds. Rates are compared
// exactly as count * 10^6 against threshold-per-million * INTERVAL.
//
// Where the important mispredictions come from depends on the current state:
// while enabled they are the mispredictions resolved in the back core
// (back_mispred); while disabled every misprediction is resolved in the front
// core, and the ones that took over 100 cycles to resolve (front_important,
// from important_mispred_detect) are counted instead.
//
// Interface: retire_cnt and l2_miss_cnt are per-cycle counts. enable changes
// on the edge that closes an interval; decide pulses one cycle later with the
// conditions held in cond_a/b/c.
//
// Published: the interval, all six thresholds, the A|B|C rule and the two
// sources of important mispredictions. This design's own choices: enable after
// reset (RESET_ENABLE), and carrying instructions past the boundary into the
// next interval.
module adaptive_enable_ctrl #(
  parameter int unsigned INTERVAL  = 1_000_000,
  parameter int unsigned RETIRE_W  = 4,
  parameter int unsigned L2_A_PM   = 50_000,  // per 1M instructions
  parameter int unsigned IBR_A_PM  = 2_500,
  parameter int unsigned L2_B_PM   = 25_000,
  parameter int unsigned IBR_B_PM  = 250,
  parameter int unsigned L2_C_PM   = 2_500,
  parameter int unsigned IBR_C_PM  = 20,
  parameter bit          RESET_ENABLE = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(RETIRE_W+1)-1:0] retire_cnt,
  input  logic [$clog2(RETIRE_W+1)-1:0] l2_miss_cnt,
  input  logic                          back_mispred,
  input  logic                          front_important,
  output logic                          enable,
  output logic                          decide,
  output logic                          cond_a,
  output logic                          cond_b,
  output logic                          cond_c
);
  logic [31:0] insn_cnt, l2_cnt, ibr_cnt;
  logic [31:0] insn_sum, l2_sum, ibr_sum;
  logic        imp, close;
  logic [63:0] l2_s, ibr_s;
  logic        a, b, c;

  function automatic logic gt(logic [63:0] scaled, int unsigned th_pm);
    return scaled > 64'(th_pm) * 64'(INTERVAL);
  endfunction
  function automatic logic lt(logic [63:0] scaled, int unsigned th_pm);
    return scaled < 64'(th_pm) * 64'(INTERVAL);
  endfunction

  always_comb begin
    imp      = enable ? back_mispred : front_important;
    insn_sum = insn_cnt + 32'(retire_cnt);
    l2_sum   = l2_cnt + 32'(l2_miss_cnt);
    ibr_sum  = ibr_cnt + 32'(imp);
    close    = insn_sum >= INTERVAL;
    l2_s     = 64'(l2_sum) * 64'd1_000_000;
    ibr_s    = 64'(ibr_sum) * 64'd1_000_000;
    a = gt(l2_s, L2_A_PM) && lt(ibr_s, IBR_A_PM);
    b = gt(l2_s, L2_B_PM) && lt(ibr_s, IBR_B_PM);
    c = gt(l2_s, L2_C_PM) && lt(ibr_s, IBR_C_PM);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      insn_cnt <= '0;
      l2_cnt   <= '0;
      ibr_cnt  <= '0;
      enable   <= RESET_ENABLE;
      decide   <= 1'b0;
      cond_a   <= 1'b0;
      cond_b   <= 1'b0;
      cond_c   <= 1'b0;
    end else begin
      decide <= close;
      if (close) begin
        insn_cnt <= insn_sum - INTERVAL;
        l2_cnt   <= '0;
        ibr_cnt  <= '0;
        cond_a   <= a;
        cond_b   <= b;
        cond_c   <= c;
        enable   <= a || b || c;
      end else begin
        insn_cnt <= insn_sum;
        l2_cnt   <= l2_sum;
        ibr_cnt  <= ibr_sum;
      end
    end
  end

endmodule

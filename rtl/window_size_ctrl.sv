// window_size_ctrl: picks the logical size of the result queue, which is the
// DCE instruction window, from the back core's branch misprediction rate.
//
// Mispredictions resolved in the back core are the costly ones: each throws
// away up to a whole window of work in both cores. Every INTERVAL retired
// back-core instructions the block compares the number of such mispredictions
// with three rate thresholds and selects
//     rate > 0.6 per 1K   ->  128 entries
//     rate > 0.3 per 1K   ->  256 entries
//     rate > 0.15 per 1K  ->  512 entries
//     otherwise           -> 1024 entries.
// Rates are compared exactly, without division: count * 10^6 > TH * INTERVAL
// with TH in mispredictions per million instructions.
//
// Interface: retire_cnt is the number of instructions the back core retires in
// the cycle, mispred flags a misprediction resolved in the back core. size_log2
// holds the chosen size (log2) and is meant for the result queue's
// size_log2_next, which applies it at the next squash; update pulses for one
// cycle when an interval closes. Latency: size_log2 changes on the clock edge
// at which the interval's last instruction retires.
//
// Published: the interval, the thresholds and the sizes. This design's own
// choices: instructions retired beyond the interval boundary count toward the
// next interval, and the size after reset is the full 1024 entries.
module window_size_ctrl #(
  parameter int unsigned INTERVAL  = 1_000_000, // retired instructions per decision
  parameter int unsigned RETIRE_W  = 4,         // most instructions retired per cycle
  parameter int unsigned TH128_PM  = 600,       // mispredictions per 1M instructions
  parameter int unsigned TH256_PM  = 300,
  parameter int unsigned TH512_PM  = 150
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(RETIRE_W+1)-1:0] retire_cnt,
  input  logic                          mispred,
  output logic [3:0]                    size_log2,
  output logic                          update
);
  logic [31:0] insn_cnt, mis_cnt;
  logic [31:0] insn_sum, mis_sum;
  logic        close;
  logic [63:0] mis_scaled;

  function automatic logic above(logic [63:0] scaled, int unsigned th_pm);
    return scaled > 64'(th_pm) * 64'(INTERVAL);
  endfunction

  always_comb begin
    insn_sum   = insn_cnt + 32'(retire_cnt);
    mis_sum    = mis_cnt + 32'(mispred);
    close      = insn_sum >= INTERVAL;
    mis_scaled = 64'(mis_sum) * 64'd1_000_000;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      insn_cnt  <= '0;
      mis_cnt   <= '0;
      size_log2 <= 4'd10;
      update    <= 1'b0;
    end else begin
      update <= close;
      if (close) begin
        insn_cnt <= insn_sum - INTERVAL;
        mis_cnt  <= '0;
        if (above(mis_scaled, TH128_PM))      size_log2 <= 4'd7;
        else if (above(mis_scaled, TH256_PM)) size_log2 <= 4'd8;
        else if (above(mis_scaled, TH512_PM)) size_log2 <= 4'd9;
        else                                  size_log2 <= 4'd10;
      end else begin
        insn_cnt <= insn_sum;
        mis_cnt  <= mis_sum;
      end
    end
  end

endmodule

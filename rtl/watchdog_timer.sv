// watchdog_timer: guards the back core against transient faults that leave
// it stuck, for instance a flipped ready flag that keeps an instruction from
// ever issuing. The counter restarts whenever the back core retires an
// instruction; if it reaches TIMEOUT cycles without one, expire pulses for one
// cycle and the recovery controller restarts execution from the architectural
// state. The timer only runs while active (dual-core mode, no recovery in
// progress) and restarts from zero after it fires.
//
// Published: a watchdog timer in the back core that restarts from the
// architectural state. This design's own choice: the 8,192-cycle timeout, far
// above the longest legitimate retirement gap (a 220-cycle memory miss after a
// 64-cycle state copy and the 16-cycle queue delay).
module watchdog_timer #(
  parameter int unsigned TIMEOUT = 8192
) (
  input  logic clk,
  input  logic rst_n,
  input  logic active,
  input  logic progress,
  output logic expire
);
  logic [$clog2(TIMEOUT+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      expire <= 1'b0;
    end else begin
      expire <= 1'b0;
      if (!active || progress) begin
        cnt <= '0;
      end else if (cnt == ($bits(cnt))'(TIMEOUT - 1)) begin
        cnt    <= '0;
        expire <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule

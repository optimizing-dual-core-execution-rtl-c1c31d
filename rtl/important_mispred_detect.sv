// important_mispred_detect: recognises "important" branch mispredictions, the
// ones that depend on a long-latency cache miss, when every misprediction is
// resolved in the front core (invalidation off, or single-core mode).
//
// Each shadow map (rename-map checkpoint) gets a time stamp when it is
// allocated for a branch. When that branch resolves as mispredicted, the
// difference between the current time and the stored stamp is its resolution
// latency; a latency above THRESH cycles marks an important misprediction.
//
// Interface: alloc_valid/alloc_id write the current time into checkpoint
// alloc_id. resolve_valid/resolve_mispred/resolve_id name a resolving branch;
// important and latency are combinational outputs in the same cycle.
// Allocating and resolving the same checkpoint in one cycle resolves the old
// branch first.
//
// Published: one stamp per shadow map, 32 checkpoints, the 100-cycle
// threshold. This design's own choice: a 32-bit free-running time base, so a
// latency is exact for any branch younger than 2^32 cycles.
module important_mispred_detect #(
  parameter int unsigned NUM_CKPT = 32,
  parameter int unsigned THRESH   = 100,
  parameter int unsigned TS_W     = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        alloc_valid,
  input  logic [$clog2(NUM_CKPT)-1:0] alloc_id,
  input  logic                        resolve_valid,
  input  logic                        resolve_mispred,
  input  logic [$clog2(NUM_CKPT)-1:0] resolve_id,
  output logic                        important,
  output logic [TS_W-1:0]             latency
);
  logic [TS_W-1:0] now;
  logic [TS_W-1:0] stamp [NUM_CKPT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CKPT; i++) stamp[i] <= '0;
    end else if (alloc_valid) begin
      stamp[alloc_id] <= now;
    end
  end

  always_comb begin
    latency   = now - stamp[resolve_id];
    important = resolve_valid && resolve_mispred && (latency > TS_W'(THRESH));
  end

endmodule

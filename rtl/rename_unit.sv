// rename_unit: register renaming of the back core, extended so that redundant
// copies of invalidated instructions can execute alongside their originals
// with a single rename table.
//
// A normal instruction reads its source mappings from the table, takes a free
// physical register for its destination and writes that register into the
// table. A redundant copy (always fetched just before its original) reads the
// table the same way and takes a free register, but does not write the table;
// so the original that follows sees the same source mappings, and later
// instructions depend only on the original. At retire a redundant copy frees
// its own register as soon as its result has been compared, while an original
// frees the register that its destination was mapped to before it, as usual.
//
// Recovery: the retire-time (architectural) map is kept alongside. recover
// copies it into the rename table and rebuilds the free list as every register
// the architectural map does not name.
//
// Interface: one rename and one retire per cycle. ren_* outputs are
// combinational; the table and free list update on the clock edge. ren_ready
// is low only when a destination is needed and no register is free. The free
// list is a bit vector; the lowest-numbered free register is taken.
//
// Published: the redundant-copy rule and the early release at retire (shown
// with a worked example in the source). This design's own choices: 160
// physical registers (32 architectural plus one per reorder-buffer entry),
// the bit-vector free list and the rebuild on recovery.
module rename_unit
  import dce_pkg::*;
#(
  parameter int unsigned NUM_PREGS = 160
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         recover,

  input  logic                         ren_valid,
  output logic                         ren_ready,
  input  logic                         ren_redundant,
  input  areg_t                        ren_src1,
  input  areg_t                        ren_src2,
  input  logic                         ren_has_dst,
  input  areg_t                        ren_dst,
  output logic [$clog2(NUM_PREGS)-1:0] ren_psrc1,
  output logic [$clog2(NUM_PREGS)-1:0] ren_psrc2,
  output logic [$clog2(NUM_PREGS)-1:0] ren_pdst,
  output logic [$clog2(NUM_PREGS)-1:0] ren_old_pdst,

  input  logic                         commit_valid,
  input  logic                         commit_redundant,
  input  logic                         commit_has_dst,
  input  areg_t                        commit_dst,
  input  logic [$clog2(NUM_PREGS)-1:0] commit_pdst,
  input  logic [$clog2(NUM_PREGS)-1:0] commit_old_pdst,

  output logic [$clog2(NUM_PREGS):0]   free_count
);
  localparam int unsigned PW = $clog2(NUM_PREGS);
  typedef logic [PW-1:0] preg_t;

  preg_t                map      [NUM_AREGS];
  preg_t                arch_map [NUM_AREGS];
  preg_t                arch_next[NUM_AREGS];
  logic [NUM_PREGS-1:0] free_mask, free_next, arch_used;
  logic                 have_free, ren_fire;

  always_comb begin
    have_free = 1'b0;
    ren_pdst  = '0;
    for (int i = NUM_PREGS - 1; i >= 0; i--) begin
      if (free_mask[i]) begin
        have_free = 1'b1;
        ren_pdst  = PW'(i);
      end
    end
    ren_psrc1    = map[ren_src1];
    ren_psrc2    = map[ren_src2];
    ren_old_pdst = map[ren_dst];
    ren_ready    = !ren_has_dst || have_free;
    ren_fire     = ren_valid && ren_ready && !recover;

    // architectural map after this cycle's retirement
    for (int a = 0; a < NUM_AREGS; a++) arch_next[a] = arch_map[a];
    if (commit_valid && commit_has_dst && !commit_redundant) arch_next[commit_dst] = commit_pdst;

    arch_used = '0;
    for (int a = 0; a < NUM_AREGS; a++) arch_used[arch_next[a]] = 1'b1;

    free_next = free_mask;
    if (ren_fire && ren_has_dst) free_next[ren_pdst] = 1'b0;
    if (commit_valid && commit_has_dst) begin
      if (commit_redundant) free_next[commit_pdst]     = 1'b1;
      else                  free_next[commit_old_pdst] = 1'b1;
    end

    free_count = '0;
    for (int i = 0; i < NUM_PREGS; i++) free_count += ($bits(free_count))'(free_mask[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NUM_AREGS; a++) begin
        map[a]      <= PW'(a);
        arch_map[a] <= PW'(a);
      end
      for (int i = 0; i < NUM_PREGS; i++) free_mask[i] <= (i >= NUM_AREGS);
    end else begin
      for (int a = 0; a < NUM_AREGS; a++) arch_map[a] <= arch_next[a];
      if (recover) begin
        for (int a = 0; a < NUM_AREGS; a++) map[a] <= arch_next[a];
        free_mask <= ~arch_used;
      end else begin
        if (ren_fire && ren_has_dst && !ren_redundant) map[ren_dst] <= ren_pdst;
        free_mask <= free_next;
      end
    end
  end

  // A redundant copy frees a register that is in use, never a free one.
  a_free_in_use: assert property (@(posedge clk) disable iff (!rst_n)
    commit_valid && commit_has_dst && commit_redundant |-> !free_mask[commit_pdst]);

endmodule

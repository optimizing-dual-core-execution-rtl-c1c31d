// icache_parity_guard: parity protection of the front core's L1 instruction
// cache, which lies outside the front/back redundancy.
//
// Every instruction word in a line is stored with one even-parity bit,
// produced by fill_parity when the line is filled. On a lookup, a way that
// matches its tag but holds any word whose parity fails is not reported as a
// hit: the access becomes an ordinary miss, the line is refetched from the L2
// cache, and nullify/nullify_way tell the cache to clear that way's valid bit.
// A corrupted instruction therefore never reaches the front core.
//
// Interface: purely combinational around the cache arrays; way_hit are the
// tag-match results of the lookup, way_line and way_par the data and parity
// read from each way.
//
// Published: parity bits in the L1 I-cache, nullifying the block and turning
// the read into a miss. This design's own choices: one parity bit per
// 32-bit instruction and the interface; the published cache has 2 ways and
// 16-instruction lines.
module icache_parity_guard
  import dce_pkg::*;
#(
  parameter int unsigned WAYS       = 2,
  parameter int unsigned LINE_INSNS = 16
) (
  input  word_t                        fill_line  [LINE_INSNS],
  output logic [LINE_INSNS-1:0]        fill_parity,

  input  logic                         lookup_valid,
  input  logic [WAYS-1:0]              way_hit,
  input  word_t                        way_line   [WAYS][LINE_INSNS],
  input  logic [LINE_INSNS-1:0]        way_par    [WAYS],
  output logic                         hit,
  output logic [$clog2(WAYS)-1:0]      hit_way,
  output word_t                        line       [LINE_INSNS],
  output logic                         nullify,
  output logic [$clog2(WAYS)-1:0]      nullify_way
);
  logic [WAYS-1:0] bad;

  always_comb begin
    for (int i = 0; i < LINE_INSNS; i++) fill_parity[i] = ^fill_line[i];

    hit         = 1'b0;
    hit_way     = '0;
    nullify     = 1'b0;
    nullify_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      bad[w] = 1'b0;
      for (int i = 0; i < LINE_INSNS; i++) if ((^way_line[w][i]) != way_par[w][i]) bad[w] = 1'b1;
      if (lookup_valid && way_hit[w]) begin
        if (bad[w]) begin
          nullify     = 1'b1;
          nullify_way = ($bits(nullify_way))'(w);
        end else begin
          hit     = 1'b1;
          hit_way = ($bits(hit_way))'(w);
        end
      end
    end
    for (int i = 0; i < LINE_INSNS; i++) line[i] = way_line[hit_way][i];
  end

endmodule

// runahead_cache: the front core's private store buffer for speculative
// stores. In DCE the front core never writes the L1 data cache; a retiring
// store with a valid address writes its value, or the INV flag if its data
// was invalidated, into this small cache, and later front-core loads read it
// so that store-to-load forwarding works across the run-ahead window and INV
// propagates through memory.
//
// Organisation: SIZE_BYTES / BLOCK_BYTES blocks, WAYS-way set associative,
// true LRU replacement. Each block holds its data and, for every byte, a
// written bit and an INV bit. Stores are word-sized with byte enables. A store
// that misses allocates the LRU way (an invalid way first) without fetching
// anything: only the bytes it writes become valid, and whatever the victim held
// is lost, which is one of the rare ways the front core can read a stale value.
// A load hits only if every byte it asks for has been written; it returns the
// data and an INV flag (set if any of those bytes is INV). A load that misses
// reads the L1 data cache instead (outside this block). Hits and stores make
// the way most recently used.
//
// Interface: the load port is combinational (same-cycle lookup) and sees the
// contents before a store in the same cycle; the store port writes on the
// clock edge. flush invalidates everything in one cycle; it is issued with
// every recovery, since the front core then restarts from the back core's
// state and its speculative stores are void.
//
// Published: the run-ahead cache's role, its 4-KB size, 4 ways and 8-byte
// blocks, value and INV forwarding. This design's own choices: byte-granular
// written and INV bits, write-allocate without fill, true LRU, the flush on
// recovery, 32-bit byte addresses.
module runahead_cache
  import dce_pkg::*;
#(
  parameter int unsigned SIZE_BYTES  = 4096,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned BLOCK_BYTES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,

  input  logic        st_valid,
  input  word_t       st_addr,
  input  logic [3:0]  st_be,
  input  word_t       st_data,
  input  logic        st_inv,

  input  logic        ld_valid,
  input  word_t       ld_addr,
  input  logic [3:0]  ld_be,
  output logic        ld_hit,
  output word_t       ld_data,
  output logic        ld_inv
);
  localparam int unsigned SETS  = SIZE_BYTES / (WAYS * BLOCK_BYTES);
  localparam int unsigned OFF_W = $clog2(BLOCK_BYTES);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = XLEN - OFF_W - IDX_W;
  localparam int unsigned WPB   = BLOCK_BYTES / 4;   // words per block
  localparam int unsigned WSEL_W = (WPB > 1) ? $clog2(WPB) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [TAG_W-1:0] tag_t;

  logic [WAYS-1:0]        valid [SETS];
  tag_t                   tag   [SETS][WAYS];
  logic [BLOCK_BYTES-1:0] wr    [SETS][WAYS];
  logic [BLOCK_BYTES-1:0] inv   [SETS][WAYS];
  logic [7:0]             data  [SETS][WAYS][BLOCK_BYTES];
  logic [WAY_W-1:0]       age   [SETS][WAYS];   // 0 = most recently used

  // address fields
  function automatic logic [IDX_W-1:0] idx_of(word_t a);
    return a[OFF_W +: IDX_W];
  endfunction
  function automatic tag_t tag_of(word_t a);
    return a[XLEN-1 -: TAG_W];
  endfunction
  function automatic logic [WSEL_W-1:0] wsel_of(word_t a);
    return (WPB > 1) ? WSEL_W'(a[OFF_W-1:2]) : '0;
  endfunction

  // load lookup
  logic [IDX_W-1:0] l_idx;
  logic             l_hitway_v;
  logic [WAY_W-1:0] l_way;

  always_comb begin
    l_idx      = idx_of(ld_addr);
    l_hitway_v = 1'b0;
    l_way      = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[l_idx][w] && tag[l_idx][w] == tag_of(ld_addr)) begin
        l_hitway_v = 1'b1;
        l_way      = WAY_W'(w);
      end
    end
    ld_hit  = 1'b0;
    ld_inv  = 1'b0;
    ld_data = '0;
    if (ld_valid && l_hitway_v) begin
      ld_hit = 1'b1;
      for (int b = 0; b < 4; b++) begin
        if (ld_be[b]) begin
          if (!wr[l_idx][l_way][4 * wsel_of(ld_addr) + b]) ld_hit = 1'b0;
          if (inv[l_idx][l_way][4 * wsel_of(ld_addr) + b]) ld_inv = 1'b1;
          ld_data[8*b +: 8] = data[l_idx][l_way][4 * wsel_of(ld_addr) + b];
        end
      end
    end
    ld_inv = ld_inv && ld_hit;
  end

  // store lookup and victim choice
  logic [IDX_W-1:0] s_idx;
  logic             s_hit, s_free;
  logic [WAY_W-1:0] s_hitway, s_freeway, s_lruway, s_way;
  logic [BLOCK_BYTES-1:0] s_mask;

  always_comb begin
    s_idx     = idx_of(st_addr);
    s_hit     = 1'b0;
    s_free    = 1'b0;
    s_hitway  = '0;
    s_freeway = '0;
    s_lruway  = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid[s_idx][w] && tag[s_idx][w] == tag_of(st_addr)) begin
        s_hit = 1'b1; s_hitway = WAY_W'(w);
      end
      if (!valid[s_idx][w]) begin
        s_free = 1'b1; s_freeway = WAY_W'(w);
      end
      if (age[s_idx][w] == WAY_W'(WAYS - 1)) s_lruway = WAY_W'(w);
    end
    s_way  = s_hit ? s_hitway : (s_free ? s_freeway : s_lruway);
    s_mask = '0;
    for (int b = 0; b < 4; b++) s_mask[4 * wsel_of(st_addr) + b] = st_be[b];
  end

  // the way touched this cycle for LRU: a store wins over a load hit
  logic             touch;
  logic [IDX_W-1:0] t_idx;
  logic [WAY_W-1:0] t_way;
  always_comb begin
    touch = 1'b0; t_idx = s_idx; t_way = s_way;
    if (st_valid) begin
      touch = 1'b1;
    end else if (ld_hit) begin
      touch = 1'b1; t_idx = l_idx; t_way = l_way;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        for (int w = 0; w < WAYS; w++) age[s][w] <= WAY_W'(w);
      end
    end else if (flush) begin
      for (int s = 0; s < SETS; s++) valid[s] <= '0;
    end else begin
      if (st_valid) valid[s_idx][s_way] <= 1'b1;
      if (touch) begin
        for (int w = 0; w < WAYS; w++) begin
          if (WAY_W'(w) == t_way)                  age[t_idx][w] <= '0;
          else if (age[t_idx][w] < age[t_idx][t_way]) age[t_idx][w] <= age[t_idx][w] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (st_valid && !flush) begin
      tag[s_idx][s_way] <= tag_of(st_addr);
      for (int p = 0; p < BLOCK_BYTES; p++) begin
        if (s_mask[p]) begin
          data[s_idx][s_way][p] <= st_data[8*(p%4) +: 8];
          inv[s_idx][s_way][p]  <= st_inv;
          wr[s_idx][s_way][p]   <= 1'b1;
        end else if (!s_hit) begin
          wr[s_idx][s_way][p]   <= 1'b0;
          inv[s_idx][s_way][p]  <= 1'b0;
        end
      end
    end
  end

endmodule

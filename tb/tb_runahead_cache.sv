// tb_runahead_cache: random stores (valid and INV) and loads on a few
// crowded sets of the 4-KB, 4-way, 8-byte-block run-ahead cache, checked
// against a reference model that keeps each set as an LRU-ordered list.
// Covers hits, partial-byte misses, INV forwarding, LRU eviction and flush.
module tb_runahead_cache;
  import dce_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic st_valid = 0, st_inv = 0, ld_valid = 0;
  word_t st_addr = 0, st_data = 0, ld_addr = 0, ld_data;
  logic [3:0] st_be = 0, ld_be = 0;
  logic ld_hit, ld_inv;
  int checks = 0, failures = 0;
  int n_hit = 0, n_inv = 0, n_evict = 0;

  runahead_cache dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct {
    int unsigned tag;
    logic [7:0]  d [8];
    bit          w [8];
    bit          v [8];
  } blk_t;
  blk_t sets [128][$];

  function automatic int find(int s, int unsigned t);
    for (int i = 0; i < sets[s].size(); i++) if (sets[s][i].tag == t) return i;
    return -1;
  endfunction

  function automatic word_t rnd_addr();
    int unsigned t = $urandom_range(0, 5), s = $urandom_range(0, 3);
    return {22'(t * 977 + 1), 7'(s * 37), $urandom_range(0, 1) ? 1'b1 : 1'b0, 2'b00};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 30000; n++) begin
      automatic bit do_st = $urandom_range(0, 1);
      if (n == 15000) begin
        flush = 1; @(negedge clk); flush = 0;
        foreach (sets[s]) sets[s].delete();
      end
      if (do_st) begin
        automatic int s, i, o; automatic int unsigned t;
        automatic blk_t b;
        st_addr = rnd_addr(); st_be = 4'($urandom_range(1, 15)); st_data = $urandom;
        st_inv = ($urandom_range(0, 4) == 0); st_valid = 1;
        s = st_addr[9:3]; t = st_addr[31:10]; o = st_addr[2] * 4;
        i = find(s, t);
        if (i >= 0) begin b = sets[s][i]; sets[s].delete(i); end
        else begin
          b.tag = t; foreach (b.w[k]) begin b.w[k] = 0; b.v[k] = 0; b.d[k] = 0; end
          if (sets[s].size() == 4) begin void'(sets[s].pop_back()); n_evict++; end
        end
        for (int k = 0; k < 4; k++) if (st_be[k]) begin
          b.d[o + k] = st_data[8*k +: 8]; b.w[o + k] = 1; b.v[o + k] = st_inv;
        end
        sets[s].push_front(b);
        @(negedge clk);
        st_valid = 0;
      end else begin
        automatic int s, i, o; automatic int unsigned t;
        automatic bit eh = 0, ei = 0; automatic word_t ed = 0;
        ld_addr = rnd_addr(); ld_be = 4'($urandom_range(1, 15)); ld_valid = 1;
        s = ld_addr[9:3]; t = ld_addr[31:10]; o = ld_addr[2] * 4;
        i = find(s, t);
        if (i >= 0) begin
          eh = 1;
          for (int k = 0; k < 4; k++) if (ld_be[k]) begin
            if (!sets[s][i].w[o + k]) eh = 0;
            if (sets[s][i].v[o + k]) ei = 1;
            ed[8*k +: 8] = sets[s][i].d[o + k];
          end
          if (eh) begin automatic blk_t b = sets[s][i]; sets[s].delete(i); sets[s].push_front(b); end
        end
        #1;
        check(ld_hit == eh, $sformatf("load %h be %b hit=%0d expected %0d", ld_addr, ld_be, ld_hit, eh));
        if (eh) begin
          check(ld_data == ed && ld_inv == ei, $sformatf("load %h data %h/%0d expected %h/%0d", ld_addr, ld_data, ld_inv, ed, ei));
          n_hit++; if (ei) n_inv++;
        end
        @(negedge clk);
        ld_valid = 0;
      end
    end
    check(n_hit > 1000 && n_inv > 100 && n_evict > 1000,
          $sformatf("coverage: hits %0d inv %0d evictions %0d", n_hit, n_inv, n_evict));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

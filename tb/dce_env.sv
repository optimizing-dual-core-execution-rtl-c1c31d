// dce_env: behavioural models of the front core, the back core and the L2
// miss source around dce_top, used by the end-to-end testbenches.
//
// The program is a synthetic straight-line MIPS stream: instruction i sits at
// PC 4*i, its kind and register fields come from a hash of i, and its correct
// result is res_of(i). The front model pushes instructions into the result
// queue, invalidating loads as dce_top tells it and taking INV values from the
// run-ahead cache; after a branch that is marked mispredicted it pushes
// wrong-path instructions until the recovery. The back model renames through
// dce_top, executes with a short latency (or bypasses when dce_top says the
// instruction need not execute), and retires in order, reporting the marked
// branches as mispredicted. Transient faults are injected into back-core
// results and stale values into front-core loads, each only once per
// instruction. A small model of the front core's L1 I-cache stores the parity
// dce_top generates, flips a stored bit now and then, and expects the lookup
// to be nullified. Every commit is checked against the golden program, every
// register and the PC copied back to the front core against the golden
// architectural state.
//
// Scenario (PHASE cycles each): fault-tolerant configuration with many
// mispredictions, then with few (plus one result-queue parity error and one
// back-core stall long enough for the watchdog); after a reset the
// power-efficient configuration in a memory-bound, a compute-bound and again a
// memory-bound phase. Each mechanism is counted; one that never happened is a
// failure. With EXPECT_ADAPT = 0 the adaptive decisions, which need several
// intervals, are not required.
module dce_env
  import dce_pkg::*;
#(
  parameter int PHASE        = 15000,
  parameter bit EXPECT_ADAPT = 1'b1
) (
  output logic        clk,
  output logic        rst_n,
  output logic        cfg_reliable,
  output logic [2:0]  l2_miss_cnt,
  output logic        f_ld_valid,
  output word_t       f_ld_instr,
  output logic        f_ld_l2_miss,
  output logic        f_ld_io,
  input  logic        f_ld_invalidate,
  input  logic        f_ld_traversal,
  output logic        f_rc_ld_valid,
  output word_t       f_rc_ld_addr,
  output logic [3:0]  f_rc_ld_be,
  input  logic        f_rc_hit,
  input  word_t       f_rc_data,
  input  logic        f_rc_inv,
  output logic        f_rc_st_valid,
  output word_t       f_rc_st_addr,
  output logic [3:0]  f_rc_st_be,
  output word_t       f_rc_st_data,
  output logic        f_rc_st_inv,
  output logic        f_ret_valid,
  output rq_payload_t f_ret_data,
  input  logic        f_ret_ready,
  output logic [2:0]  f_ret_cnt,
  output logic        f_br_alloc_valid,
  output logic [4:0]  f_br_alloc_id,
  output logic        f_br_res_valid,
  output logic        f_br_res_mispred,
  output logic [4:0]  f_br_res_id,
  input  logic        f_flush,
  input  logic        f_stall,
  input  logic        f_inv_enable,
  input  logic        dual_mode,
  input  logic        f_copy_valid,
  input  areg_t       f_copy_addr,
  input  word_t       f_copy_data,
  input  logic        f_copy_pc_valid,
  input  word_t       f_copy_pc,
  input  logic        st_copy_valid,
  input  areg_t       st_copy_addr,
  output word_t       st_copy_data,
  output word_t       st_copy_pc,
  input  logic        b_iss_valid,
  output logic        b_iss_ready,
  input  rq_payload_t b_iss_data,
  input  logic        b_iss_redundant,
  input  logic        b_iss_exec,
  input  regs_t       b_iss_regs,
  input  logic [7:0]  b_iss_psrc1,
  input  logic [7:0]  b_iss_psrc2,
  input  logic [7:0]  b_iss_pdst,
  input  logic [7:0]  b_iss_old_pdst,
  output logic        b_ret_valid,
  output logic        b_ret_redundant,
  output logic        b_ret_f_inv,
  output logic        b_ret_is_load,
  output logic        b_ret_has_result,
  output word_t       b_ret_front_result,
  output word_t       b_ret_back_result,
  output logic        b_ret_has_dst,
  output areg_t       b_ret_dst,
  output logic [7:0]  b_ret_pdst,
  output logic [7:0]  b_ret_old_pdst,
  output word_t       b_ret_next_pc,
  output logic        b_mispred,
  input  logic        b_commit,
  input  logic        b_flush,
  input  rec_cause_t  rec_cause,
  input  logic [3:0]  rq_size_log2,
  input  logic [31:0] n_retired,
  input  logic [31:0] n_checked,
  input  logic [31:0] n_mismatch,
  input  word_t       arch_pc,
  input  logic        f_br_important,
  input  logic        win_update,
  input  logic        inv_decide,
  input  logic        mode_decide,
  input  logic        arf_corrected,
  input  logic [8:0]  b_free_regs,
  output word_t       f_ic_fill_line [16],
  input  logic [15:0] f_ic_fill_parity,
  output logic        f_ic_lookup_valid,
  output logic [1:0]  f_ic_way_hit,
  output word_t       f_ic_way_line [2][16],
  output logic [15:0] f_ic_way_par [2],
  input  logic        f_ic_hit,
  input  logic        f_ic_hit_way,
  input  word_t       f_ic_line [16],
  input  logic        f_ic_nullify,
  input  logic        f_ic_nullify_way,
  output logic        parity_req,
  output logic        done,
  output int          checks,
  output int          failures
);
  // ---------------- golden program ----------------
  function automatic logic [31:0] hash(int unsigned i);
    logic [31:0] h = i * 32'h9e3779b1;
    h = h ^ (h >> 15);
    h = h * 32'h85ebca6b;
    return h ^ (h >> 13);
  endfunction

  typedef enum logic [1:0] {K_ALU, K_LOAD, K_STORE, K_BRANCH} kind_t;

  function automatic kind_t kind_of(int unsigned i);
    logic [3:0] k = hash(i)[3:0];
    if (k < 4)  return K_LOAD;
    if (k < 6)  return K_STORE;
    if (k < 8)  return K_BRANCH;
    return K_ALU;
  endfunction

  function automatic word_t instr_of(int unsigned i);
    logic [31:0] h = hash(i);
    logic [4:0] rs = h[8:4], rt = h[13:9], rd = h[18:14];
    case (kind_of(i))
      K_LOAD: begin
        if (h[21:20] == 0 && rs != 0) rt = rs;                 // traversal load ra, x(ra)
        return {6'h23, rs, rt, 16'(h[31:24])};
      end
      K_STORE:  return {6'h2b, rs, rt, 16'h0010};
      K_BRANCH: return {6'h04, rs, rt, 16'h0004};
      default:  return {6'h00, rs, rt, rd, 5'd0, 6'h20};
    endcase
  endfunction

  // destination register, 0 if none (independent of the design's decoder)
  function automatic int dst_of(int unsigned i);
    word_t w = instr_of(i);
    case (kind_of(i))
      K_LOAD:  return int'(w[20:16]);
      K_ALU:   return int'(w[15:11]);
      default: return 0;
    endcase
  endfunction

  function automatic word_t res_of(int unsigned i);
    return hash(i ^ 32'h5a5a_1234);
  endfunction

  function automatic word_t addr_of(int unsigned i);
    return 32'h1000 + 32'(hash(i + 7)[13:8]) * 4;
  endfunction

  int misp_div;
  function automatic bit marked(int unsigned i);
    return kind_of(i) == K_BRANCH && (hash(i + 99) % misp_div) == 0;
  endfunction

  // ---------------- model state ----------------
  typedef struct {
    rq_payload_t d;
    logic        red;
    logic        exec;
    regs_t       r;
    logic [7:0]  pdst;
    logic [7:0]  old;
    int          ready_t;
  } rob_t;

  rob_t  rob[$];
  word_t greg [32];
  int    nf, commit_idx, cyc, wp_cnt;
  bit    wrong_path, halted, mem_phase, back_stall;
  bit    misp_done [int];
  bit    inj_done  [int];
  bit    stale_done[int];
  bit    wp_mark   [int];   // branches the front core followed down a wrong path

  // mechanism counters
  int n_dup, n_bypass, n_trav, n_rcinv, n_full, n_inv_loads, n_imp_front;
  int n_cause [8];
  int n_ecc;
  int n_inv_toggle, n_to_single, n_to_dual, n_commits, n_copychk, n_stale, n_inj;
  bit sizes_seen [16];
  bit prev_inv_en, grew;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // Front-core L1 I-cache model: one set of two ways. Every cycle a line is
  // filled into a way (storing the parity dce_top computes) or looked up; now
  // and then one stored bit is flipped, and the lookup of that way must come
  // back as a nullify instead of a hit. A nullified way is refilled.
  int    n_ic_hits, n_ic_nullify;
  word_t ic_data [2][16];
  logic [15:0] ic_par [2];
  bit    ic_valid [2], ic_bad [2];
  initial begin
    n_ic_hits = 0; n_ic_nullify = 0;
    ic_valid = '{0, 0}; ic_bad = '{0, 0};
    f_ic_lookup_valid = 0; f_ic_way_hit = '0;
    forever begin
      automatic int w = $urandom_range(0, 1);
      @(negedge clk);
      f_ic_lookup_valid = 0; f_ic_way_hit = '0;
      if (!ic_valid[w] || $urandom_range(0, 7) == 0) begin
        foreach (f_ic_fill_line[i]) f_ic_fill_line[i] = $urandom;
        #1;
        ic_data[w] = f_ic_fill_line; ic_par[w] = f_ic_fill_parity;
        ic_valid[w] = 1; ic_bad[w] = 0;
      end else begin
        if (!ic_bad[w] && $urandom_range(0, 99) == 0) begin
          automatic int fi = $urandom_range(0, 15);
          automatic int fb = $urandom_range(0, 31);
          ic_data[w][fi][fb] = ~ic_data[w][fi][fb];
          ic_bad[w] = 1;
        end
        foreach (f_ic_way_line[k]) f_ic_way_line[k] = ic_data[k];
        foreach (f_ic_way_par[k])  f_ic_way_par[k]  = ic_par[k];
        f_ic_lookup_valid = 1; f_ic_way_hit = 2'(1 << w);
        #1;
        if (ic_bad[w]) begin
          check(f_ic_nullify && !f_ic_hit && f_ic_nullify_way == w, "I-cache parity error nullifies the way");
          ic_valid[w] = 0;
          n_ic_nullify++;
        end else begin
          check(f_ic_hit && !f_ic_nullify && f_ic_hit_way == w && f_ic_line == ic_data[w], "I-cache hit");
          n_ic_hits++;
        end
      end
    end
  end

  // clock
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  // front-core branch checkpoints: one long and one short resolution per 1000 cycles
  initial begin
    f_br_alloc_valid = 0; f_br_res_valid = 0; f_br_res_mispred = 0;
    f_br_alloc_id = 0; f_br_res_id = 0;
    forever begin
      for (int t = 0; t < 1000; t++) begin
        @(negedge clk);
        f_br_alloc_valid = (t == 0) || (t == 500);
        f_br_alloc_id    = (t == 0) ? 5'd3 : 5'd9;
        f_br_res_valid   = (t == 150) || (t == 520);
        f_br_res_mispred = f_br_res_valid;
        f_br_res_id      = (t == 150) ? 5'd3 : 5'd9;
      end
    end
  end

  task automatic reset_model();
    rob.delete();
    foreach (greg[r]) greg[r] = '0;
    nf = 0; commit_idx = 0; wp_cnt = 0;
    wrong_path = 0; halted = 0; back_stall = 0;
    misp_done.delete(); inj_done.delete(); wp_mark.delete(); stale_done.delete();
  endtask

  // one clock cycle of both core models
  task automatic step();
    rob_t  e;
    bit    ret, fl, st_fire, ld_push;
    word_t back_res;
    int    idx;
    @(negedge clk);
    cyc++;
    // defaults
    f_ret_valid = 0; f_ld_valid = 0; f_rc_ld_valid = 0; f_rc_st_valid = 0;
    f_ret_cnt = 0; b_ret_valid = 0; b_mispred = 0; f_ld_io = 0;
    l2_miss_cnt = (mem_phase && $urandom_range(0, 9) == 0) ? 3'd1 : 3'd0;
    st_copy_data = greg[st_copy_addr];
    st_copy_pc   = 32'(nf * 4);
    b_iss_ready  = (rob.size() < 128) && ($urandom_range(0, 4) != 0);

    // ---- front core ----
    ld_push = 0;
    if (rst_n && dual_mode && !f_stall && !halted) begin
      if (wrong_path) begin
        f_ret_data = '{pc: 32'h8000_0000 | 32'(wp_cnt * 4), instr: {6'h00, 5'd1, 5'd2, 5'd3, 11'h020},
                       result: $urandom, f_inv: 1'b0, is_load: 1'b0};
        f_ret_valid = 1;
      end else begin
        word_t ins = instr_of(nf);
        kind_t k = kind_of(nf);
        bit finv;
        word_t r = res_of(nf);
        if (k == K_LOAD) begin
          f_ld_valid = 1; f_ld_instr = ins;
          f_ld_l2_miss = mem_phase && ($urandom_range(0, 4) == 0);
          f_rc_ld_valid = 1; f_rc_ld_addr = addr_of(nf); f_rc_ld_be = 4'hf;
        end else begin
          f_ld_l2_miss = 0;
        end
        #1;
        if (k == K_LOAD) begin
          finv = f_ld_invalidate || (f_rc_hit && f_rc_inv);
          if (f_rc_hit && f_rc_inv) n_rcinv++;
          if (f_ld_invalidate) n_inv_loads++;
          if (f_ld_l2_miss && f_ld_traversal && f_inv_enable && !f_ld_invalidate) n_trav++;
          if (!finv && !stale_done.exists(nf) && $urandom_range(0, 299) == 0) begin
            r = r ^ 32'h100;    // a stale value loaded by the front core
            stale_done[nf] = 1;
            n_stale++;
          end
          ld_push = 1;
        end else begin
          finv = f_inv_enable && ($urandom_range(0, 9) == 0);
        end
        f_ret_data  = '{pc: 32'(nf * 4), instr: ins, result: finv ? 32'h0bad_0bad : r,
                        f_inv: finv, is_load: (k == K_LOAD)};
        f_ret_valid = 1;
        if (k == K_STORE && f_ret_ready) begin
          f_rc_st_valid = 1; f_rc_st_addr = addr_of(nf); f_rc_st_be = 4'hf;
          f_rc_st_data = r; f_rc_st_inv = finv;
        end
      end
    end
    if (rst_n && !dual_mode && !f_stall && !halted) f_ret_cnt = 3'd1;

    // ---- back core retirement ----
    ret = 0;
    if (dual_mode && !back_stall && rob.size() > 0 && rob[0].ready_t <= cyc) begin
      e = rob[0];
      ret = 1;
      idx = int'(e.d.pc >> 2);
      back_res = e.exec ? res_of(idx) : e.d.result;
      if (cfg_reliable && e.r.has_dst && !e.d.pc[31] && !inj_done.exists(idx) &&
          $urandom_range(0, 1499) == 0) begin
        back_res ^= 32'h1 << $urandom_range(0, 31);   // transient fault in the back core
        inj_done[idx] = 1;
        n_inj++;
      end
      b_ret_valid = 1; b_ret_redundant = e.red; b_ret_f_inv = e.d.f_inv;
      b_ret_is_load = e.d.is_load; b_ret_has_result = e.r.has_dst;
      b_ret_front_result = e.d.result; b_ret_back_result = back_res;
      b_ret_has_dst = e.r.has_dst; b_ret_dst = e.r.dst;
      b_ret_pdst = e.pdst; b_ret_old_pdst = e.old;
      b_ret_next_pc = e.d.pc + 4;
      b_mispred = !e.red && !e.d.pc[31] && wp_mark.exists(idx) && !misp_done.exists(idx);
    end

    #3;   // sample just before the rising edge
    fl = b_flush;
    check(f_flush == b_flush, "one flush for both cores");

    // front push
    if (f_ret_valid && !f_ret_ready) n_full++;
    if (f_ret_valid && f_ret_ready && !fl) begin
      if (wrong_path) wp_cnt++;
      else begin
        if (marked(nf) && !misp_done.exists(nf)) begin
          wrong_path = 1;
          wp_mark[nf] = 1;
        end else if (wp_mark.exists(nf)) begin
          wp_mark.delete(nf);
        end
        nf++;
      end
    end
    if (ld_push && f_ld_l2_miss && !f_ret_valid) n_inv_loads += 0;

    // back retirement
    if (ret) begin
      if (b_commit) begin
        void'(rob.pop_front());
        if (!e.red) begin
          check(!e.d.pc[31], "no wrong-path instruction commits");
          check(idx == commit_idx, $sformatf("commit order: %0d expected %0d", idx, commit_idx));
          if (e.r.has_dst)
            check(back_res == res_of(idx), $sformatf("committed value of instruction %0d", idx));
          if (e.r.has_dst) greg[e.r.dst] = back_res;
          commit_idx = idx + 1;
          n_commits++;
          if (b_mispred) misp_done[idx] = 1;
        end
      end else begin
        check(fl && rec_cause == REC_MISMATCH, "a rejected instruction causes a mismatch recovery");
      end
    end

    // back issue
    if (b_iss_valid && b_iss_ready && !fl && dual_mode) begin
      rob_t n;
      n.d = b_iss_data; n.red = b_iss_redundant; n.exec = b_iss_exec; n.r = b_iss_regs;
      n.pdst = b_iss_pdst; n.old = b_iss_old_pdst;
      n.ready_t = cyc + 2 + int'(b_iss_exec);
      rob.push_back(n);
      if (b_iss_redundant) n_dup++;
      if (!b_iss_exec) n_bypass++;
      if (!b_iss_data.pc[31] && b_iss_regs.has_dst)
        check(int'(b_iss_regs.dst) == dst_of(int'(b_iss_data.pc >> 2)), "decoded destination");
    end

    // single-core retirement
    if (f_ret_cnt != 0) begin
      if (dst_of(nf) != 0) greg[dst_of(nf)] = res_of(nf);
      nf++;
      commit_idx = nf;
    end

    // state copies
    if (f_copy_valid) begin
      check(f_copy_data == greg[f_copy_addr], $sformatf("copied register r%0d", f_copy_addr));
      n_copychk++;
    end
    if (f_copy_pc_valid) begin
      check(f_copy_pc == 32'(commit_idx * 4), $sformatf("copied PC %h expected %h", f_copy_pc, commit_idx * 4));
      nf = int'(f_copy_pc >> 2);
      halted = 0;
    end

    // statistics
    sizes_seen[rq_size_log2] = 1;
    if (rst_n && cfg_reliable && sizes_seen[7] && rq_size_log2 == 4'd10) grew = 1;
    if (f_br_important) n_imp_front++;
    if (arf_corrected) n_ecc++;
    if (dual_mode && cfg_reliable && f_inv_enable != prev_inv_en) n_inv_toggle++;
    prev_inv_en = f_inv_enable;

    // recovery
    if (fl) begin
      n_cause[rec_cause]++;
      rob.delete();
      back_stall = 0;
      wrong_path = 0;
      if (rec_cause == REC_TO_DUAL) begin
        n_to_dual++;
        commit_idx = nf;
      end else begin
        if (rec_cause == REC_TO_SINGLE) n_to_single++;
        halted = 1;
      end
    end
  endtask

  task automatic run_phase(int cycles, bit mem, int div);
    mem_phase = mem; misp_div = div;
    repeat (cycles) step();
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; parity_req = 0; cyc = 0;
    rst_n = 0; cfg_reliable = 1; mem_phase = 1; misp_div = 16;
    f_ret_data = '0; f_ld_instr = '0; f_rc_ld_addr = '0; f_rc_st_addr = '0; f_rc_st_data = '0;
    f_rc_ld_be = '0; f_rc_st_be = '0; f_rc_st_inv = 0; f_ld_l2_miss = 0;
    b_ret_redundant = 0; b_ret_f_inv = 0; b_ret_is_load = 0; b_ret_has_result = 0;
    b_ret_front_result = '0; b_ret_back_result = '0; b_ret_has_dst = 0; b_ret_dst = '0;
    b_ret_pdst = '0; b_ret_old_pdst = '0; b_ret_next_pc = '0;
    foreach (n_cause[c]) n_cause[c] = 0;
    n_ecc = 0;
    foreach (sizes_seen[s]) sizes_seen[s] = 0;
    {n_dup, n_bypass, n_trav, n_rcinv, n_full, n_inv_loads, n_imp_front} = '0;
    {n_inv_toggle, n_to_single, n_to_dual, n_commits, n_copychk, n_stale, n_inj} = '0;
    reset_model();
    prev_inv_en = 1; grew = 0;
    repeat (3) step();
    rst_n = 1;

    // ---- fault-tolerant configuration ----
    run_phase(PHASE, 1, 16);                 // many mispredictions
    mem_phase = 1; misp_div = 1_000_000;     // few mispredictions from here on
    run_phase(1000, 1, 1_000_000);
    parity_req = 1;                          // the testbench flips a stored bit
    while (n_cause[REC_PARITY] == 0) step();
    parity_req = 0;
    run_phase(1000, 1, 1_000_000);
    back_stall = 1;                          // back core hangs: watchdog
    while (n_cause[REC_WATCHDOG] == 0) step();
    run_phase(PHASE, 1, 1_000_000);
    begin                                    // one misprediction applies the grown window
      automatic int n_before = n_cause[REC_MISPRED];
      misp_div = 1;
      while (n_cause[REC_MISPRED] == n_before) step();
      misp_div = 1_000_000;
    end
    run_phase(2000, 1, 1_000_000);
    check(commit_idx > PHASE / 2, $sformatf("fault-tolerant run made progress (%0d)", commit_idx));

    // ---- power-efficient configuration ----
    @(negedge clk);
    rst_n = 0; cfg_reliable = 0;
    reset_model();
    repeat (3) step();
    rst_n = 1;
    run_phase(PHASE, 1, 1_000_000);          // memory bound
    run_phase(PHASE, 0, 1_000_000);          // compute bound
    run_phase(PHASE, 1, 1_000_000);          // memory bound again
    run_phase(PHASE / 2, 1, 64);             // a few back-core mispredictions
    check(commit_idx > PHASE, $sformatf("power-efficient run made progress (%0d)", commit_idx));

    // ---- every mechanism happened ----
    check(n_commits > 0 && n_copychk > 0, "commits and state copies");
    check(n_dup > 0,                  $sformatf("redundant copies %0d", n_dup));
    check(n_bypass > 0,               $sformatf("bypassed instructions %0d", n_bypass));
    check(n_cause[REC_MISPRED] > 0,   $sformatf("misprediction recoveries %0d", n_cause[REC_MISPRED]));
    check(n_cause[REC_MISMATCH] > 0,  $sformatf("mismatch recoveries %0d", n_cause[REC_MISMATCH]));
    check(n_cause[REC_PARITY] > 0,    $sformatf("parity recoveries %0d", n_cause[REC_PARITY]));
    check(n_cause[REC_WATCHDOG] > 0,  $sformatf("watchdog recoveries %0d", n_cause[REC_WATCHDOG]));
    check(n_inj > 0 && n_stale > 0,   $sformatf("injected faults %0d, stale loads %0d", n_inj, n_stale));
    check(n_trav > 0,                 $sformatf("traversal loads kept %0d", n_trav));
    check(n_inv_loads > 0,            $sformatf("invalidated loads %0d", n_inv_loads));
    check(n_rcinv > 0,                $sformatf("INV forwarded by the run-ahead cache %0d", n_rcinv));
    check(n_full > 0,                 $sformatf("result queue full %0d", n_full));
    check(n_ic_hits > 0 && n_ic_nullify > 0, $sformatf("I-cache hits %0d, nullified %0d", n_ic_hits, n_ic_nullify));
    check(n_ecc > 0, $sformatf("ECC corrections %0d", n_ecc));
    check(n_imp_front > 0,            $sformatf("important front mispredictions %0d", n_imp_front));
    if (EXPECT_ADAPT) begin
      check(sizes_seen[7] && grew, "window shrank to 128 and grew back to 1024");
      check(n_inv_toggle >= 2,        $sformatf("invalidation toggled %0d", n_inv_toggle));
      check(n_to_single > 0 && n_to_dual > 0,
            $sformatf("mode switches %0d/%0d", n_to_single, n_to_dual));
    end
    $display("mechanisms: commits=%0d dup=%0d bypass=%0d mispred=%0d mismatch=%0d parity=%0d watchdog=%0d",
             n_commits, n_dup, n_bypass, n_cause[REC_MISPRED], n_cause[REC_MISMATCH],
             n_cause[REC_PARITY], n_cause[REC_WATCHDOG]);
    $display("mechanisms: traversal=%0d inv_loads=%0d rc_inv=%0d full=%0d imp_front=%0d inv_toggle=%0d to_single=%0d to_dual=%0d sizes128=%0d ecc=%0d ic_nullify=%0d",
             n_trav, n_inv_loads, n_rcinv, n_full, n_imp_front, n_inv_toggle, n_to_single, n_to_dual,
             sizes_seen[7], n_ecc, n_ic_nullify);
    done = 1;
  end
endmodule

// dce_top: the hardware that turns two ordinary out-of-order cores into a
// dual-core execution (DCE) machine with transient-fault recovery and energy
// controls. The two cores themselves, their caches and the shared L2 are
// outside this module; their signals are the ports.
//
// Dataflow. The front core runs ahead: loads that miss in the L2 cache are
// invalidated (load_inv_filter), stores go to the run-ahead cache
// (runahead_cache), and retired instructions enter the result queue
// (result_queue) with their results and F_INV flag. The back core fetches from
// the queue (back_fetch), renames (rename_unit), executes and retires; at
// retirement the redundancy checker compares its results with the front
// core's, or with a redundant copy. Committed register values go to the
// ECC-protected architectural register file (ecc_regfile) and the committed PC
// to arch_pc, which is held under the same SECDED code. The front core's L1
// I-cache lines carry parity made and checked by icache_parity_guard; the cache
// arrays stay in the front core, so its lookup signals are ports.
//
// Recovery. A misprediction resolved in the back core, a check mismatch, a
// queue parity error or a watchdog expiry makes recovery_ctrl flush both cores,
// the queue and the run-ahead cache (flush outputs) and then copy the back
// core's registers and PC to the front core: register r on copy step r, the PC
// on step 32, the rest of the COPY_LAT window being transfer time.
//
// Two configurations, chosen by cfg_reliable:
//  * 1, fault tolerant: full redundancy (invalidated instructions execute twice
//    in the back core), every result checked, invalidation switched on and off
//    by one adaptive_enable_ctrl; always dual-core.
//  * 0, power efficient: selective re-execution (only loads and invalidated
//    instructions execute again, loads are value-checked), and a second
//    adaptive_enable_ctrl switches between dual-core and single-core mode. In
//    single-core mode the front core retires on its own, the queue and the
//    run-ahead cache are unused and the back core is idle; returning to
//    dual-core mode copies the front core's state (st_copy_*) into the back
//    core's register file.
// In both, window_size_ctrl adapts the queue size (taken over at the next
// misprediction recovery) and traversal address loads
// are never invalidated; important_mispred_detect supplies the important-
// misprediction count while the front core resolves all mispredictions.
//
// Timing. One instruction per cycle enters and leaves the queue and retires
// from the back core; the back-core retire inputs and b_commit are in the same
// cycle. flush is combinational from the recovery requests.
//
// What is published and what is this design's own is stated in each block;
// the choices made here are the single-wide back-core interface, the MIPS
// register decode (dce_pkg), the copy schedule within the 64 cycles, and that
// the watchdog runs only while the queue holds instructions.
module dce_top
  import dce_pkg::*;
#(
  parameter int unsigned RQ_DEPTH   = 1024,
  parameter int unsigned RQ_DELAY   = 16,
  parameter int unsigned INTERVAL   = 1_000_000,
  parameter int unsigned COPY_LAT   = 64,
  parameter int unsigned WD_TIMEOUT = 8192,
  parameter int unsigned NUM_PREGS  = 160,
  parameter int unsigned IC_WAYS    = 2,
  parameter int unsigned IC_LINE    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_reliable,
  input  logic [2:0]  l2_miss_cnt,        // L2 misses this cycle (shared L2)

  // ---- front core ----
  input  logic        f_ld_valid,         // load being executed
  input  word_t       f_ld_instr,
  input  logic        f_ld_l2_miss,
  input  logic        f_ld_io,
  output logic        f_ld_invalidate,
  output logic        f_ld_traversal,
  input  logic        f_rc_ld_valid,      // run-ahead cache load lookup
  input  word_t       f_rc_ld_addr,
  input  logic [3:0]  f_rc_ld_be,
  output logic        f_rc_hit,
  output word_t       f_rc_data,
  output logic        f_rc_inv,
  input  logic        f_rc_st_valid,      // retiring store with a valid address
  input  word_t       f_rc_st_addr,
  input  logic [3:0]  f_rc_st_be,
  input  word_t       f_rc_st_data,
  input  logic        f_rc_st_inv,
  input  logic        f_ret_valid,        // retiring instruction, dual-core mode
  input  rq_payload_t f_ret_data,
  output logic        f_ret_ready,
  input  logic [2:0]  f_ret_cnt,          // instructions retired, single-core mode
  input  logic        f_br_alloc_valid,   // shadow map allocated for a branch
  input  logic [4:0]  f_br_alloc_id,
  input  logic        f_br_res_valid,     // branch resolved
  input  logic        f_br_res_mispred,
  input  logic [4:0]  f_br_res_id,
  output logic        f_flush,
  output logic        f_stall,            // state copy in progress
  output logic        f_inv_enable,
  output logic        dual_mode,
  output logic        f_copy_valid,       // back-to-front register copy
  output areg_t       f_copy_addr,
  output word_t       f_copy_data,
  output logic        f_copy_pc_valid,
  output word_t       f_copy_pc,
  output logic        st_copy_valid,      // front-to-back register copy request
  output areg_t       st_copy_addr,
  input  word_t       st_copy_data,
  input  word_t       st_copy_pc,

  // ---- back core ----
  output logic        b_iss_valid,
  input  logic        b_iss_ready,
  output rq_payload_t b_iss_data,
  output logic        b_iss_redundant,
  output logic        b_iss_exec,
  output regs_t       b_iss_regs,
  output logic [$clog2(NUM_PREGS)-1:0] b_iss_psrc1,
  output logic [$clog2(NUM_PREGS)-1:0] b_iss_psrc2,
  output logic [$clog2(NUM_PREGS)-1:0] b_iss_pdst,
  output logic [$clog2(NUM_PREGS)-1:0] b_iss_old_pdst,
  input  logic        b_ret_valid,
  input  logic        b_ret_redundant,
  input  logic        b_ret_f_inv,
  input  logic        b_ret_is_load,
  input  logic        b_ret_has_result,
  input  word_t       b_ret_front_result,
  input  word_t       b_ret_back_result,
  input  logic        b_ret_has_dst,
  input  areg_t       b_ret_dst,
  input  logic [$clog2(NUM_PREGS)-1:0] b_ret_pdst,
  input  logic [$clog2(NUM_PREGS)-1:0] b_ret_old_pdst,
  input  word_t       b_ret_next_pc,      // PC after the retiring instruction
  input  logic        b_mispred,          // misprediction resolved in the back core
  output logic        b_commit,
  output logic        b_flush,

  // ---- status ----
  output rec_cause_t  rec_cause,
  output logic [3:0]  rq_size_log2,
  output logic [31:0] n_retired,
  output logic [31:0] n_checked,
  output logic [31:0] n_mismatch,
  output word_t       arch_pc,
  output logic        f_br_important,     // important misprediction seen in the front core
  output logic        win_update,         // window size decision taken
  output logic        inv_decide,         // invalidation decision taken
  output logic        mode_decide,        // mode decision taken
  output logic        arf_corrected,      // single-bit error corrected in the register file or PC

  // ---- front-core L1 I-cache parity (the cache arrays are outside) ----
  input  word_t       f_ic_fill_line  [IC_LINE],           // line being filled
  output logic [IC_LINE-1:0] f_ic_fill_parity,             // parity bits to store with it
  input  logic        f_ic_lookup_valid,
  input  logic [IC_WAYS-1:0] f_ic_way_hit,                 // tag match per way
  input  word_t       f_ic_way_line   [IC_WAYS][IC_LINE],  // stored instructions per way
  input  logic [IC_LINE-1:0] f_ic_way_par [IC_WAYS],       // stored parity per way
  output logic        f_ic_hit,                            // usable hit
  output logic [$clog2(IC_WAYS)-1:0] f_ic_hit_way,
  output word_t       f_ic_line       [IC_LINE],
  output logic        f_ic_nullify,                        // clear this way's valid bit: miss
  output logic [$clog2(IC_WAYS)-1:0] f_ic_nullify_way,
  output logic [$clog2(NUM_PREGS):0] b_free_regs
);
  // ---------------- control ----------------
  logic       flush, copying, copy_to_back;
  logic       inv_en, want_dual;
  logic [2:0] unused_inv_cond, unused_mode_cond;
  logic       mismatch, parity_fault, wd_expire, imp_front;
  logic [31:0] unused_imp_latency;
  logic [3:0] win_log2;
  logic [2:0] ctl_retire_cnt;
  logic       commit_orig;
  logic [$clog2(RQ_DEPTH):0] rq_count;

  assign commit_orig    = b_commit && !b_ret_redundant;
  assign ctl_retire_cnt = dual_mode ? 3'(commit_orig) : f_ret_cnt;

  recovery_ctrl #(.COPY_LAT(COPY_LAT)) u_rec (
    .clk, .rst_n,
    .req_mispred   (b_mispred),
    .req_mismatch  (mismatch),
    .req_parity    (parity_fault),
    .req_watchdog  (wd_expire),
    .want_dual     (want_dual),
    .mode_switch_en(!cfg_reliable),
    .flush, .cause(rec_cause), .copying, .copy_to_back, .dual_mode
  );

  window_size_ctrl #(.INTERVAL(INTERVAL)) u_win (
    .clk, .rst_n, .retire_cnt(ctl_retire_cnt), .mispred(b_mispred),
    .size_log2(win_log2), .update(win_update)
  );

  adaptive_enable_ctrl #(.INTERVAL(INTERVAL)) u_inv_ctl (
    .clk, .rst_n, .retire_cnt(ctl_retire_cnt), .l2_miss_cnt,
    .back_mispred(b_mispred), .front_important(imp_front),
    .enable(inv_en), .decide(inv_decide),
    .cond_a(unused_inv_cond[0]), .cond_b(unused_inv_cond[1]), .cond_c(unused_inv_cond[2])
  );

  adaptive_enable_ctrl #(.INTERVAL(INTERVAL)) u_mode_ctl (
    .clk, .rst_n, .retire_cnt(ctl_retire_cnt), .l2_miss_cnt,
    .back_mispred(b_mispred), .front_important(imp_front),
    .enable(want_dual), .decide(mode_decide),
    .cond_a(unused_mode_cond[0]), .cond_b(unused_mode_cond[1]), .cond_c(unused_mode_cond[2])
  );

  important_mispred_detect u_imp (
    .clk, .rst_n,
    .alloc_valid(f_br_alloc_valid), .alloc_id(f_br_alloc_id),
    .resolve_valid(f_br_res_valid), .resolve_mispred(f_br_res_mispred), .resolve_id(f_br_res_id),
    .important(imp_front), .latency(unused_imp_latency)
  );

  watchdog_timer #(.TIMEOUT(WD_TIMEOUT)) u_wd (
    .clk, .rst_n,
    .active  (dual_mode && !copying && rq_count != 0),
    .progress(b_commit),
    .expire  (wd_expire)
  );

  assign f_br_important = imp_front;
  assign f_flush      = flush;
  assign b_flush      = flush;
  assign f_stall      = copying;
  assign f_inv_enable = dual_mode && (cfg_reliable ? inv_en : 1'b1);

  // ---------------- front side ----------------
  logic unused_is_load;

  load_inv_filter u_lif (
    .valid(f_ld_valid), .instr(f_ld_instr), .l2_miss(f_ld_l2_miss), .io_access(f_ld_io),
    .inv_enable(f_inv_enable), .is_load(unused_is_load),
    .traversal(f_ld_traversal), .invalidate(f_ld_invalidate)
  );

  runahead_cache u_rac (
    .clk, .rst_n, .flush(flush || !dual_mode),
    .st_valid(f_rc_st_valid && dual_mode), .st_addr(f_rc_st_addr), .st_be(f_rc_st_be),
    .st_data(f_rc_st_data), .st_inv(f_rc_st_inv),
    .ld_valid(f_rc_ld_valid && dual_mode), .ld_addr(f_rc_ld_addr), .ld_be(f_rc_ld_be),
    .ld_hit(f_rc_hit), .ld_data(f_rc_data), .ld_inv(f_rc_inv)
  );

  // ---------------- result queue ----------------
  logic        rq_push_ready, rq_pop_valid, rq_pop_ready, rq_perr;
  rq_payload_t rq_pop_data;

  result_queue #(.DEPTH(RQ_DEPTH), .DELAY(RQ_DELAY)) u_rq (
    .clk, .rst_n, .flush, .resize(rec_cause == REC_MISPRED),
    .size_log2_next(win_log2), .cur_size_log2(rq_size_log2), .count(rq_count),
    .push_valid(f_ret_valid && dual_mode && !copying), .push_ready(rq_push_ready),
    .push_data(f_ret_data),
    .pop_valid(rq_pop_valid), .pop_ready(rq_pop_ready), .pop_data(rq_pop_data),
    .pop_parity_err(rq_perr)
  );
  assign f_ret_ready = rq_push_ready && dual_mode && !copying;

  // ---------------- back side ----------------
  logic        uop_valid, uop_ready, uop_red, uop_exec, ren_ready;
  rq_payload_t uop_data;
  regs_t       uop_regs;

  back_fetch u_bf (
    .clk, .rst_n, .flush,
    .dual_exec(cfg_reliable), .sel_reexec(!cfg_reliable),
    .rq_valid(rq_pop_valid && dual_mode), .rq_data(rq_pop_data), .rq_parity_err(rq_perr),
    .rq_ready(rq_pop_ready),
    .uop_valid, .uop_ready, .uop_data, .uop_redundant(uop_red), .uop_exec,
    .parity_fault
  );

  assign uop_regs        = decode_regs(uop_data.instr);
  assign uop_ready       = b_iss_ready && ren_ready;
  assign b_iss_valid     = uop_valid && ren_ready;
  assign b_iss_data      = uop_data;
  assign b_iss_redundant = uop_red;
  assign b_iss_exec      = uop_exec;
  assign b_iss_regs      = uop_regs;

  rename_unit #(.NUM_PREGS(NUM_PREGS)) u_ren (
    .clk, .rst_n, .recover(flush),
    .ren_valid(uop_valid && b_iss_ready), .ren_ready, .ren_redundant(uop_red),
    .ren_src1(uop_regs.src1), .ren_src2(uop_regs.src2),
    .ren_has_dst(uop_regs.has_dst), .ren_dst(uop_regs.dst),
    .ren_psrc1(b_iss_psrc1), .ren_psrc2(b_iss_psrc2),
    .ren_pdst(b_iss_pdst), .ren_old_pdst(b_iss_old_pdst),
    .commit_valid(b_commit), .commit_redundant(b_ret_redundant),
    .commit_has_dst(b_ret_has_dst), .commit_dst(b_ret_dst),
    .commit_pdst(b_ret_pdst), .commit_old_pdst(b_ret_old_pdst),
    .free_count(b_free_regs)
  );

  redundancy_checker u_chk (
    .clk, .rst_n, .flush,
    .check_en(cfg_reliable), .sel_reexec(!cfg_reliable),
    .ret_valid(b_ret_valid && dual_mode), .ret_redundant(b_ret_redundant),
    .ret_f_inv(b_ret_f_inv), .ret_is_load(b_ret_is_load),
    .ret_has_result(b_ret_has_result),
    .ret_front_result(b_ret_front_result), .ret_back_result(b_ret_back_result),
    .mismatch, .commit_ok(b_commit),
    .n_retired, .n_checked, .n_mismatch
  );

  // ---------------- architectural state and state copy ----------------
  logic [$clog2(COPY_LAT+1)-1:0] step;
  logic        arf_we, arf_unc, arf_fix;
  areg_t       arf_waddr;
  word_t       arf_wdata, arf_rdata;
  logic        step_reg, step_pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       step <= '0;
    else if (flush)   step <= '0;
    else if (copying) step <= step + 1'b1;
  end

  assign step_reg = copying && (step < ($bits(step))'(NUM_AREGS));
  assign step_pc  = copying && (step == ($bits(step))'(NUM_AREGS));

  always_comb begin
    arf_we    = 1'b0;
    arf_waddr = '0;
    arf_wdata = '0;
    if (step_reg && copy_to_back) begin
      arf_we = 1'b1; arf_waddr = AREG_W'(step); arf_wdata = st_copy_data;
    end else if (commit_orig && b_ret_has_dst) begin
      arf_we = 1'b1; arf_waddr = b_ret_dst; arf_wdata = b_ret_back_result;
    end
  end

  ecc_regfile u_arf (
    .clk, .rst_n,
    .wr_en(arf_we), .wr_addr(arf_waddr), .wr_data(arf_wdata),
    .rd_en(step_reg && !copy_to_back), .rd_addr(AREG_W'(step)),
    .rd_data(arf_rdata), .rd_corrected(arf_fix), .rd_uncorrectable(arf_unc)
  );

  // The architectural PC is kept as a SECDED codeword too; a corrected
  // single-bit error is written back when the PC is not being updated.
  ecc_cw_t     pc_cw;
  secded_res_t pc_chk;

  assign pc_chk  = secded_correct(pc_cw);
  assign arch_pc = secded_extract(pc_chk.fixed);
  assign arf_corrected = arf_fix || pc_chk.corrected;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          pc_cw <= secded_encode('0);
    else if (step_pc && copy_to_back)    pc_cw <= secded_encode(st_copy_pc);
    else if (commit_orig)                pc_cw <= secded_encode(b_ret_next_pc);
    else if (pc_chk.corrected)           pc_cw <= pc_chk.fixed;
  end

  assign f_copy_valid    = step_reg && !copy_to_back;
  assign f_copy_addr     = AREG_W'(step);
  assign f_copy_data     = arf_rdata;
  assign f_copy_pc_valid = step_pc && !copy_to_back;
  assign f_copy_pc       = arch_pc;
  assign st_copy_valid   = step_reg && copy_to_back;
  assign st_copy_addr    = AREG_W'(step);

  // An uncorrectable error in the architectural state cannot be recovered.
  a_arf_ok: assert property (@(posedge clk) disable iff (!rst_n) !arf_unc && !pc_chk.uncorrectable);

  // ---------------- front-core I-cache protection ----------------
  icache_parity_guard #(.WAYS(IC_WAYS), .LINE_INSNS(IC_LINE)) u_icp (
    .fill_line(f_ic_fill_line), .fill_parity(f_ic_fill_parity),
    .lookup_valid(f_ic_lookup_valid), .way_hit(f_ic_way_hit),
    .way_line(f_ic_way_line), .way_par(f_ic_way_par),
    .hit(f_ic_hit), .hit_way(f_ic_hit_way), .line(f_ic_line),
    .nullify(f_ic_nullify), .nullify_way(f_ic_nullify_way)
  );

endmodule

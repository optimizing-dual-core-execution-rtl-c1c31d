// Signals between dce_top and the dce_env core models, declared once for the
// testbenches that connect the two with implicit port connections.
  logic        clk, rst_n, cfg_reliable;
  logic [2:0]  l2_miss_cnt;
  logic        f_ld_valid, f_ld_l2_miss, f_ld_io, f_ld_invalidate, f_ld_traversal;
  word_t       f_ld_instr;
  logic        f_rc_ld_valid, f_rc_hit, f_rc_inv;
  word_t       f_rc_ld_addr, f_rc_data;
  logic [3:0]  f_rc_ld_be, f_rc_st_be;
  logic        f_rc_st_valid, f_rc_st_inv;
  word_t       f_rc_st_addr, f_rc_st_data;
  logic        f_ret_valid, f_ret_ready;
  rq_payload_t f_ret_data;
  logic [2:0]  f_ret_cnt;
  logic        f_br_alloc_valid, f_br_res_valid, f_br_res_mispred;
  logic [4:0]  f_br_alloc_id, f_br_res_id;
  logic        f_flush, f_stall, f_inv_enable, dual_mode;
  logic        f_copy_valid, f_copy_pc_valid, st_copy_valid;
  areg_t       f_copy_addr, st_copy_addr;
  word_t       f_copy_data, f_copy_pc, st_copy_data, st_copy_pc;
  logic        b_iss_valid, b_iss_ready, b_iss_redundant, b_iss_exec;
  rq_payload_t b_iss_data;
  regs_t       b_iss_regs;
  logic [7:0]  b_iss_psrc1, b_iss_psrc2, b_iss_pdst, b_iss_old_pdst;
  logic        b_ret_valid, b_ret_redundant, b_ret_f_inv, b_ret_is_load, b_ret_has_result;
  word_t       b_ret_front_result, b_ret_back_result, b_ret_next_pc;
  logic        b_ret_has_dst;
  areg_t       b_ret_dst;
  logic [7:0]  b_ret_pdst, b_ret_old_pdst;
  logic        b_mispred, b_commit, b_flush;
  rec_cause_t  rec_cause;
  logic [3:0]  rq_size_log2;
  logic [31:0] n_retired, n_checked, n_mismatch;
  word_t       arch_pc;
  logic        f_br_important, win_update, inv_decide, mode_decide, arf_corrected;
  logic [8:0]  b_free_regs;
  word_t       f_ic_fill_line [16];
  logic [15:0] f_ic_fill_parity;
  logic        f_ic_lookup_valid, f_ic_hit, f_ic_nullify;
  logic [1:0]  f_ic_way_hit;
  word_t       f_ic_way_line [2][16];
  logic [15:0] f_ic_way_par [2];
  logic        f_ic_hit_way, f_ic_nullify_way;
  word_t       f_ic_line [16];
  logic        parity_req, done;
  int          checks, failures;

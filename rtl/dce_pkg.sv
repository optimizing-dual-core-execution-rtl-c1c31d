// dce_pkg: types and constants shared by the dual-core execution (DCE) blocks.
//
// A DCE machine couples a speculative front core and a checking back core
// through a result queue. Each queue entry carries one retired front-core
// instruction together with its front-core result and the F_INV flag telling
// whether the front core invalidated it. The 32-bit MIPS-like word sizes, the
// physical register count and the even-parity code are this design's own
// choices, as is the SECDED (39,32) code used for the architectural state;
// the queue depth, the 16-cycle transfer delay, the 64-cycle state
// copy and the window sizes 128..1024 follow the published configuration.
package dce_pkg;

  localparam int unsigned XLEN       = 32;   // data and instruction word width
  localparam int unsigned NUM_AREGS  = 32;   // architectural integer registers
  localparam int unsigned AREG_W     = $clog2(NUM_AREGS);

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [AREG_W-1:0] areg_t;

  // One retired front-core instruction as it travels through the result queue.
  typedef struct packed {
    word_t pc;        // program counter of the instruction
    word_t instr;     // instruction word
    word_t result;    // front-core result (destination value or load value)
    logic  f_inv;     // 1: invalidated by the front core, result is meaningless
    logic  is_load;   // 1: the instruction is a load
  } rq_payload_t;

  // Payload plus the parity bit that protects it while it is in the queue.
  typedef struct packed {
    rq_payload_t payload;
    logic        parity;
  } rq_entry_t;

  // Even parity over a result-queue payload.
  function automatic logic rq_parity(rq_payload_t p);
    return ^p;
  endfunction

  // Reasons for a recovery in the back processor. Every one of them rewinds the
  // front core to the back core's architectural state.
  typedef enum logic [2:0] {
    REC_NONE      = 3'd0,
    REC_MISPRED   = 3'd1,  // branch misprediction resolved in the back core
    REC_MISMATCH  = 3'd2,  // redundancy check or reloaded value mismatch
    REC_PARITY    = 3'd3,  // result-queue entry failed its parity check
    REC_WATCHDOG  = 3'd4,  // watchdog timer expired
    REC_TO_SINGLE = 3'd5,  // switch from dual-core to single-core mode
    REC_TO_DUAL   = 3'd6   // switch from single-core to dual-core mode
  } rec_cause_t;

  // MIPS major opcodes of the integer loads.
  localparam logic [5:0] OP_LB  = 6'h20;
  localparam logic [5:0] OP_LH  = 6'h21;
  localparam logic [5:0] OP_LW  = 6'h23;
  localparam logic [5:0] OP_LBU = 6'h24;
  localparam logic [5:0] OP_LHU = 6'h25;
  localparam logic [5:0] OP_LWU = 6'h27;
  localparam logic [5:0] OP_LD  = 6'h37;

  function automatic logic is_load_op(logic [5:0] op);
    return op inside {OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU, OP_LWU, OP_LD};
  endfunction

  // Register fields of a MIPS instruction, as the back core's rename stage
  // needs them. R-type: rs, rt -> rd; loads and immediate ALU ops: rs -> rt;
  // stores and beq/bne: rs, rt, no destination. Writes to r0 are dropped.
  typedef struct packed {
    areg_t src1;
    areg_t src2;
    areg_t dst;
    logic  has_dst;
  } regs_t;

  function automatic regs_t decode_regs(word_t instr);
    regs_t r;
    logic [5:0] op;
    op        = instr[31:26];
    r.src1    = instr[25:21];
    r.src2    = instr[20:16];
    r.dst     = '0;
    r.has_dst = 1'b0;
    if (op == 6'h00) begin
      r.dst = instr[15:11]; r.has_dst = 1'b1;
    end else if (is_load_op(op) || (op >= 6'h08 && op <= 6'h0f)) begin
      r.src2 = '0; r.dst = instr[20:16]; r.has_dst = 1'b1;
    end
    if (r.dst == '0) r.has_dst = 1'b0;
    return r;
  endfunction

  // SECDED (39,32) Hamming code with an overall parity bit, protecting the
  // back core's architectural registers and PC. Bit 0 is the overall parity,
  // bits 1, 2, 4, 8, 16 and 32 are check bits, the other 32 positions hold
  // the data bits in order.
  localparam int unsigned ECC_CW = 39;
  typedef logic [ECC_CW-1:0] ecc_cw_t;

  typedef struct packed {
    ecc_cw_t fixed;          // codeword with a single-bit error repaired
    logic    corrected;      // a single-bit error was found
    logic    uncorrectable;  // a double-bit error was found
  } secded_res_t;

  function automatic ecc_cw_t secded_encode(word_t d);
    ecc_cw_t c = '0;
    int      j = 0;
    for (int p = 1; p < ECC_CW; p++) begin
      if ((p & (p - 1)) != 0) begin
        c[p] = d[j];
        j++;
      end
    end
    for (int k = 0; k < 6; k++) begin
      logic x = 1'b0;
      for (int p = 1; p < ECC_CW; p++) if (((p >> k) & 1) == 1 && p != (1 << k)) x ^= c[p];
      c[1 << k] = x;
    end
    c[0] = ^c[ECC_CW-1:1];
    return c;
  endfunction

  function automatic word_t secded_extract(ecc_cw_t c);
    word_t d = '0;
    int    j = 0;
    for (int p = 1; p < ECC_CW; p++) begin
      if ((p & (p - 1)) != 0) begin
        d[j] = c[p];
        j++;
      end
    end
    return d;
  endfunction

  // The syndrome names the flipped position; odd overall parity means one
  // error (position 0 is the parity bit itself), even parity with a nonzero
  // syndrome means two.
  function automatic secded_res_t secded_correct(ecc_cw_t raw);
    secded_res_t r;
    logic [5:0]  syn = '0;
    for (int p = 1; p < ECC_CW; p++) if (raw[p]) syn ^= 6'(p);
    r.fixed         = raw;
    r.corrected     = 1'b0;
    r.uncorrectable = 1'b0;
    if (^raw) begin
      if (syn < 6'(ECC_CW)) r.fixed[syn] = ~raw[syn];
      r.corrected = 1'b1;
    end else if (syn != 0) begin
      r.uncorrectable = 1'b1;
    end
    return r;
  endfunction

endpackage

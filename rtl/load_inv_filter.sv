// load_inv_filter: decides, in the front core, whether a load is invalidated
// (its value replaced by INV) instead of waiting for memory.
//
// A load that misses in the L2 cache is invalidated while invalidation is
// enabled, so the front core can run ahead. The exception is a traversal
// address load of the form "load ra, x(ra)": its base register is also its
// destination, so it typically feeds the next iteration's address, and
// invalidating it would invalidate the whole rest of a pointer chase. Such
// loads are found at decode by comparing the base and destination fields and
// are never invalidated. Non-repeatable loads such as I/O accesses are always
// invalidated and left to the back core.
//
// Interface: purely combinational. instr is a MIPS instruction word
// (opcode [31:26], base rs [25:21], destination rt [20:16]).
//
// Published: the L2-miss rule, the enable, the "load ra, x(ra)" pattern and the
// I/O rule. This design's own choices: the MIPS encoding and the list of load
// opcodes (dce_pkg), and that a load whose base is r0 is not a traversal load.
module load_inv_filter
  import dce_pkg::*;
(
  input  logic  valid,
  input  word_t instr,
  input  logic  l2_miss,     // the load missed in the L2 cache
  input  logic  io_access,   // the load reads a non-repeatable location
  input  logic  inv_enable,  // invalidation currently enabled
  output logic  is_load,
  output logic  traversal,
  output logic  invalidate
);
  logic [4:0] rs, rt;

  always_comb begin
    rs         = instr[25:21];
    rt         = instr[20:16];
    is_load    = valid && is_load_op(instr[31:26]);
    traversal  = is_load && (rs == rt) && (rs != 5'd0);
    invalidate = is_load && (io_access || (l2_miss && inv_enable && !traversal));
  end

endmodule

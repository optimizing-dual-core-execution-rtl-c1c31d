// result_queue: the hardware queue that forms the DCE instruction window.
//
// The front core retires instructions into this circular FIFO and the back
// core fetches them from it. Each entry carries the front-core result and the
// F_INV flag, and is protected by one parity bit that is generated on entry
// and checked on exit; a failed check is reported with the popped entry so the
// back core can treat it like a branch misprediction.
//
// Transfer delay: a pushed entry first passes a DELAY-stage delay line that
// models inter-core communication, and becomes visible to the back core DELAY
// cycles after the push. Entries in the delay line count against the queue
// capacity, so the delay line can always drain into the storage array.
//
// Adaptive size: the logical size is 2**cur_size_log2. Pointers advance as
// (ptr + 1) mod cur_size, done as an AND with cur_size-1 because the size is a
// power of two. A new size requested on size_log2_next is taken over only when
// the queue is squashed by a flush that also has resize set; dce_top sets it
// for misprediction recoveries, as the published design applies a new size at
// the next important-misprediction recovery. Reset starts at the full
// physical depth.
//
// Interface: push_valid/push_ready/push_data (valid-ready, one entry per cycle)
// and pop_valid/pop_ready/pop_data/pop_parity_err (same handshake). flush
// empties the queue and the delay line in one cycle; a push or pop in the
// flush cycle is dropped. No output depends combinationally on flush, so flush
// may itself be derived from pop_parity_err.
//
// Published: 1,024 entries, 16-cycle delay, F_INV flag, parity, mod-size
// pointer logic, sizes 128..1024. This design's own choices: one entry per
// cycle on each side, even parity over the whole payload, first-word-fall-
// through output.
module result_queue
  import dce_pkg::*;
#(
  parameter int unsigned DEPTH    = 1024,  // physical entries (power of two)
  parameter int unsigned DELAY    = 16,    // cycles from push to visibility
  parameter int unsigned MIN_LOG2 = 7      // smallest logical size, 128 entries
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        resize,           // with flush: take over size_log2_next
  input  logic [3:0]  size_log2_next,   // logical size to use after the next resize
  output logic [3:0]  cur_size_log2,
  output logic [$clog2(DEPTH):0] count, // entries held, delay line included

  input  logic        push_valid,
  output logic        push_ready,
  input  rq_payload_t push_data,

  output logic        pop_valid,
  input  logic        pop_ready,
  output rq_payload_t pop_data,
  output logic        pop_parity_err
);
  localparam int unsigned PTR_W    = $clog2(DEPTH);
  localparam int unsigned MAX_LOG2 = PTR_W;

  rq_entry_t            mem [DEPTH];
  logic [PTR_W-1:0]     head, tail;
  logic [PTR_W:0]       stored;           // entries in the storage array
  logic [PTR_W:0]       cur_size;
  logic [PTR_W-1:0]     mask;

  // delay line
  logic                 dl_valid [DELAY];
  rq_entry_t            dl_data  [DELAY];
  logic [$clog2(DELAY+1)-1:0] dl_count;

  logic push_fire, pop_fire, dl_out;
  logic [3:0] next_log2;

  always_comb begin
    cur_size = (PTR_W+1)'(1) << cur_size_log2;
    mask     = PTR_W'(cur_size - 1);
    count    = stored + (PTR_W+1)'(dl_count);
    push_ready = (count < cur_size);
    push_fire  = push_valid && push_ready;
    pop_valid  = (stored != 0);
    pop_fire   = pop_valid && pop_ready;
    dl_out     = dl_valid[DELAY-1];
    pop_data       = mem[head].payload;
    pop_parity_err = pop_valid && (rq_parity(mem[head].payload) != mem[head].parity);
    if (size_log2_next < 4'(MIN_LOG2))      next_log2 = 4'(MIN_LOG2);
    else if (size_log2_next > 4'(MAX_LOG2)) next_log2 = 4'(MAX_LOG2);
    else                                    next_log2 = size_log2_next;
  end

  // Delay line: shifts every cycle, so an entry reaches the array after DELAY cycles.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) dl_valid[i] <= 1'b0;
      dl_count <= '0;
    end else if (flush) begin
      for (int i = 0; i < DELAY; i++) dl_valid[i] <= 1'b0;
      dl_count <= '0;
    end else begin
      dl_valid[0] <= push_fire;
      for (int i = 1; i < DELAY; i++) dl_valid[i] <= dl_valid[i-1];
      dl_count <= dl_count + ($bits(dl_count))'(push_fire) - ($bits(dl_count))'(dl_out);
    end
  end

  always_ff @(posedge clk) begin
    dl_data[0] <= '{payload: push_data, parity: rq_parity(push_data)};
    for (int i = 1; i < DELAY; i++) dl_data[i] <= dl_data[i-1];
  end

  // Storage array: written from the end of the delay line.
  always_ff @(posedge clk) begin
    if (dl_out && !flush) mem[tail] <= dl_data[DELAY-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head          <= '0;
      tail          <= '0;
      stored        <= '0;
      cur_size_log2 <= 4'(MAX_LOG2);
    end else if (flush) begin
      head          <= '0;
      tail          <= '0;
      stored        <= '0;
      if (resize) cur_size_log2 <= next_log2;
    end else begin
      if (dl_out)   tail <= (tail + 1'b1) & mask;
      if (pop_fire) head <= (head + 1'b1) & mask;
      stored <= stored + (PTR_W+1)'(dl_out) - (PTR_W+1)'(pop_fire);
    end
  end

  // The queue never holds more than its logical size.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= cur_size);

endmodule

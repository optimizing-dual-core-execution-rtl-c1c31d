// ecc_regfile: the back core's architectural register file, protected by a
// single-error-correcting, double-error-detecting (SECDED) code.
//
// The back core's architectural state is the one every recovery returns to,
// so a transient fault in it could not be undone by re-execution; it is kept
// under ECC. Each 32-bit register is stored as a 39-bit extended Hamming
// codeword: data bits in the non-power-of-two positions 3..38, check bits at
// positions 1, 2, 4, 8, 16, 32 (each the XOR of the positions that have that
// address bit set) and an overall parity bit at position 0. On a read the
// syndrome names a single flipped bit, which is corrected in the returned data
// and written back (scrubbed) on the next edge if the write port is idle; a
// nonzero syndrome with even overall parity is an uncorrectable double error.
//
// The code functions (secded_encode, secded_extract, secded_correct) are in
// dce_pkg, where dce_top also uses them for the architectural PC.
//
// Interface: one synchronous write port and one combinational read port
// (rd_*) used by retirement and by the state copy to the front core. All
// registers read as zero after reset.
//
// Published: ECC on the back core's architectural registers. This design's own
// choices: the SECDED (39,32) code, correction on read with scrubbing, one read
// port.
module ecc_regfile
  import dce_pkg::*;
#(
  parameter int unsigned NREGS = NUM_AREGS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(NREGS)-1:0] wr_addr,
  input  word_t                    wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(NREGS)-1:0] rd_addr,
  output word_t                    rd_data,
  output logic                     rd_corrected,
  output logic                     rd_uncorrectable
);
  ecc_cw_t     mem [NREGS];
  ecc_cw_t     raw, fixed;
  secded_res_t chk;

  always_comb begin
    raw              = mem[rd_addr];
    chk              = secded_correct(raw);
    fixed            = chk.fixed;
    rd_corrected     = rd_en && chk.corrected;
    rd_uncorrectable = rd_en && chk.uncorrectable;
    rd_data          = secded_extract(fixed);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) mem[r] <= '0;
    end else if (wr_en) begin
      mem[wr_addr] <= secded_encode(wr_data);
    end else if (rd_corrected) begin
      mem[rd_addr] <= fixed;
    end
  end

endmodule

// tb_ecc_regfile: writes random values, then flips one or two stored bits in
// every possible position and checks that single flips are corrected (and
// scrubbed, so the next read is clean) and double flips are reported as
// uncorrectable.
module tb_ecc_regfile;
  import dce_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [4:0] wr_addr = 0, rd_addr = 0;
  word_t wr_data = 0, rd_data;
  logic rd_corrected, rd_uncorrectable;
  int checks = 0, failures = 0;
  word_t shadow [32];

  ecc_regfile dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd_en = 1;
    for (int r = 0; r < 32; r++) begin
      rd_addr = 5'(r); #1;
      check(rd_data == 0 && !rd_corrected && !rd_uncorrectable, "zero after reset");
    end
    for (int r = 0; r < 32; r++) begin
      wr_en = 1; wr_addr = 5'(r); wr_data = $urandom; shadow[r] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    for (int r = 0; r < 32; r++) begin
      rd_addr = 5'(r); #1;
      check(rd_data == shadow[r] && !rd_corrected && !rd_uncorrectable, "clean read");
    end
    // single flips in every codeword position
    for (int b = 0; b < 39; b++) begin
      automatic int r = b % 32;
      rd_addr = 5'(r);
      dut.mem[r][b] = ~dut.mem[r][b];
      #1;
      check(rd_data == shadow[r] && rd_corrected && !rd_uncorrectable,
            $sformatf("single flip at bit %0d corrected", b));
      @(negedge clk);
      check(rd_data == shadow[r] && !rd_corrected, $sformatf("bit %0d scrubbed", b));
    end
    // double flips
    for (int n = 0; n < 300; n++) begin
      automatic int r = $urandom_range(0, 31), b1 = $urandom_range(0, 38), b2;
      do b2 = $urandom_range(0, 38); while (b2 == b1);
      rd_en = 0; @(negedge clk);
      dut.mem[r][b1] = ~dut.mem[r][b1];
      dut.mem[r][b2] = ~dut.mem[r][b2];
      rd_en = 1; rd_addr = 5'(r); #1;
      check(rd_uncorrectable && !rd_corrected, $sformatf("double flip %0d,%0d detected", b1, b2));
      dut.mem[r][b1] = ~dut.mem[r][b1];
      dut.mem[r][b2] = ~dut.mem[r][b2];
      #1;
      check(rd_data == shadow[r] && !rd_uncorrectable, "restored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

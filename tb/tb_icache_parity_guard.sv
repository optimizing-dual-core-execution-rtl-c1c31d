// tb_icache_parity_guard: builds two cache ways with parity from the fill
// port, flips random instruction bits, and checks that a hit on a corrupted
// way turns into a miss with a nullify request while clean hits pass the line.
module tb_icache_parity_guard;
  import dce_pkg::*;
  word_t fill_line [16];
  logic [15:0] fill_parity;
  logic lookup_valid;
  logic [1:0] way_hit;
  word_t way_line [2][16];
  logic [15:0] way_par [2];
  logic hit, nullify;
  logic [0:0] hit_way, nullify_way;
  word_t line [16];
  int checks = 0, failures = 0, n_null = 0;

  icache_parity_guard dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int w, bad_way;
      bit corrupt;
      for (int ww = 0; ww < 2; ww++) begin
        for (int i = 0; i < 16; i++) fill_line[i] = $urandom;
        #1;
        for (int i = 0; i < 16; i++) begin
          way_line[ww][i] = fill_line[i];
          check(fill_parity[i] == ^fill_line[i], "fill parity");
        end
        way_par[ww] = fill_parity;
      end
      w = $urandom_range(0, 1);
      corrupt = $urandom_range(0, 2) == 0;
      bad_way = $urandom_range(0, 1);
      if (corrupt) begin
        automatic int i = $urandom_range(0, 15), b = $urandom_range(0, 32);
        if (b == 32) way_par[bad_way][i] = ~way_par[bad_way][i];
        else way_line[bad_way][i][b] = ~way_line[bad_way][i][b];
      end
      lookup_valid = $urandom_range(0, 7) != 0;
      way_hit = $urandom_range(0, 1) ? 2'(1 << w) : 2'b00;
      #1;
      begin
        automatic bit exp_bad = corrupt && bad_way == w;
        automatic bit look = lookup_valid && way_hit != 0;
        check(hit == (look && !exp_bad), "hit");
        check(nullify == (look && exp_bad), "nullify");
        if (look && exp_bad) begin check(nullify_way == 1'(w), "nullify way"); n_null++; end
        if (hit) begin
          check(hit_way == 1'(w), "hit way");
          for (int i = 0; i < 16; i++) check(line[i] == way_line[w][i], "line data");
        end
      end
    end
    check(n_null > 300, "corrupted hits seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

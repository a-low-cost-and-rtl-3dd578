// Self-checking testbench of cavlc_coding_level. Random sub-blocks are made of
// a TotalCoeff, a TrailingOnes count and a list of levels (ones, small, medium
// and escape-sized, both signs). After 'init' the levels are applied one per
// cycle with 'advance'; each codeword is compared with an independent
// reference of the H.264 level coding (levelCode, prefix/suffix, escape,
// suffixLength adaptation). The codeword is combinational and the table update
// takes effect on the next clock edge, so one level per cycle is checked.
module tb_cavlc_coding_level;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        init, advance;
  logic [4:0]  num_nz;
  logic [1:0]  num_t1;
  coef_t       coef;
  logic [31:0] word;
  logic [5:0]  len;
  logic [2:0]  vlcnum;

  cavlc_coding_level dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_esc = 0, n_sl [7] = '{0, 0, 0, 0, 0, 0, 0};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rand_level();
    int m;
    case ($urandom_range(0, 5))
      0, 1:    m = 1 + $urandom_range(0, 2);
      2:       m = $urandom_range(1, 15);
      3:       m = $urandom_range(10, 60);
      4:       m = $urandom_range(50, 300);
      default: m = $urandom_range(300, 2040);
    endcase
    return $urandom_range(0, 1) ? m : -m;
  endfunction

  initial begin
    int tc, t1, nlev, sl, a, lc, prefix, ssize, suffix;
    int lv [16];
    string exp;
    init = 0; advance = 0; num_nz = 0; num_t1 = 0; coef = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 3000; blk++) begin
      tc = $urandom_range(1, 16);
      t1 = $urandom_range(0, (tc < 3) ? tc : 3);
      if (t1 == tc) t1 = tc - 1;          // at least one level to code
      nlev = tc - t1;
      for (int k = 0; k < nlev; k++) begin
        lv[k] = rand_level();
        // the first level of a block with fewer than 3 trailing ones is not +-1
        // when it follows them (it would have been a trailing one)
        if (k == 0 && t1 < 3 && iabs(lv[k]) == 1) lv[k] = 2 * lv[k];
      end
      @(negedge clk);
      init = 1; num_nz = 5'(tc); num_t1 = 2'(t1);
      @(negedge clk);
      init = 0;
      sl = (tc > 10 && t1 < 3) ? 1 : 0;
      for (int k = 0; k < nlev; k++) begin
        a  = iabs(lv[k]);
        lc = (lv[k] > 0) ? 2 * a - 2 : 2 * a - 1;
        if (k == 0 && t1 < 3) lc -= 2;
        if (sl == 0) begin
          if (lc < 14)      begin prefix = lc; ssize = 0;  suffix = 0;       end
          else if (lc < 30) begin prefix = 14; ssize = 4;  suffix = lc - 14; end
          else              begin prefix = 15; ssize = 12; suffix = lc - 30; end
        end else begin
          if (lc < (15 << sl)) begin prefix = lc >> sl; ssize = sl; suffix = lc % (1 << sl); end
          else                 begin prefix = 15; ssize = 12; suffix = lc - (15 << sl);     end
        end
        if (prefix == 15) n_esc++;
        n_sl[sl]++;
        exp = {zeros(prefix), "1", bin(suffix, ssize)};
        coef = coef_t'(lv[k]);
        advance = 1;
        #1;
        checks++;
        if (int'(len) != exp.len() || w2s(word, int'(len)) != exp || int'(vlcnum) != sl) begin
          failures++;
          if (failures < 20)
            $display("FAIL tc=%0d t1=%0d k=%0d level=%0d vlcnum=%0d(want %0d): got %s want %s",
                     tc, t1, k, lv[k], vlcnum, sl, w2s(word, int'(len)), exp);
        end
        @(negedge clk);
        advance = 0;
        if (sl == 0) sl = 1;
        if (a > (3 << (sl - 1)) && sl < 6) sl++;
        if (k == 0 && a > 3 && sl < 2) sl = 2;
      end
    end
    for (int s = 0; s < 7; s++) begin
      checks++;
      if (n_sl[s] == 0) begin failures++; $display("FAIL suffixLength %0d never used", s); end
    end
    checks++;
    if (n_esc == 0) begin failures++; $display("FAIL escape never used"); end
    $display("levels per suffixLength %p, escapes %0d", n_sl, n_esc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

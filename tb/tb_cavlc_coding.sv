// Self-checking testbench of cavlc_coding (coeff_token, total_zeros and
// zero-block codewords). Every legal combination of nC, TotalCoeff,
// TrailingOnes and total_zeros is applied and the left-aligned codeword and
// length are compared with the reference bit-string tables, which are kept in
// a form independent of the RTL look-up functions. Purely combinational: no
// cycle counts apply.
module tb_cavlc_coding;
  import cavlc_ref_pkg::*;
  import cavlc_ref_tables_pkg::*;

  logic signed [5:0] nc;
  logic [4:0]        num_nz;
  logic [1:0]        num_t1;
  logic [3:0]        total_zeros;
  logic              is_cdc;
  logic [31:0]       token_word, tz_word, zero_word;
  logic [5:0]        token_len, tz_len, zero_len;

  cavlc_coding dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cw(string what, logic [31:0] w, logic [5:0] l, string exp);
    checks++;
    if (int'(l) != exp.len() || w2s(w, int'(l)) != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s nc=%0d tc=%0d t1=%0d tz=%0d: got %s (len %0d) want %s", what, nc,
                 num_nz, num_t1, total_zeros, w2s(w, int'(l)), l, exp);
    end
  endtask

  initial begin
    int col, maxc;
    for (int n = -1; n <= 16; n++) begin
      nc = 6'(n);
      is_cdc = (n == -1);
      col = (n < 0) ? 4 : (n < 2) ? 0 : (n < 4) ? 1 : (n < 8) ? 2 : 3;
      maxc = (n < 0) ? 4 : 16;
      for (int tc = 0; tc <= maxc; tc++)
        for (int t1 = 0; t1 <= 3 && t1 <= tc; t1++) begin
          num_nz = 5'(tc); num_t1 = 2'(t1); total_zeros = 0;
          #1;
          expect_cw("coeff_token", token_word, token_len, CT[col][t1][tc]);
          if (tc == 0) expect_cw("zero-block", zero_word, zero_len, CT[col][0][0]);
          if (tc > 0 && tc < maxc)
            for (int tz = 0; tz <= maxc - tc; tz++) begin
              total_zeros = 4'(tz);
              #1;
              expect_cw("total_zeros", tz_word, tz_len,
                        (n < 0) ? TZC[tc-1][tz] : TZ[tc-1][tz]);
            end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

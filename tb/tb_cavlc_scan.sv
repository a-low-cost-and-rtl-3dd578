// Self-checking testbench of cavlc_scan (Nonzero Index Table, FindLeadingOne and
// syntax-element extraction). Each random 4x4 block is loaded, analysed, walked
// for trailing ones and then for levels, the way the encoder controller drives
// the unit. Checked against values computed here from the coefficients:
// TotalCoeff, total_zeros and the all-zero flag after 'analyze'; TrailingOnes and
// their signs, settled within at most three t1 steps; the level presented at the
// stop index in each level step, one per cycle regardless of zeros between them
// (so a block with L levels takes exactly L level steps); and the sequence of
// run_before / zerosLeft pairs.
module tb_cavlc_scan;
  import cavlc_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        load, analyze, t1_step, lvl_step;
  logic [15:0] nz_flags, nzt;
  coef_arr_t   input_buf;
  logic        empty, zero_blk_cur, t1_end, run_valid;
  logic [3:0]  stop_idx, total_run_cur, run_before, zeros_left;
  coef_t       cur_coef;
  logic [4:0]  num_nz_cur;
  logic [1:0]  num_t1_cur;
  logic [2:0]  sign_t1_cur;

  cavlc_scan dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_zero = 0, n_full = 0;
  int n_t1 [4] = '{0, 0, 0, 0};
  int got_runs [$], got_zl [$];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && run_valid) begin
    got_runs.push_back(int'(run_before));
    got_zl.push_back(int'(zeros_left));
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, exp);
    end
  endtask

  initial begin
    int c [16];
    int idx [$];
    int tc, t1, tz, zl, dens, steps, sgn;
    bit done;
    int exp_runs [$], exp_zl [$];
    load = 0; analyze = 0; t1_step = 0; lvl_step = 0; nz_flags = 0; input_buf = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 6000; b++) begin
      dens = $urandom_range(0, 16);
      idx.delete();
      for (int k = 15; k >= 0; k--) begin
        c[k] = 0;
        if ($urandom_range(0, 15) < dens)
          c[k] = ($urandom_range(0, 2) != 0) ? 1 : $urandom_range(2, 3000);
        if (c[k] != 0 && $urandom_range(0, 1)) c[k] = -c[k];
        if (c[k] != 0) idx.push_back(k);
      end
      tc = idx.size();
      t1 = 0;
      sgn = 0;
      foreach (idx[k]) if (t1 < 3 && k == t1 && (c[idx[k]] == 1 || c[idx[k]] == -1)) begin
        t1++; sgn = (sgn << 1) | (c[idx[k]] < 0);
      end
      tz = (tc == 0) ? 0 : idx[0] + 1 - tc;
      exp_runs.delete(); exp_zl.delete();
      zl = tz;
      for (int k = 0; k < tc - 1 && zl > 0; k++) begin
        exp_runs.push_back(idx[k] - idx[k+1] - 1);
        exp_zl.push_back(zl);
        zl -= idx[k] - idx[k+1] - 1;
      end
      if (tc == 0) n_zero++;
      if (tc == 16) n_full++;
      n_t1[t1]++;
      // load
      for (int k = 0; k < 16; k++) begin
        input_buf[k] = coef_t'(c[k]);
        nz_flags[k]  = (c[k] != 0);
      end
      load = 1;
      @(negedge clk);
      load = 0; nz_flags = '0;
      got_runs.delete(); got_zl.delete();
      analyze = 1;
      @(negedge clk);
      analyze = 0;
      check("TotalCoeff", int'(num_nz_cur), tc);
      check("total_zeros", int'(total_run_cur), tz);
      check("zero block", int'(zero_blk_cur), int'(tc == 0));
      if (tc == 0) continue;
      steps = 0;
      done = 0;
      while (!done) begin
        t1_step = 1;
        #1;
        done = t1_end || steps > 4;
        steps++;
        @(negedge clk);
      end
      t1_step = 0;
      check("t1 steps", steps, (t1 == 3) ? 3 : t1 + 1);
      check("TrailingOnes", int'(num_t1_cur), t1);
      check("trailing-one signs", int'(sign_t1_cur), sgn);
      steps = 0;
      for (int k = t1; k < tc; k++) begin
        lvl_step = 1;
        #1;
        check("level at stop index", int'(cur_coef), c[idx[k]]);
        check("not empty during levels", int'(empty), 0);
        steps++;
        @(negedge clk);
      end
      lvl_step = 0;
      check("empty after the levels", int'(empty), 1);
      @(negedge clk);
      check("number of run_before", got_runs.size(), exp_runs.size());
      foreach (exp_runs[i]) if (i < got_runs.size()) begin
        check("run_before", got_runs[i], exp_runs[i]);
        check("zerosLeft", got_zl[i], exp_zl[i]);
      end
    end
    $display("blocks: all-zero %0d full %0d, TrailingOnes 0..3: %p", n_zero, n_full, n_t1);
    foreach (n_t1[i]) check($sformatf("TrailingOnes=%0d seen", i), int'(n_t1[i] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of cavlc_coding_crun. Random run_before sequences are
// built from a random total_zeros and TotalCoeff, exactly as a 4x4 block walks
// them (zerosLeft decreasing by each run). One run is appended per cycle with
// 'run_valid'; after the last one the collected left-aligned word and its length
// are compared with the concatenation of the reference run_before codewords.
// 'clear' must empty the register for the next sequence.
module tb_cavlc_coding_crun;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;
  import cavlc_ref_tables_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        clear, run_valid;
  logic [3:0]  run_before, zeros_left;
  logic [31:0] word;
  logic [5:0]  len;

  cavlc_coding_crun dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, maxlen = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string exp, string what);
    checks++;
    if (int'(len) != exp.len() || w2s(word, int'(len)) != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %s want %s", what, w2s(word, int'(len)), exp);
    end
  endtask

  initial begin
    int tc, zl, run, nrun;
    string exp;
    clear = 0; run_valid = 0; run_before = 0; zeros_left = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int seq = 0; seq < 5000; seq++) begin
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      check("", "after clear");
      tc = $urandom_range(2, 16);
      zl = $urandom_range(1, 16 - tc);
      if (seq % 4 == 0) begin tc = 16 - zl; end   // runs spread over a full block
      exp = "";
      nrun = 0;
      while (zl > 0 && nrun < tc - 1) begin
        run = (nrun == tc - 2) ? zl : $urandom_range(0, (seq % 3 == 0) ? zl : 1);
        exp = {exp, RB[(zl > 6 ? 7 : zl) - 1][run]};
        run_valid = 1; run_before = 4'(run); zeros_left = 4'(zl);
        @(negedge clk);
        run_valid = 0;
        zl -= run;
        nrun++;
      end
      if (exp.len() > maxlen) maxlen = exp.len();
      check(exp, $sformatf("sequence %0d", seq));
    end
    $display("longest run_before string %0d bits", maxlen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

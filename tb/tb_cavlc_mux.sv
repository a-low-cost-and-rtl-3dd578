// Self-checking testbench of the encoder controller and output multiplexer,
// cavlc_mux, run inside cavlc_encoder (the controller only makes sense driving
// the real datapath). Directed sub-blocks are chosen so that nC does not depend
// on earlier blocks (luma sub-block 0 and chroma AC sub-block 16 of macro-block
// (0,0) have no neighbours; chroma DC uses nC = -1), for every block type:
// CBP-skipped blocks, all-zero blocks, and coded blocks with 0..3 trailing ones,
// full blocks and blocks with long zero runs. For each sub-block it checks
// the class reported on blk_done, the cycle count (3 / 6 / 9 + x + y), the
// number of codewords the multiplexer sends (coeff_token, one sign group,
// one per level, total_zeros unless TotalCoeff is the maximum, one run_before
// group when any run is coded), the bits sent, and the TotalCoeff written back.
module tb_cavlc_mux;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       blk_start;
  blk_type_t  block_type;
  logic [4:0] block_idx;
  logic [6:0] mb_x, mb_y;
  logic [5:0] cbp;
  coef_arr_t  cof;
  logic       busy, blk_done;
  blk_class_t blk_class;
  cw_t        cw;

  cavlc_encoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cls [3] = '{0, 0, 0};
  int n_t1 [4] = '{0, 0, 0, 0};
  int n_type [5] = '{0, 0, 0, 0, 0};
  int last_wr_tc;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dut.u_mux.wr_tc) last_wr_tc = int'(dut.u_mux.tc_wdata);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, exp);
    end
  endtask

  task automatic run_block(blk_type_t t, int cb, int c[16]);
    int maxc, sb, nc, tc, t1, cls, got_cls, cyc, ncw, exp_ncw, tz, nlast, zl;
    bit cs, runs;
    string exp_bits, got_bits;
    int idx [$];
    maxc = (t == BT_CHROMA_DC) ? 4 : (t == BT_LUMA || t == BT_LUMA_DC) ? 16 : 15;
    sb   = (t == BT_CHROMA_AC) ? 16 : 0;
    nc   = (t == BT_CHROMA_DC) ? -1 : 0;
    case (t)
      BT_LUMA_AC:   cs = (cb[3:0] == 0);
      BT_LUMA:      cs = !cb[0];
      BT_CHROMA_DC: cs = (cb[5:4] == 0);
      BT_CHROMA_AC: cs = (cb[5:4] != 2);
      default:      cs = 0;
    endcase
    exp_bits = cs ? "" : cavlc_block(c, maxc, nc, tc, t1);
    if (cs) begin tc = 0; t1 = 0; end
    cls = cs ? 0 : (tc == 0) ? 1 : 2;
    for (int i = maxc - 1; i >= 0; i--) if (c[i] != 0) idx.push_back(i);
    runs = 0;
    if (tc > 0) begin
      zl = idx[0] + 1 - tc;
      runs = (tc > 1 && zl > 0);
    end
    exp_ncw = (cls == 0) ? 0 : (cls == 1) ? 1 :
              1 + (t1 > 0) + (tc - t1) + (tc < maxc) + runs;
    got_bits = "";
    cyc = 0; ncw = 0;
    last_wr_tc = -1;
    @(posedge clk); #1 blk_start = 1; block_type = t; block_idx = 5'(sb); mb_x = 0; mb_y = 0; cbp = 6'(cb);
    @(negedge clk); cyc++;
    @(posedge clk); #1 blk_start = 0;
    for (int i = 0; i < 16; i++) cof[i] = coef_t'(c[i]);
    forever begin
      @(negedge clk); cyc++;
      if (cw.valid) begin
        got_bits = {got_bits, w2s(cw.word, int'(cw.len))};
        ncw++;
      end
      if (blk_done) begin got_cls = int'(blk_class); break; end
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
    check($sformatf("%s class", t.name()), got_cls, cls);
    // the cycle counts of the design include the cycle in which the block
    // information is fetched, before blk_start
    check($sformatf("%s cycles (tc %0d t1 %0d)", t.name(), tc, t1), cyc + 1, cycles(cls, tc, t1));
    check($sformatf("%s codewords", t.name()), ncw, exp_ncw);
    checks++;
    if (got_bits != exp_bits) begin
      failures++;
      if (failures < 20) $display("FAIL %s bits %s want %s", t.name(), got_bits, exp_bits);
    end
    if (t == BT_LUMA || t == BT_LUMA_AC || t == BT_CHROMA_AC) check("TotalCoeff written", last_wr_tc, tc);
    n_cls[cls]++; n_type[t]++;
    if (cls == 2) n_t1[t1]++;
  endtask

  initial begin
    int c [16];
    int maxc, kind;
    blk_type_t t;
    blk_start = 0; block_type = BT_LUMA; block_idx = 0; mb_x = 0; mb_y = 0; cbp = 0; cof = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      t = blk_type_t'(n % 5);
      maxc = (t == BT_CHROMA_DC) ? 4 : (t == BT_LUMA || t == BT_LUMA_DC) ? 16 : 15;
      foreach (c[i]) c[i] = 0;
      kind = $urandom_range(0, 5);
      for (int i = 0; i < maxc; i++) begin
        case (kind)
          0:       c[i] = 0;                                        // all zero
          1:       c[i] = ($urandom_range(0, 3) == 0) ? 1 : 0;      // sparse ones
          2:       c[i] = $urandom_range(1, 3);                     // full block
          3:       c[i] = (i == maxc - 1 || i == 0) ? $urandom_range(1, 2) : 0;  // long run
          default: c[i] = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 40) : 0;
        endcase
        if ($urandom_range(0, 1)) c[i] = -c[i];
      end
      run_block(t, ($urandom_range(0, 4) == 0) ? 0 : 6'h2f, c);
    end
    $display("classes CS/NSZB/NAZ %p, TrailingOnes %p, types %p", n_cls, n_t1, n_type);
    foreach (n_cls[i]) check($sformatf("class %0d seen", i), int'(n_cls[i] > 0), 1);
    foreach (n_t1[i]) check($sformatf("TrailingOnes %0d seen", i), int'(n_t1[i] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of cavlc_encoder.
// Encodes every sub-block of a 4 x 3 macro-block frame in H.264 order, with
// random macro-block types, coded block patterns and coefficients (all-zero
// blocks, trailing ones, large and escape-coded levels, full blocks included).
// The bits sent on 'cw' for each sub-block are compared with the reference
// coder, nC being derived in the testbench from its own record of TotalCoeff
// per sub-block and the neighbour address table. The cycle count of every
// sub-block is checked against 3 (CS), 6 (NSZB) and 9 + x + y (NAZ).
module tb_cavlc_encoder;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  localparam int FW = 4, FH = 3;

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
  int n_cs = 0, n_nszb = 0, n_naz = 0, n_full = 0, n_esc = 0, n_vlc6 = 0;
  int n_t1 [4] = '{0, 0, 0, 0};
  int tcs [FW][FH][24];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && dut.u_level.vlcnum == 3'd6) n_vlc6++;

  function automatic int rand_level(int big);
    int m;
    if (big != 0 && $urandom_range(0, 9) == 0) m = $urandom_range(100, 2000);
    else if ($urandom_range(0, 2) == 0) m = $urandom_range(2, 20);
    else m = 1;
    return $urandom_range(0, 1) ? m : -m;
  endfunction

  task automatic run_block(int mx, int my, int blk_idx, bit intra16, int cb);
    int c[16];
    blk_type_t t;
    int maxc, sb, nc, tc, t1, cls, cyc, nnz, density;
    bit cs;
    string exp_bits, got_bits;
    // type and position
    if (intra16 && blk_idx == 0)      begin t = BT_LUMA_DC;   maxc = 16; sb = 0; end
    else if (blk_idx <= 16)           begin t = intra16 ? BT_LUMA_AC : BT_LUMA; maxc = intra16 ? 15 : 16; sb = blk_idx - 1; end
    else if (blk_idx <= 18)           begin t = BT_CHROMA_DC; maxc = 4;  sb = (blk_idx == 17) ? 16 : 20; end
    else                              begin t = BT_CHROMA_AC; maxc = 15; sb = blk_idx - 3; end
    // coefficients
    foreach (c[i]) c[i] = 0;
    density = $urandom_range(0, 5);
    if (density == 5) nnz = maxc;
    else if (density == 0) nnz = 0;
    else nnz = $urandom_range(1, maxc);
    for (int k = 0; k < nnz; k++) c[$urandom_range(0, maxc - 1)] = rand_level(1);
    if (density == 5) for (int i = 0; i < maxc; i++) if (c[i] == 0) c[i] = rand_level(0);
    // CBP skip, as the standard defines it
    case (t)
      BT_LUMA_AC:   cs = (cb[3:0] == 0);
      BT_LUMA:      cs = !cb[sb / 4];
      BT_CHROMA_DC: cs = (cb[5:4] == 0);
      BT_CHROMA_AC: cs = (cb[5:4] != 2);
      default:      cs = 0;
    endcase
    // nC from the testbench's own TotalCoeff record
    if (t == BT_CHROMA_DC) nc = -1;
    else begin
      bit ta, la;
      int nu, nl;
      ta = !NB_TOPX[sb] || my > 0;
      la = !NB_LEFTX[sb] || mx > 0;
      nu = ta ? (NB_TOPX[sb] ? tcs[mx][my-1][NB_TOP[sb]] : tcs[mx][my][NB_TOP[sb]]) : 0;
      nl = la ? (NB_LEFTX[sb] ? tcs[mx-1][my][NB_LEFT[sb]] : tcs[mx][my][NB_LEFT[sb]]) : 0;
      nc = (ta && la) ? (nu + nl + 1) / 2 : la ? nl : ta ? nu : 0;
    end
    exp_bits = cs ? "" : cavlc_block(c, maxc, nc, tc, t1);
    if (cs) begin tc = 0; t1 = 0; end
    cls = cs ? 0 : (tc == 0) ? 1 : 2;
    if (t == BT_LUMA || t == BT_LUMA_AC || t == BT_CHROMA_AC) tcs[mx][my][sb] = tc;
    // drive: cycle 0 idle, cycle 1 block info, cycle 2 coefficients
    got_bits = "";
    cyc = 0;
    @(posedge clk); #1 blk_start = 0;
    @(negedge clk); cyc++;
    @(posedge clk); #1 blk_start = 1; block_type = t; block_idx = 5'(sb); mb_x = 7'(mx); mb_y = 7'(my); cbp = 6'(cb);
    @(negedge clk); cyc++;
    @(posedge clk); #1 blk_start = 0;
    for (int i = 0; i < 16; i++) cof[i] = coef_t'(c[i]);
    forever begin
      @(negedge clk); cyc++;
      if (cw.valid) got_bits = {got_bits, bin(cw.word >> (32 - cw.len), int'(cw.len))};
      if (blk_done) break;
      @(posedge clk); #1;
    end
    checks++;
    if (got_bits != exp_bits) begin
      failures++;
      $display("FAIL mb(%0d,%0d) blk %0d type %s nc %0d: got %s exp %s", mx, my, blk_idx, t.name(), nc, got_bits, exp_bits);
    end
    checks++;
    if (cyc != cycles(cls, tc, t1)) begin
      failures++;
      $display("FAIL cycles mb(%0d,%0d) blk %0d: got %0d exp %0d (tc %0d t1 %0d)", mx, my, blk_idx, cyc, cycles(cls, tc, t1), tc, t1);
    end
    checks++;
    if (int'(blk_class) != cls) begin
      failures++;
      $display("FAIL class blk %0d: got %0d exp %0d", blk_idx, blk_class, cls);
    end
    if (cls == 0) n_cs++; else if (cls == 1) n_nszb++; else begin n_naz++; n_t1[t1]++; end
    if (tc == maxc) n_full++;
    foreach (c[i]) if (iabs(c[i]) >= 100) n_esc++;
  endtask

  initial begin
    blk_start = 0; block_type = BT_LUMA; block_idx = 0; mb_x = 0; mb_y = 0; cbp = 0; cof = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int pass = 0; pass < 3; pass++)
      for (int my = 0; my < FH; my++)
        for (int mx = 0; mx < FW; mx++) begin
          bit intra16;
          int cb;
          intra16 = ($urandom_range(0, 2) == 0);
          cb = ($urandom_range(0, 3) == 0) ? 6'h2f : int'($urandom_range(0, 15)) | (int'($urandom_range(0, 2)) << 4);
          for (int b = intra16 ? 0 : 1; b <= 26; b++) run_block(mx, my, b, intra16, cb);
        end
    $display("blocks: CS %0d NSZB %0d NAZ %0d; trailing ones 0/1/2/3: %0d/%0d/%0d/%0d; full %0d; large levels %0d; vlcnum=6 cycles %0d",
             n_cs, n_nszb, n_naz, n_t1[0], n_t1[1], n_t1[2], n_t1[3], n_full, n_esc, n_vlc6);
    checks++; if (n_cs == 0 || n_nszb == 0 || n_naz == 0) failures++;
    checks++; if (n_t1[0] == 0 || n_t1[1] == 0 || n_t1[2] == 0 || n_t1[3] == 0) failures++;
    checks++; if (n_full == 0 || n_esc == 0 || n_vlc6 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end testbench of entropy_coding_top at its default parameters.
// Codes two full macro-block rows of a 1080p-wide frame (120 x 2 macro-blocks):
// for each macro-block, random Intra16x16 / other type and random coefficients
// (with all-zero sub-blocks and 8x8 groups so that CBP skips happen) are written
// through the transform-stage ports, header elements are coded through the
// Exp-Golomb port (some macro-blocks get bursts of long zero runs to provoke
// emulation prevention), then the macro-block is entropy coded.
// Checks, against a reference written in the testbench:
//  - the coded block pattern of every macro-block;
//  - the cycle count of every macro-block (sum of 3 / 6 / 9 + x + y per sub-block);
//  - the complete output: emulation prevention bytes removed from the 32-bit
//    words, followed by the flushed tail, must equal the reference bit string,
//    and no 00 00 0x (x <= 2) may remain in the words.
// Also counts CBP-skipped, all-zero and nonzero sub-blocks, trailing-one counts,
// emulation insertions, neighbours from the row above, and fails if any is never seen.
module tb_entropy_coding_top;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  localparam int FW = 120, FH = 2;

  logic         clk = 0, rst_n = 0;
  logic         mb_clear, intra16x16, pe_we, ldc_we;
  logic [4:0]   pe_sb_index;
  logic [223:0] luma_cof, ldc_cof;
  logic [191:0] chroma_cof;
  logic [55:0]  u_dc, v_dc;
  logic [5:0]   cbp;
  logic [6:0]   mb_x, mb_y;
  logic         hdr_valid, hdr_intra, esi_enable, flush;
  logic [1:0]   hdr_mode;
  logic [15:0]  hdr_data;
  logic         esi_busy, mb_done, blk_done, bs_valid, packer_idle;
  blk_class_t   blk_class;
  logic [31:0]  bs_word;
  logic [5:0]   bs_len;

  entropy_coding_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cls [3] = '{0, 0, 0};
  int n_t1 [4] = '{0, 0, 0, 0};
  int n_intra = 0, n_inter = 0, n_top_nb = 0, n_emu = 0, n_hdr = 0, n_tail = 0;
  int tcs [FW][FH][24];
  bit ref_bits [$];
  byte unsigned out_bytes [$];
  bit  tail_bits [$];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect the packer output
  always @(posedge clk) if (rst_n && bs_valid) begin
    if (bs_len == 6'd32) for (int i = 3; i >= 0; i--) out_bytes.push_back(bs_word[8*i +: 8]);
    else begin
      for (int i = 31; i > 31 - int'(bs_len); i--) tail_bits.push_back(bs_word[i]);
      n_tail++;
    end
  end

  always @(posedge clk) if (rst_n && blk_done) n_cls[blk_class]++;

  function automatic void push_str(string s);
    for (int i = 0; i < s.len(); i++) ref_bits.push_back(s[i] == "1");
  endfunction

  // zigzag scan as (row, column); label = 4*column + row
  localparam int ZR [16] = '{0,0,1,2,1,0,0,1,2,3,3,2,1,2,3,3};
  localparam int ZC [16] = '{0,1,0,0,1,2,3,2,1,0,1,2,3,3,2,3};

  function automatic int rnd_coef(int dens, int maxmag);
    int m;
    if ($urandom_range(0, 99) >= dens) return 0;
    m = ($urandom_range(0, 3) != 0) ? 1 : $urandom_range(2, maxmag);
    return $urandom_range(0, 1) ? m : -m;
  endfunction

  task automatic hdr(int mode, int data, bit intra);
    @(posedge clk); #1 hdr_valid = 1; hdr_mode = 2'(mode); hdr_data = 16'(data); hdr_intra = intra;
    case (mode)
      0: push_str(ue(data));
      1: push_str(se(data));
      default: push_str(me_cbp(data, intra));
    endcase
    n_hdr++;
    @(posedge clk); #1 hdr_valid = 0;
  endtask

  task automatic do_mb(int mx, int my);
    int luma [16][16];   // [block][label]
    int ldc [16];
    int chro [8][16];
    int cdc [2][4];
    bit intra16;
    int dens, ecbp, exp_cyc, cyc, maxc, sb, nc, tc, t1, c[16], cls;
    bit cs, hit_top;
    intra16 = ($urandom_range(0, 3) == 0);
    if (intra16) n_intra++; else n_inter++;
    dens = $urandom_range(0, 3) * 10;
    // coefficients (label order)
    for (int b = 0; b < 16; b++) begin
      bit zero_grp;
      zero_grp = ($urandom_range(0, 3) == 0);
      for (int l = 0; l < 16; l++) luma[b][l] = zero_grp ? 0 : rnd_coef(dens, 40);
    end
    for (int b = 0; b < 16; b++) if ($urandom_range(0, 2) == 0) for (int l = 0; l < 16; l++) luma[b][l] = 0;
    for (int g = 0; g < 4; g++) if ($urandom_range(0, 3) == 0)
      for (int b = 4 * g; b < 4 * g + 4; b++) for (int l = 0; l < 16; l++) luma[b][l] = 0;
    for (int l = 0; l < 16; l++) ldc[l] = rnd_coef(50, 2000);
    for (int b = 0; b < 8; b++) for (int l = 0; l < 16; l++) chro[b][l] = ($urandom_range(0, 1) == 0) ? 0 : rnd_coef(dens / 2, 30);
    for (int b = 0; b < 2; b++) for (int l = 0; l < 4; l++) cdc[b][l] = ($urandom_range(0, 1) == 0) ? 0 : rnd_coef(50, 200);
    // label 0 of AC words is not a coefficient: fill with junk
    for (int b = 0; b < 8; b++) chro[b][0] = $urandom_range(0, 100);
    if (intra16) for (int b = 0; b < 16; b++) luma[b][0] = $urandom_range(0, 100);
    // reference coded block pattern
    ecbp = 0;
    for (int b = 0; b < 16; b++) for (int l = (intra16 ? 1 : 0); l < 16; l++) if (luma[b][l] != 0) ecbp |= 1 << (b / 4);
    begin
      bit acnz, dcnz;
      acnz = 0; dcnz = 0;
      for (int b = 0; b < 8; b++) for (int l = 1; l < 16; l++) if (chro[b][l] != 0) acnz = 1;
      for (int b = 0; b < 2; b++) for (int l = 0; l < 4; l++) if (cdc[b][l] != 0) dcnz = 1;
      ecbp |= (acnz ? 2 : dcnz ? 1 : 0) << 4;
    end
    // write into the residual buffer
    @(posedge clk); #1 mb_clear = 1; intra16x16 = intra16; mb_x = 7'(mx); mb_y = 7'(my);
    @(posedge clk); #1 mb_clear = 0;
    for (int s = 0; s < 26; s++) begin
      pe_we = 1; pe_sb_index = 5'(s);
      luma_cof = '0; chroma_cof = '0; u_dc = '0; v_dc = '0;
      if (s < 16) for (int l = 0; l < 16; l++) luma_cof[14*(15-l) +: 14] = 14'(luma[s][l]);
      else if (s == 16) for (int l = 0; l < 4; l++) u_dc[14*(3-l) +: 14] = 14'(cdc[0][l]);
      else if (s == 17) for (int l = 0; l < 4; l++) v_dc[14*(3-l) +: 14] = 14'(cdc[1][l]);
      else for (int l = 0; l < 16; l++) chroma_cof[12*(15-l) +: 12] = 12'(chro[s-18][l]);
      @(posedge clk); #1;
    end
    pe_we = 0;
    ldc_we = intra16;
    for (int l = 0; l < 16; l++) ldc_cof[14*(15-l) +: 14] = 14'(ldc[l]);
    @(posedge clk); #1 ldc_we = 0;
    checks++;
    if (int'(cbp) != ecbp) begin
      failures++;
      $display("FAIL cbp mb(%0d,%0d): got %0d exp %0d", mx, my, cbp, ecbp);
    end
    // header: mb_type, optional coded_block_pattern, mb_qp_delta, optional zero bursts
    hdr(0, intra16 ? $urandom_range(1, 24) : $urandom_range(0, 4), 0);
    if (!intra16) begin
      bit ci;
      ci = $urandom_range(0, 1);
      hdr(2, ecbp, ci);
    end
    hdr(1, int'($urandom_range(0, 20)) - 10, 0);
    if ($urandom_range(0, 2) == 0) repeat ($urandom_range(2, 5)) hdr(0, 32767, 0);
    // reference residual bits and cycles
    exp_cyc = 0;
    for (int bi = intra16 ? 0 : 1; bi <= 26; bi++) begin
      foreach (c[i]) c[i] = 0;
      if (bi == 0) begin
        maxc = 16; sb = 0;
        for (int k = 0; k < 16; k++) c[k] = ldc[4*ZC[k] + ZR[k]];
        cs = 0;
      end else if (bi <= 16) begin
        sb = bi - 1;
        maxc = intra16 ? 15 : 16;
        for (int k = 0; k < maxc; k++) begin
          int z;
          z = intra16 ? k + 1 : k;
          c[k] = luma[sb][4*ZC[z] + ZR[z]];
        end
        cs = intra16 ? ((ecbp & 15) == 0) : (((ecbp >> (sb / 4)) & 1) == 0);
      end else if (bi <= 18) begin
        maxc = 4; sb = (bi == 17) ? 16 : 20;
        c[0] = cdc[bi-17][0]; c[1] = cdc[bi-17][2]; c[2] = cdc[bi-17][1]; c[3] = cdc[bi-17][3];
        cs = ((ecbp >> 4) == 0);
      end else begin
        maxc = 15; sb = bi - 3;
        for (int k = 0; k < 15; k++) c[k] = chro[bi-19][4*ZC[k+1] + ZR[k+1]];
        cs = ((ecbp >> 4) != 2);
      end
      if (bi == 17 || bi == 18) nc = -1;
      else begin
        bit ta, la;
        int nu, nl;
        ta = !NB_TOPX[sb] || my > 0;
        la = !NB_LEFTX[sb] || mx > 0;
        if (NB_TOPX[sb] && my > 0) hit_top = 1;
        nu = ta ? (NB_TOPX[sb] ? tcs[mx][my-1][NB_TOP[sb]] : tcs[mx][my][NB_TOP[sb]]) : 0;
        nl = la ? (NB_LEFTX[sb] ? tcs[mx-1][my][NB_LEFT[sb]] : tcs[mx][my][NB_LEFT[sb]]) : 0;
        nc = (ta && la) ? (nu + nl + 1) / 2 : la ? nl : ta ? nu : 0;
      end
      if (cs) begin tc = 0; t1 = 0; end
      else push_str(cavlc_block(c, maxc, nc, tc, t1));
      if (bi != 0 && bi != 17 && bi != 18) tcs[mx][my][sb] = tc;
      cls = cs ? 0 : (tc == 0) ? 1 : 2;
      if (cls == 2) n_t1[t1]++;
      exp_cyc += cycles(cls, tc, t1);
    end
    if (hit_top) n_top_nb++;
    // entropy code the macro-block
    @(posedge clk); #1 esi_enable = 1;
    @(posedge clk); #1 esi_enable = 0;
    cyc = 1;
    while (!mb_done) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL cycles mb(%0d,%0d): got %0d exp %0d", mx, my, cyc, exp_cyc);
    end
  endtask

  initial begin
    mb_clear = 0; intra16x16 = 0; pe_we = 0; ldc_we = 0; pe_sb_index = 0; luma_cof = '0; ldc_cof = '0;
    chroma_cof = '0; u_dc = '0; v_dc = '0; mb_x = 0; mb_y = 0; hdr_valid = 0; hdr_intra = 0;
    hdr_mode = 0; hdr_data = 0; esi_enable = 0; flush = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int my = 0; my < FH; my++) for (int mx = 0; mx < FW; mx++) do_mb(mx, my);
    repeat (4) @(posedge clk);
    #1 flush = 1;
    @(posedge clk); #1 flush = 0;
    repeat (6) @(posedge clk);
    // compare: de-emulated words + tail == reference
    begin
      bit got [$];
      int z;
      z = 0;
      for (int i = 0; i < out_bytes.size(); i++) begin
        if (z >= 2 && out_bytes[i] <= 2) begin
          failures++;
          $display("FAIL start-code emulation at output byte %0d: %h %h %h %h %h", i, out_bytes[i-3], out_bytes[i-2], out_bytes[i-1], out_bytes[i], out_bytes[i+1]);
        end
        if (z >= 2 && out_bytes[i] == 3) begin
          n_emu++;
          z = 0;
          continue;
        end
        for (int j = 7; j >= 0; j--) got.push_back(out_bytes[i][j]);
        z = (out_bytes[i] == 0) ? z + 1 : 0;
      end
      foreach (tail_bits[i]) got.push_back(tail_bits[i]);
      checks++;
      if (got.size() != ref_bits.size()) begin
        failures++;
        $display("FAIL stream length: got %0d bits exp %0d", got.size(), ref_bits.size());
      end
      for (int i = 0; i < got.size() && i < ref_bits.size(); i++) begin
        checks++;
        if (got[i] != ref_bits[i]) begin
          failures++;
          $display("FAIL stream bit %0d differs", i);
          break;
        end
      end
    end
    $display("sub-blocks CS %0d NSZB %0d NAZ %0d; T1 0/1/2/3 %0d/%0d/%0d/%0d; MBs intra16 %0d other %0d; top-row neighbours %0d; header codes %0d; emulation bytes %0d; flushes %0d; bits %0d",
             n_cls[0], n_cls[1], n_cls[2], n_t1[0], n_t1[1], n_t1[2], n_t1[3], n_intra, n_inter, n_top_nb, n_hdr, n_emu, n_tail, ref_bits.size());
    checks++; if (n_cls[0] == 0 || n_cls[1] == 0 || n_cls[2] == 0) failures++;
    checks++; if (n_t1[0] == 0 || n_t1[1] == 0 || n_t1[2] == 0 || n_t1[3] == 0) failures++;
    checks++; if (n_intra == 0 || n_inter == 0 || n_top_nb == 0) failures++;
    checks++; if (n_emu == 0 || n_tail != 1 || n_hdr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

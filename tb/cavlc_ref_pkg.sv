// Reference model for the testbenches: H.264 CAVLC coding of one block written
// directly from the standard's rules, producing the bits as a '0'/'1' string,
// plus Exp-Golomb codes, the neighbour address table, and the expected cycle
// counts of the encoder (CS 3, NSZB 6, NAZ 9 + x + y).
package cavlc_ref_pkg;
  import cavlc_ref_tables_pkg::*;

  function automatic string bin(longint unsigned v, int n);
    string s = "";
    for (int i = n - 1; i >= 0; i--) s = {s, ((v >> i) & 1) ? "1" : "0"};
    return s;
  endfunction

  function automatic string zeros(int n);
    string s = "";
    repeat (n) s = {s, "0"};
    return s;
  endfunction

  // Unsigned / signed Exp-Golomb
  function automatic string ue(longint unsigned v);
    int m = 0;
    while (((v + 1) >> (m + 1)) != 0) m++;
    return {zeros(m), bin(v + 1, m + 1)};
  endfunction

  function automatic string se(int v);
    return ue(v > 0 ? 2 * v - 1 : -2 * v);
  endfunction

  // coded_block_pattern -> codeNum, columns Intra_4x4 and Inter (4:2:0)
  localparam int CBP_INTRA [48] = '{47,31,15,0,23,27,29,30,7,11,13,14,39,43,45,46,16,3,5,10,12,19,21,26,
                                    28,35,37,42,44,1,2,4,8,17,18,20,24,6,9,22,25,32,33,34,36,40,38,41};
  localparam int CBP_INTER [48] = '{0,16,1,2,4,8,32,3,5,10,12,15,47,7,11,13,14,6,9,31,35,37,42,44,
                                    33,34,36,40,39,43,45,46,17,18,20,24,19,21,26,28,23,27,29,30,22,25,38,41};
  function automatic string me_cbp(int cbp, bit intra);
    for (int k = 0; k < 48; k++)
      if ((intra ? CBP_INTRA[k] : CBP_INTER[k]) == cbp) return ue(k);
    return "";
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // The top n bits of a left-aligned 32-bit codeword, as a bit string.
  function automatic string w2s(logic [31:0] w, int n);
    return (n == 0) ? "" : bin(64'(w >> (32 - n)), n);
  endfunction

  // CAVLC bits of a block given as Array_Coeff (scan order, maxc entries used).
  // nc = -1 for chroma DC. Returns TotalCoeff and TrailingOnes as well.
  function automatic string cavlc_block(int c[16], int maxc, int nc, output int tc, output int t1);
    string s;
    int nz_idx [$];
    int col, tzeros, sl, lvl_i, zl, run, lc, prefix, ssize, suffix, a;
    tc = 0; t1 = 0;
    for (int i = maxc - 1; i >= 0; i--) if (c[i] != 0) nz_idx.push_back(i);   // high to low
    tc = nz_idx.size();
    foreach (nz_idx[k]) begin
      if (t1 < 3 && k == t1 && iabs(c[nz_idx[k]]) == 1) t1++;
    end
    col = (nc < 0) ? 4 : (nc < 2) ? 0 : (nc < 4) ? 1 : (nc < 8) ? 2 : 3;
    s = CT[col][t1][tc];
    if (tc == 0) return s;
    for (int k = 0; k < t1; k++) s = {s, c[nz_idx[k]] < 0 ? "1" : "0"};
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int k = t1; k < tc; k++) begin
      a  = iabs(c[nz_idx[k]]);
      lc = (c[nz_idx[k]] > 0) ? 2 * a - 2 : 2 * a - 1;
      if (k == t1 && t1 < 3) lc -= 2;
      if (sl == 0) begin
        if (lc < 14)      begin prefix = lc; ssize = 0;  suffix = 0;       end
        else if (lc < 30) begin prefix = 14; ssize = 4;  suffix = lc - 14; end
        else              begin prefix = 15; ssize = 12; suffix = lc - 30; end
      end else begin
        if (lc < (15 << sl)) begin prefix = lc >> sl; ssize = sl; suffix = lc % (1 << sl); end
        else                 begin prefix = 15; ssize = 12; suffix = lc - (15 << sl);     end
      end
      s = {s, zeros(prefix), "1", bin(suffix, ssize)};
      if (sl == 0) sl = 1;
      if (a > (3 << (sl - 1)) && sl < 6) sl++;
    end
    tzeros = nz_idx[0] + 1 - tc;
    if (tc < maxc) begin
      if (nc == -1) s = {s, TZC[tc-1][tzeros]};
      else          s = {s, TZ[tc-1][tzeros]};
    end
    zl = tzeros;
    for (int k = 0; k < tc - 1 && zl > 0; k++) begin
      run = nz_idx[k] - nz_idx[k+1] - 1;
      s = {s, RB[(zl > 6 ? 7 : zl) - 1][run]};
      zl -= run;
    end
    return s;
  endfunction

  // Expected encoder cycles per sub-block class (0 CS, 1 NSZB, 2 NAZ).
  function automatic int cycles(int cls, int tc, int t1);
    int x;
    if (cls == 0) return 3;
    if (cls == 1) return 6;
    x = (t1 == 0) ? 0 : (t1 == 1) ? 1 : 2;
    return 9 + x + (tc - t1 + 1);
  endfunction

  // Neighbour address table: {top sb, top in macro-block above, left sb, left in left macro-block}
  localparam int NB_TOP  [24] = '{10,11,0,1,14,15,4,5,2,3,8,9,6,7,12,13,18,19,16,17,22,23,20,21};
  localparam bit NB_TOPX [24] = '{1,1,0,0,1,1,0,0,0,0,0,0,0,0,0,0,1,1,0,0,1,1,0,0};
  localparam int NB_LEFT [24] = '{5,0,7,2,1,4,3,6,13,8,15,10,9,12,11,14,17,16,19,18,21,20,23,22};
  localparam bit NB_LEFTX[24] = '{1,0,1,0,0,0,0,0,1,0,1,0,0,0,0,0,1,0,1,0,1,0,1,0};

endpackage

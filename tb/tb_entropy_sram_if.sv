// Self-checking testbench of entropy_sram_if, with residual_buffer as its
// memory. For each macro-block, random coefficients are written into the
// residual buffer; the interface is enabled and a model of the encoder answers
// each blk_start with blk_done after a random number of cycles (as early as the
// next cycle, as for a CBP-skipped sub-block). Checked: the order of sub-blocks
// (luma DC only for Intra16x16, 16 luma, U DC, V DC, 4 U AC, 4 V AC), the block
// type and block index of each, the sixteen coefficients on 'cof' in the cycle
// after blk_start, in scan order (zigzag from a raster-position list; 2x2 raster
// for chroma DC; AC blocks without their DC entry), the two-cycle gap from
// blk_done to the next blk_start, and one mb_done per macro-block.
module tb_entropy_sram_if;
  import cavlc_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         esi_enable, intra16x16, busy, mb_done, blk_start, blk_done;
  logic [4:0]   blk_idx_cur, block_idx;
  logic [1:0]   fetch_step_cur;
  logic         luma_re, chroma_re;
  logic [3:0]   luma_raddr;
  logic [2:0]   chroma_raddr;
  logic [223:0] sram_luma_data, reg_luma_dc;
  logic [191:0] sram_chroma_data;
  logic [55:0]  reg_chro_dcu, reg_chro_dcv;
  blk_type_t    block_type;
  coef_arr_t    cof;

  logic         luma_we, chroma_we, ldc_we, cdcu_we, cdcv_we;
  logic [3:0]   luma_waddr;
  logic [2:0]   chroma_waddr;
  logic [223:0] luma_wdata, ldc_wdata;
  logic [191:0] chroma_wdata;
  logic [55:0]  cdcu_wdata, cdcv_wdata;

  entropy_sram_if dut (.*);
  residual_buffer u_rb (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_mb_done = 0;
  // zigzag scan as raster positions (4 * row + column)
  localparam int ZZ_RASTER [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};
  int luma [16][4][4], chroma [8][4][4], ldc [4][4], cdc [2][2][2];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && mb_done) n_mb_done++;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, exp);
    end
  endtask

  // a 4x4 block as a word: coefficient (row r, column c) is label 4c + r,
  // label 0 in the most significant field
  function automatic logic [223:0] pack4(int b [4][4], int w);
    logic [223:0] v = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        for (int i = 0; i < w; i++) v[w * (15 - (4 * c + r)) + i] = b[r][c][i];
    return v;
  endfunction

  function automatic int rnd(int w);
    int m = $urandom_range(0, 3) == 0 ? $urandom_range(0, (1 << (w - 1)) - 1) : $urandom_range(0, 3);
    if ($urandom_range(0, 2) == 0) m = 0;
    return $urandom_range(0, 1) ? -m : m;
  endfunction

  initial begin
    int exp_c [16];
    int expect_idx, gap, wait_n, ofs, r, c;
    blk_type_t et;
    int ei;
    esi_enable = 0; intra16x16 = 0; blk_done = 0;
    {luma_we, chroma_we, ldc_we, cdcu_we, cdcv_we} = '0;
    luma_waddr = 0; chroma_waddr = 0; luma_wdata = 0; chroma_wdata = 0;
    ldc_wdata = 0; cdcu_wdata = 0; cdcv_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int mb = 0; mb < 60; mb++) begin
      // fill the residual buffer
      for (int b = 0; b < 16; b++) begin
        foreach (luma[b][r, c]) luma[b][r][c] = rnd(14);
        if (b < 8) foreach (chroma[b][r, c]) chroma[b][r][c] = rnd(12);
        luma_we = 1; luma_waddr = 4'(b); luma_wdata = pack4(luma[b], 14);
        chroma_we = (b < 8); chroma_waddr = 3'(b); chroma_wdata = 192'(pack4(chroma[b], 12));
        @(negedge clk);
      end
      luma_we = 0; chroma_we = 0;
      foreach (ldc[r, c]) ldc[r][c] = rnd(14);
      foreach (cdc[p, r, c]) cdc[p][r][c] = rnd(14);
      ldc_we = 1; ldc_wdata = pack4(ldc, 14);
      cdcu_we = 1; cdcv_we = 1;
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++) begin
          cdcu_wdata[14 * (3 - (2 * c + r)) +: 14] = 14'(cdc[0][r][c]);
          cdcv_wdata[14 * (3 - (2 * c + r)) +: 14] = 14'(cdc[1][r][c]);
        end
      @(negedge clk);
      {ldc_we, cdcu_we, cdcv_we} = '0;
      // run the macro-block
      intra16x16 = $urandom_range(0, 1);
      esi_enable = 1;
      @(negedge clk);
      esi_enable = 0;
      expect_idx = intra16x16 ? 0 : 1;
      gap = 0;
      while (expect_idx <= 26) begin
        if (!blk_start) begin
          gap++;
          if (gap > 5) begin check("blk_start missing", 0, 1); break; end
          @(negedge clk);
          continue;
        end
        if (expect_idx != (intra16x16 ? 0 : 1)) check("cycles from blk_done to blk_start", gap, 2);
        if (expect_idx == 0)       begin et = BT_LUMA_DC; ei = 0; end
        else if (expect_idx <= 16) begin et = intra16x16 ? BT_LUMA_AC : BT_LUMA; ei = expect_idx - 1; end
        else if (expect_idx <= 18) begin et = BT_CHROMA_DC; ei = (expect_idx == 17) ? 16 : 20; end
        else                       begin et = BT_CHROMA_AC; ei = expect_idx - 3; end
        check($sformatf("block type of %0d", expect_idx), int'(block_type), int'(et));
        check($sformatf("block index of %0d", expect_idx), int'(block_idx), ei);
        foreach (exp_c[k]) exp_c[k] = 0;
        ofs = (et == BT_LUMA_AC || et == BT_CHROMA_AC) ? 1 : 0;
        if (et == BT_CHROMA_DC)
          for (int k = 0; k < 4; k++) exp_c[k] = cdc[expect_idx - 17][k / 2][k % 2];
        else
          for (int k = 0; k + ofs < 16; k++) begin
            r = ZZ_RASTER[k + ofs] / 4; c = ZZ_RASTER[k + ofs] % 4;
            exp_c[k] = (et == BT_LUMA_DC) ? ldc[r][c] :
                       (et == BT_CHROMA_AC) ? chroma[expect_idx - 19][r][c] : luma[expect_idx - 1][r][c];
          end
        @(negedge clk);
        for (int k = 0; k < 16; k++)
          check($sformatf("block %0d coefficient %0d", expect_idx, k), int'(cof[k]), exp_c[k]);
        wait_n = $urandom_range(0, 12);
        repeat (wait_n) @(negedge clk);
        blk_done = 1;
        @(negedge clk);
        blk_done = 0;
        gap = 1;
        expect_idx++;
      end
      repeat (3) @(negedge clk);
      check("busy after the macro-block", int'(busy), 0);
      check("mb_done count", n_mb_done, mb + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

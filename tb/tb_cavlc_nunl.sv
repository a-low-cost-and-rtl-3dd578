// Self-checking testbench of cavlc_nunl together with sram_nonzero. A 5 x 4
// macro-block frame is walked in coding order; for every sub-block the unit is
// driven as the encoder controller drives it (top read, left read, one cycle to
// capture, then nC valid) and nC is compared with a value computed here from the
// testbench's own record of TotalCoeff and the neighbour address table (top and
// left neighbour of each of the 24 sub-blocks, and whether it lies in the
// macro-block above / to the left). A random TotalCoeff is then written back.
// Intra16x16 luma DC blocks (nC of sub-block 0) and chroma DC blocks (nC = -1)
// are mixed in; DC blocks must not be stored.
module tb_cavlc_nunl;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  localparam int FW = 5, FH = 4;

  logic              clk = 0, rst_n = 0;
  logic              rd_top, rd_left, wr_tc;
  logic [4:0]        tc_wdata, blk_idx_cur, sram_rdata, sram_wdata;
  blk_type_t         blk_typ_cur;
  logic [6:0]        mb_x_cur, mb_y_cur;
  logic              sram_en, sram_we;
  logic [11:0]       sram_addr;
  logic signed [5:0] nc;

  cavlc_nunl dut (.*);
  sram_nonzero u_sram (.clk(clk), .en(sram_en), .we(sram_we), .addr(sram_addr),
                       .wdata(sram_wdata), .rdata(sram_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_both = 0, n_one = 0, n_none = 0;
  int tcs [FW][FH][24];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(int mx, int my, blk_type_t t, int sb, bit store);
    int nu, nl, ex;
    bit au, al;
    blk_typ_cur = t; blk_idx_cur = 5'(sb); mb_x_cur = 7'(mx); mb_y_cur = 7'(my);
    rd_top = 1;
    @(negedge clk);
    rd_top = 0; rd_left = 1;
    @(negedge clk);
    rd_left = 0;
    @(negedge clk);
    au = !NB_TOPX[sb] || my > 0;
    al = !NB_LEFTX[sb] || mx > 0;
    nu = au ? tcs[mx][NB_TOPX[sb] ? my - 1 : my][NB_TOP[sb]] : 0;
    nl = al ? tcs[NB_LEFTX[sb] ? mx - 1 : mx][my][NB_LEFT[sb]] : 0;
    if (t == BT_CHROMA_DC) ex = -1;
    else if (au && al) begin ex = (nu + nl + 1) >> 1; n_both++; end
    else if (au || al) begin ex = au ? nu : nl; n_one++; end
    else begin ex = 0; n_none++; end
    checks++;
    if (int'(nc) != ex) begin
      failures++;
      if (failures < 20)
        $display("FAIL mb (%0d,%0d) sb %0d type %0d: nC %0d want %0d", mx, my, sb, t, nc, ex);
    end
    wr_tc = 1; tc_wdata = 5'($urandom_range(0, 16));
    if ($urandom_range(0, 2) == 0) tc_wdata = 0;
    if (store) tcs[mx][my][sb] = int'(tc_wdata);
    @(negedge clk);
    wr_tc = 0;
  endtask

  initial begin
    bit i16;
    rd_top = 0; rd_left = 0; wr_tc = 0; tc_wdata = 0; blk_idx_cur = 0;
    blk_typ_cur = BT_LUMA; mb_x_cur = 0; mb_y_cur = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++)
      for (int my = 0; my < FH; my++)
        for (int mx = 0; mx < FW; mx++) begin
          i16 = $urandom_range(0, 1);
          if (i16) run_block(mx, my, BT_LUMA_DC, 0, 0);
          for (int sb = 0; sb < 16; sb++) run_block(mx, my, i16 ? BT_LUMA_AC : BT_LUMA, sb, 1);
          run_block(mx, my, BT_CHROMA_DC, 0, 0);
          run_block(mx, my, BT_CHROMA_DC, 1, 0);
          for (int sb = 16; sb < 24; sb++) run_block(mx, my, BT_CHROMA_AC, sb, 1);
        end
    $display("nC from both %0d, one %0d, no neighbour %0d", n_both, n_one, n_none);
    checks++;
    if (n_both == 0 || n_one == 0 || n_none == 0) begin failures++; $display("FAIL case missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

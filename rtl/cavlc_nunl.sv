// nC unit of the CAVLC encoder: neighbour TotalCoeff fetch, nC, and write-back.
// For the current sub-block (index 0..15 luma in z-order, 16..19 U, 20..23 V)
// the top and left neighbours are located: inside the macro-block, in the
// macro-block above (same column address X, which still holds the previous row),
// or in the macro-block to the left (column address X-1). A neighbour outside the
// frame (top row / left column of macro-blocks) is unavailable.
// Timing, driven by the controller:
//   rd_top  (cycle 2 of a sub-block): read address of the top neighbour;
//   rd_left (cycle 3): read address of the left neighbour; top value -> nu_cur;
//   next cycle: left value -> nl_cur; from the cycle after, 'nc' is valid:
//   both available: (nU + nL + 1) >> 1; one available: that one; none: 0;
//   CHROMA_DC: -1.
//   wr_tc: writes tc_wdata to {X, block index} for LUMA, LUMA_AC and CHROMA_AC
//   sub-blocks (DC sub-blocks are nobody's neighbour and are not stored).
// The read/write address pattern reproduces the neighbour address table of the
// design description; it is computed from block coordinates here.
module cavlc_nunl
  import cavlc_pkg::*;
#(
  parameter int unsigned MB_ADDR_W = 7,
  parameter int unsigned MB_Y_W    = 7
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rd_top,
  input  logic                  rd_left,
  input  logic                  wr_tc,
  input  logic [4:0]            tc_wdata,
  input  logic [4:0]            blk_idx_cur,
  input  blk_type_t             blk_typ_cur,
  input  logic [MB_ADDR_W-1:0]  mb_x_cur,
  input  logic [MB_Y_W-1:0]     mb_y_cur,
  output logic                  sram_en,
  output logic                  sram_we,
  output logic [MB_ADDR_W+4:0]  sram_addr,
  output logic [4:0]            sram_wdata,
  input  logic [4:0]            sram_rdata,
  output logic signed [5:0]     nc
);

  logic [4:0] top_sb, left_sb;
  logic       top_outside, left_outside;   // neighbour lies in another macro-block
  logic       top_avail, left_avail, storable;
  logic [4:0] nu_cur, nl_cur;
  logic       nu_avail_cur, nl_avail_cur;
  logic       rd_top_d, rd_left_d;

  // z-order luma block index of block column x, block row y
  function automatic logic [4:0] zidx(input logic [1:0] x, input logic [1:0] y);
    return {1'b0, y[1], x[1], y[0], x[0]};
  endfunction

  // Neighbour location from block coordinates.
  always_comb begin
    logic [1:0] bx, by;
    logic       cx, cy, comp;
    bx = {blk_idx_cur[2], blk_idx_cur[0]};
    by = {blk_idx_cur[3], blk_idx_cur[1]};
    comp = blk_idx_cur[2];
    cx   = blk_idx_cur[0];
    cy   = blk_idx_cur[1];
    if (!blk_idx_cur[4]) begin
      top_outside  = (by == 2'd0);
      left_outside = (bx == 2'd0);
      top_sb  = zidx(bx, by - 2'd1);   // row 0 wraps to row 3 of the macro-block above
      left_sb = zidx(bx - 2'd1, by);   // column 0 wraps to column 3 of the left one
    end else begin
      top_outside  = !cy;
      left_outside = !cx;
      top_sb  = {2'b10, comp, !cy, cx};
      left_sb = {2'b10, comp, cy, !cx};
    end
  end

  assign top_avail  = !top_outside  || (mb_y_cur != '0);
  assign left_avail = !left_outside || (mb_x_cur != '0);
  assign storable   = (blk_typ_cur == BT_LUMA) || (blk_typ_cur == BT_LUMA_AC) ||
                      (blk_typ_cur == BT_CHROMA_AC);

  always_comb begin
    sram_en    = rd_top || rd_left || (wr_tc && storable);
    sram_we    = wr_tc && storable;
    sram_wdata = tc_wdata;
    if (rd_top)       sram_addr = {mb_x_cur, top_sb};
    else if (rd_left) sram_addr = {left_outside ? mb_x_cur - 1'b1 : mb_x_cur, left_sb};
    else              sram_addr = {mb_x_cur, blk_idx_cur};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_top_d <= 1'b0; rd_left_d <= 1'b0;
      nu_cur <= '0; nl_cur <= '0; nu_avail_cur <= 1'b0; nl_avail_cur <= 1'b0;
    end else begin
      rd_top_d  <= rd_top;
      rd_left_d <= rd_left;
      if (rd_top)  nu_avail_cur <= top_avail;
      if (rd_left) nl_avail_cur <= left_avail;
      if (rd_top_d)  nu_cur <= sram_rdata;
      if (rd_left_d) nl_cur <= sram_rdata;
    end
  end

  always_comb begin
    if (blk_typ_cur == BT_CHROMA_DC)         nc = -6'sd1;
    else if (nu_avail_cur && nl_avail_cur)   nc = 6'(({1'b0, nu_cur} + {1'b0, nl_cur} + 6'd1) >> 1);
    else if (nl_avail_cur)                   nc = 6'(nl_cur);
    else if (nu_avail_cur)                   nc = 6'(nu_cur);
    else                                     nc = 6'sd0;
  end

endmodule

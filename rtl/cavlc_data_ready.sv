// Input stage of the CAVLC encoder.
// When the entropy SRAM interface starts a sub-block ('blk_start', fetch step 1)
// the block type, block index (0..23, the neighbour-table numbering), macro-block
// coordinates and coded block pattern are registered. One cycle later the sixteen
// coefficients arrive together in scan order ('cof'); in that same cycle the
// CBP-skip decision 'is_cs' is made from the registered block information:
//   LUMA_DC never skipped; LUMA_AC skipped when CBP[3:0] = 0; LUMA skipped when
//   the CBP bit of its 8x8 group (block index / 4) is 0; CHROMA_DC skipped when
//   CBP[5:4] = 0; CHROMA_AC skipped unless CBP[5:4] = 2.
// If the block is not skipped, 'load' stores all sixteen coefficients into the
// Input Buffer in one cycle, and 'nz_flags' (one comparator per coefficient)
// gives the Nonzero Index Table its contents at the same edge.
// Behaviour per the design description; port names are this design's.
module cavlc_data_ready
  import cavlc_pkg::*;
#(
  parameter int unsigned MB_X_W = 7,
  parameter int unsigned MB_Y_W = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              blk_start,
  input  blk_type_t         block_type,
  input  logic [4:0]        block_idx,
  input  logic [MB_X_W-1:0] mb_x,
  input  logic [MB_Y_W-1:0] mb_y,
  input  logic [5:0]        cbp,
  input  logic              load,
  input  coef_arr_t         cof,
  output blk_type_t         blk_typ_cur,
  output logic [4:0]        blk_idx_cur,
  output logic [MB_X_W-1:0] mb_x_cur,
  output logic [MB_Y_W-1:0] mb_y_cur,
  output logic [5:0]        cbp_cur,
  output logic              is_cs,
  output logic [15:0]       nz_flags,
  output coef_arr_t         input_buf
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_typ_cur <= BT_LUMA_DC;
      blk_idx_cur <= '0;
      mb_x_cur    <= '0;
      mb_y_cur    <= '0;
      cbp_cur     <= '0;
      input_buf   <= '0;
    end else begin
      if (blk_start) begin
        blk_typ_cur <= block_type;
        blk_idx_cur <= block_idx;
        mb_x_cur    <= mb_x;
        mb_y_cur    <= mb_y;
        cbp_cur     <= cbp;
      end
      if (load) input_buf <= cof;
    end
  end

  always_comb begin
    for (int i = 0; i < 16; i++) nz_flags[i] = (cof[i] != '0);
  end

  always_comb begin
    unique case (blk_typ_cur)
      BT_LUMA_AC:   is_cs = (cbp_cur[3:0] == 4'd0);
      BT_LUMA:      is_cs = !cbp_cur[{1'b0, blk_idx_cur[3:2]}];
      BT_CHROMA_DC: is_cs = (cbp_cur[5:4] == 2'd0);
      BT_CHROMA_AC: is_cs = (cbp_cur[5:4] != 2'd2);
      default:      is_cs = 1'b0;
    endcase
  end

endmodule

// Entropy SRAM Interface: walks the sub-blocks of a macro-block in coding order,
// fetches each from the residual buffer and hands it to the CAVLC encoder.
// BlkIdx_cur numbers the sub-blocks: 0 Intra16x16 luma DC, 1..16 luma (z-order
// block BlkIdx-1), 17 U DC, 18 V DC, 19..22 U AC, 23..26 V AC. 'esi_enable'
// starts a macro-block at BlkIdx 0 (Intra16x16) or 1 (otherwise).
// fetch_step_cur runs 0 (BlkIdx updated), 1 (read address to the residual buffer;
// 'blk_start' with block type and block index to the encoder), 2 (read data ready:
// the q_cof selector picks Luma SRAM, Chroma SRAM, LDC, CDCU or CDCV by BlkIdx
// and reorders the word into scan order on 'cof'), 3 (the encoder owns the
// sub-block). On the encoder's 'blk_done' (which may already come in step 2 for a
// CBP-skipped block) the next sub-block starts; after BlkIdx 26, 'mb_done' pulses.
// Scan order: zigzag for 4x4 blocks (the AC types drop label 0, so scan entry k
// holds zigzag position k+1 and entry 15 is zero), raster for the 2x2 chroma DC,
// remaining entries zero.
// Step schedule per the design description; the packing into scan order here,
// rather than in the encoder, is this design's choice.
module entropy_sram_if
  import cavlc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         esi_enable,
  input  logic         intra16x16,
  output logic         busy,
  output logic         mb_done,
  output logic [4:0]   blk_idx_cur,
  output logic [1:0]   fetch_step_cur,
  // residual buffer
  output logic         luma_re,
  output logic [3:0]   luma_raddr,
  output logic         chroma_re,
  output logic [2:0]   chroma_raddr,
  input  logic [223:0] sram_luma_data,
  input  logic [191:0] sram_chroma_data,
  input  logic [223:0] reg_luma_dc,
  input  logic [55:0]  reg_chro_dcu,
  input  logic [55:0]  reg_chro_dcv,
  // CAVLC encoder
  output logic         blk_start,
  output blk_type_t    block_type,
  output logic [4:0]   block_idx,
  output coef_arr_t    cof,
  input  logic         blk_done
);

  logic intra_cur, active;

  // field of label n in a 16-coefficient word of width w
  function automatic coef_t field16(input logic [223:0] wd, input int unsigned w, input logic [3:0] n);
    logic [13:0] f;
    f = 14'(wd >> (w * (15 - 32'(n))));
    return (w == 12) ? coef_t'($signed(f[11:0])) : coef_t'($signed(f[13:0]));
  endfunction

  always_comb begin
    if (blk_idx_cur == 5'd0)       begin block_type = BT_LUMA_DC;   block_idx = 5'd0; end
    else if (blk_idx_cur <= 5'd16) begin block_type = intra_cur ? BT_LUMA_AC : BT_LUMA; block_idx = blk_idx_cur - 5'd1; end
    else if (blk_idx_cur == 5'd17) begin block_type = BT_CHROMA_DC; block_idx = 5'd16; end
    else if (blk_idx_cur == 5'd18) begin block_type = BT_CHROMA_DC; block_idx = 5'd20; end
    else                           begin block_type = BT_CHROMA_AC; block_idx = blk_idx_cur - 5'd3; end
  end

  // Step 1: addresses
  assign luma_re      = active && fetch_step_cur == 2'd1 && blk_idx_cur >= 5'd1 && blk_idx_cur <= 5'd16;
  assign luma_raddr   = 4'(blk_idx_cur - 5'd1);
  assign chroma_re    = active && fetch_step_cur == 2'd1 && blk_idx_cur >= 5'd19;
  assign chroma_raddr = 3'(blk_idx_cur - 5'd19);
  assign blk_start    = active && fetch_step_cur == 2'd1;

  // Step 2: q_cof selection and scan-order packing
  always_comb begin
    cof = '0;
    unique case (block_type)
      BT_LUMA_DC: for (int k = 0; k < 16; k++) cof[k] = field16(reg_luma_dc, 14, ZZ_LABEL[k]);
      BT_LUMA:    for (int k = 0; k < 16; k++) cof[k] = field16(sram_luma_data, 14, ZZ_LABEL[k]);
      BT_LUMA_AC: for (int k = 0; k < 15; k++) cof[k] = field16(sram_luma_data, 14, ZZ_LABEL[k+1]);
      BT_CHROMA_AC: for (int k = 0; k < 15; k++) cof[k] = field16(224'(sram_chroma_data), 12, ZZ_LABEL[k+1]);
      BT_CHROMA_DC: for (int k = 0; k < 4; k++)
        cof[k] = coef_t'($signed(14'((blk_idx_cur == 5'd17 ? reg_chro_dcu : reg_chro_dcv)
                                      >> (14 * (3 - 32'(CDC_LABEL[k]))))));
      default: cof = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active         <= 1'b0;
      intra_cur      <= 1'b0;
      blk_idx_cur    <= '0;
      fetch_step_cur <= '0;
    end else if (!active) begin
      if (esi_enable) begin
        active         <= 1'b1;
        intra_cur      <= intra16x16;
        blk_idx_cur    <= intra16x16 ? 5'd0 : 5'd1;
        fetch_step_cur <= 2'd0;
      end
    end else begin
      unique case (fetch_step_cur)
        2'd0: fetch_step_cur <= 2'd1;
        2'd1: fetch_step_cur <= 2'd2;
        default: begin
          if (fetch_step_cur == 2'd2) fetch_step_cur <= 2'd3;
          if (blk_done) begin
            fetch_step_cur <= 2'd0;
            if (blk_idx_cur == 5'd26) active <= 1'b0;
            else blk_idx_cur <= blk_idx_cur + 5'd1;
          end
        end
      endcase
    end
  end

  assign busy    = active;
  assign mb_done = active && blk_done && blk_idx_cur == 5'd26;

endmodule

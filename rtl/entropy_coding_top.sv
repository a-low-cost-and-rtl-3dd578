// Residual entropy-coding section of an H.264 baseline encoder built around a
// low-cost, high-throughput CAVLC encoder.
// Data path: the transform stage writes one sub-block per cycle (Sub-block Index
// 0..25, plus the Intra16x16 luma DC through ldc_we) into the residual buffer
// while the CBP generator derives the coded block pattern. The macro-block
// header elements are then coded by the Exp-Golomb unit (hdr_valid/hdr_mode/
// hdr_data, one element per cycle). 'esi_enable' starts the entropy SRAM
// interface, which feeds the sub-blocks to the CAVLC encoder; MUX 1 passes the
// header codeword when hdr_valid is high and the encoder's codeword otherwise,
// into the bit-stream packer, whose 32-bit words leave on bs_word/bs_valid.
// The global control unit, transform stage, pipeline registers and bus
// interface are outside this module: their signals are ports. The coded block
// pattern goes out on 'cbp' (for the header) and is used directly by the
// encoder, so a macro-block is written, then coded, before the next is written.
// blk_done/blk_class report each finished sub-block for observation.
// Lint notes: the Nonzero Block Tag, the interface's BlkIdx_cur/fetch_step_cur
// and the encoder's busy flag are internal observation signals with no user
// inside this module (unused-signal warnings); rst_n also disables the
// interface assertion below, which the linter reports as a reset used both
// synchronously and asynchronously. Neither affects the circuit.
module entropy_coding_top
  import cavlc_pkg::*;
#(
  parameter int unsigned MB_ADDR_W = 7,   // frame width up to 2**MB_ADDR_W macro-blocks
  parameter int unsigned MB_Y_W    = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // transform / quantisation stage
  input  logic                 mb_clear,       // new macro-block: clear the Nonzero Block Tag
  input  logic                 intra16x16,
  input  logic                 pe_we,
  input  logic [4:0]           pe_sb_index,
  input  logic [223:0]         luma_cof,
  input  logic [191:0]         chroma_cof,
  input  logic [55:0]          u_dc,
  input  logic [55:0]          v_dc,
  input  logic                 ldc_we,
  input  logic [223:0]         ldc_cof,
  output logic [5:0]           cbp,
  // global control
  input  logic [MB_ADDR_W-1:0] mb_x,
  input  logic [MB_Y_W-1:0]    mb_y,
  input  logic                 hdr_valid,
  input  logic [1:0]           hdr_mode,
  input  logic                 hdr_intra,
  input  logic [15:0]          hdr_data,
  input  logic                 esi_enable,
  input  logic                 flush,
  output logic                 esi_busy,
  output logic                 mb_done,
  output logic                 blk_done,
  output blk_class_t           blk_class,
  // bus interface
  output logic [31:0]          bs_word,
  output logic                 bs_valid,
  output logic [5:0]           bs_len,
  output logic                 packer_idle
);

  logic [223:0] sram_luma_data, reg_luma_dc;
  logic [191:0] sram_chroma_data;
  logic [55:0]  reg_chro_dcu, reg_chro_dcv;
  logic         luma_re, chroma_re;
  logic [3:0]   luma_raddr;
  logic [2:0]   chroma_raddr;
  logic [25:0]  nz_block_tag;
  logic [4:0]   blk_idx_cur;
  logic [1:0]   fetch_step_cur;
  logic         blk_start, enc_busy;
  blk_type_t    block_type;
  logic [4:0]   block_idx;
  coef_arr_t    cof;
  cw_t          enc_cw;
  logic [31:0]  eg_word, mux_word;
  logic [5:0]   eg_len, mux_length;
  logic         mux_valid;

  residual_buffer u_residual_buffer (
    .clk, .rst_n,
    .luma_we(pe_we && pe_sb_index < 5'd16), .luma_waddr(pe_sb_index[3:0]), .luma_wdata(luma_cof),
    .chroma_we(pe_we && pe_sb_index >= 5'd18 && pe_sb_index < 5'd26),
    .chroma_waddr(3'(pe_sb_index - 5'd18)), .chroma_wdata(chroma_cof),
    .ldc_we, .ldc_wdata(ldc_cof),
    .cdcu_we(pe_we && pe_sb_index == 5'd16), .cdcu_wdata(u_dc),
    .cdcv_we(pe_we && pe_sb_index == 5'd17), .cdcv_wdata(v_dc),
    .luma_re, .luma_raddr, .chroma_re, .chroma_raddr,
    .sram_luma_data, .sram_chroma_data, .reg_luma_dc, .reg_chro_dcu, .reg_chro_dcv);

  cbp_generator u_cbp_generator (
    .clk, .rst_n, .clear(mb_clear), .wr_en(pe_we), .sb_index(pe_sb_index), .intra16x16,
    .luma_cof, .chroma_cof, .u_dc, .v_dc, .nz_block_tag, .cbp);

  entropy_sram_if u_esi (
    .clk, .rst_n, .esi_enable, .intra16x16, .busy(esi_busy), .mb_done, .blk_idx_cur,
    .fetch_step_cur, .luma_re, .luma_raddr, .chroma_re, .chroma_raddr,
    .sram_luma_data, .sram_chroma_data, .reg_luma_dc, .reg_chro_dcu, .reg_chro_dcv,
    .blk_start, .block_type, .block_idx, .cof, .blk_done);

  cavlc_encoder #(.MB_ADDR_W(MB_ADDR_W), .MB_Y_W(MB_Y_W)) u_cavlc (
    .clk, .rst_n, .blk_start, .block_type, .block_idx, .mb_x, .mb_y, .cbp, .cof,
    .busy(enc_busy), .blk_done, .blk_class, .cw(enc_cw));

  expgolomb_unit u_expgolomb (
    .mode(hdr_mode), .intra(hdr_intra), .data(hdr_data), .word(eg_word), .len(eg_len));

  // MUX 1
  always_comb begin
    if (hdr_valid) begin
      mux_word = eg_word;  mux_length = eg_len;  mux_valid = 1'b1;
    end else begin
      mux_word = enc_cw.word; mux_length = enc_cw.len; mux_valid = enc_cw.valid;
    end
  end

  bitstream_packer u_packer (
    .clk, .rst_n, .mux_word, .mux_length, .mux_valid, .flush,
    .bitstream_cur(bs_word), .bitstream_valid_cur(bs_valid), .bitstream_len_cur(bs_len),
    .idle(packer_idle));

  assert property (@(posedge clk) disable iff (!rst_n) hdr_valid |-> !enc_cw.valid)
    else $error("entropy_coding_top: header codeword collides with a residual codeword");

endmodule

// CAVLC encoder for H.264 baseline residual blocks with direct significance coding.
// One sub-block is handed over per request: block information with 'blk_start'
// (cycle 1), all sixteen coefficients in scan order on 'cof' one cycle later.
// Three cases are told apart and given their own short paths:
//   CS   - the coded block pattern says the block is empty: nothing is sent (3 cycles);
//   NSZB - not skipped but all-zero: the Nonzero Index Table is empty, and the
//          Zero-block Codeword Table gives the whole block's code at once (6 cycles);
//   NAZ  - the Nonzero Index Table points straight at each nonzero coefficient,
//          so zero coefficients cost no cycles; each codeword is produced by
//          combinational logic and sent as soon as the syntax order allows, with
//          no buffer of syntax elements (9 + x + y cycles, see cavlc_mux).
// Codewords leave on 'cw' (left-aligned word, length, valid) one per cycle at
// most, in H.264 order: coeff_token, trailing-one signs, levels, total_zeros,
// run_befores. 'blk_done' is high in the last cycle of a sub-block with its class.
// Submodules: cavlc_data_ready (Input Buffer, CBP skip), cavlc_scan (Nonzero
// Index Table), cavlc_coding (coeff_token, total_zeros, zero-block table),
// cavlc_coding_level, cavlc_coding_crun, cavlc_nunl + sram_nonzero (nC),
// cavlc_mux (control). The partition follows the design description.
// Lint notes: cbp_cur, the Nonzero Index Table, the stop index and vlcnum are
// submodule outputs kept for observation only (unused-signal warnings); rst_n
// also disables the submodules' assertions, which the linter reports as a reset
// used both synchronously and asynchronously. Neither affects the circuit.
module cavlc_encoder
  import cavlc_pkg::*;
#(
  parameter int unsigned MB_ADDR_W = 7,   // macro-block columns: up to 2**MB_ADDR_W
  parameter int unsigned MB_Y_W    = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 blk_start,
  input  blk_type_t            block_type,
  input  logic [4:0]           block_idx,
  input  logic [MB_ADDR_W-1:0] mb_x,
  input  logic [MB_Y_W-1:0]    mb_y,
  input  logic [5:0]           cbp,
  input  coef_arr_t            cof,
  output logic                 busy,
  output logic                 blk_done,
  output blk_class_t           blk_class,
  output cw_t                  cw
);

  blk_type_t             blk_typ_cur;
  logic [4:0]            blk_idx_cur;
  logic [MB_ADDR_W-1:0]  mb_x_cur;
  logic [MB_Y_W-1:0]     mb_y_cur;
  logic [5:0]            cbp_cur;
  logic                  is_cs;
  logic [15:0]           nz_flags, nzt;
  coef_arr_t             input_buf;
  logic                  load, analyze, t1_step, lvl_step, level_init;
  logic                  rd_top, rd_left, wr_tc;
  logic [4:0]            tc_wdata;
  logic                  empty, zero_blk_cur, t1_end, run_valid;
  logic [3:0]            stop_idx, total_run_cur, run_before, zeros_left;
  coef_t                 cur_coef;
  logic [4:0]            num_nz_cur;
  logic [1:0]            num_t1_cur;
  logic [2:0]            sign_t1_cur, vlcnum;
  logic signed [5:0]     nc;
  logic [31:0]           zero_word, token_word, level_word, tz_word, crun_word;
  logic [5:0]            zero_len, token_len, level_len, tz_len, crun_len;
  logic                  sram_en, sram_we;
  logic [MB_ADDR_W+4:0]  sram_addr;
  logic [4:0]            sram_wdata, sram_rdata;

  cavlc_data_ready #(.MB_X_W(MB_ADDR_W), .MB_Y_W(MB_Y_W)) u_data_ready (
    .clk, .rst_n, .blk_start, .block_type, .block_idx, .mb_x, .mb_y, .cbp,
    .load, .cof, .blk_typ_cur, .blk_idx_cur, .mb_x_cur, .mb_y_cur, .cbp_cur,
    .is_cs, .nz_flags, .input_buf);

  cavlc_scan u_scan (
    .clk, .rst_n, .load, .nz_flags, .input_buf, .analyze, .t1_step, .lvl_step,
    .nzt, .empty, .stop_idx, .cur_coef, .num_nz_cur, .total_run_cur, .zero_blk_cur,
    .num_t1_cur, .sign_t1_cur, .t1_end, .run_valid, .run_before, .zeros_left);

  cavlc_coding u_coding (
    .nc, .num_nz(num_nz_cur), .num_t1(num_t1_cur), .total_zeros(total_run_cur),
    .is_cdc(blk_typ_cur == BT_CHROMA_DC),
    .token_word, .token_len, .tz_word, .tz_len, .zero_word, .zero_len);

  cavlc_coding_level u_level (
    .clk, .rst_n, .init(level_init), .num_nz(num_nz_cur), .num_t1(num_t1_cur),
    .advance(lvl_step), .coef(cur_coef), .word(level_word), .len(level_len), .vlcnum);

  cavlc_coding_crun u_crun (
    .clk, .rst_n, .clear(load), .run_valid, .run_before, .zeros_left,
    .word(crun_word), .len(crun_len));

  cavlc_nunl #(.MB_ADDR_W(MB_ADDR_W), .MB_Y_W(MB_Y_W)) u_nunl (
    .clk, .rst_n, .rd_top, .rd_left, .wr_tc, .tc_wdata, .blk_idx_cur, .blk_typ_cur,
    .mb_x_cur, .mb_y_cur, .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata, .nc);

  sram_nonzero #(.MB_ADDR_W(MB_ADDR_W)) u_sram_nonzero (
    .clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata),
    .rdata(sram_rdata));

  cavlc_mux u_mux (
    .clk, .rst_n, .blk_start, .blk_typ_cur, .is_cs, .zero_blk_cur, .t1_end, .empty,
    .num_nz_cur, .num_t1_cur, .sign_t1_cur,
    .zero_word, .zero_len, .token_word, .token_len, .level_word, .level_len,
    .tz_word, .tz_len, .crun_word, .crun_len,
    .load, .analyze, .t1_step, .lvl_step, .level_init, .rd_top, .rd_left, .wr_tc,
    .tc_wdata, .busy, .blk_done, .blk_class, .cw);

endmodule

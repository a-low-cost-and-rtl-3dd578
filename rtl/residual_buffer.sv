// Residual Buffer: holds the quantised coefficients of one macro-block between
// the transform stage and the entropy coder. Five parts:
//   Luma SRAM   16 words x 224 bits: one 4x4 luma sub-block (z-order index =
//               word address) per word, 16 coefficients of 14 bits;
//   Chroma SRAM  8 words x 192 bits: chroma AC sub-blocks, U in words 0..3,
//               V in words 4..7, 16 coefficients of 12 bits (label 0 unused);
//   LDC register 16 x 14 bits: the Intra16x16 luma DC sub-block;
//   CDCU / CDCV  4 x 14 bits each: the chroma DC sub-blocks.
// A word holds coefficient label 0 in its most significant field and label 15
// (label 3 for the DC registers) in its least significant one; labels run down
// the columns of the 4x4 (2x2) block. A whole sub-block is written per cycle.
// The SRAMs read synchronously (address in one cycle, data in the next); the
// registers are read directly. Sizes and word organisation follow the design
// description; the MSB-first field order of the 4x4 words is an assumption
// carried over from the printed DC-register layout.
module residual_buffer
  import cavlc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         luma_we,
  input  logic [3:0]   luma_waddr,
  input  logic [223:0] luma_wdata,
  input  logic         chroma_we,
  input  logic [2:0]   chroma_waddr,
  input  logic [191:0] chroma_wdata,
  input  logic         ldc_we,
  input  logic [223:0] ldc_wdata,
  input  logic         cdcu_we,
  input  logic [55:0]  cdcu_wdata,
  input  logic         cdcv_we,
  input  logic [55:0]  cdcv_wdata,
  input  logic         luma_re,
  input  logic [3:0]   luma_raddr,
  input  logic         chroma_re,
  input  logic [2:0]   chroma_raddr,
  output logic [223:0] sram_luma_data,
  output logic [191:0] sram_chroma_data,
  output logic [223:0] reg_luma_dc,
  output logic [55:0]  reg_chro_dcu,
  output logic [55:0]  reg_chro_dcv
);

  logic [223:0] luma_mem   [16];
  logic [191:0] chroma_mem [8];

  always_ff @(posedge clk) begin
    if (luma_we)   luma_mem[luma_waddr]     <= luma_wdata;
    if (luma_re)   sram_luma_data           <= luma_mem[luma_raddr];
    if (chroma_we) chroma_mem[chroma_waddr] <= chroma_wdata;
    if (chroma_re) sram_chroma_data         <= chroma_mem[chroma_raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_luma_dc  <= '0;
      reg_chro_dcu <= '0;
      reg_chro_dcv <= '0;
    end else begin
      if (ldc_we)  reg_luma_dc  <= ldc_wdata;
      if (cdcu_we) reg_chro_dcu <= cdcu_wdata;
      if (cdcv_we) reg_chro_dcv <= cdcv_wdata;
    end
  end

endmodule

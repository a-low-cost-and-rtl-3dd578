// Shared types and constants of the CAVLC residual-coding datapath.
// A sub-block travels through the encoder as sixteen signed 16-bit coefficients
// in scan order (index 0 = lowest frequency), which is how the Input Buffer of
// the encoder holds it. Codewords toward the bit-stream packer are carried
// left-aligned in 32 bits together with their length, as the packer expects.
// Five sub-block types are distinguished, as in H.264 baseline 4:2:0.
package cavlc_pkg;

  localparam int unsigned NCOEF   = 16;  // Input Buffer entries
  localparam int unsigned COEF_W  = 16;  // Input Buffer entry width

  typedef enum logic [2:0] {
    BT_LUMA_DC   = 3'd0,  // Intra16x16 DC block, 16 coefficients
    BT_LUMA_AC   = 3'd1,  // Intra16x16 AC block, 15 coefficients
    BT_CHROMA_DC = 3'd2,  // 2x2 chroma DC block, 4 coefficients, nC = -1
    BT_CHROMA_AC = 3'd3,  // chroma AC block, 15 coefficients
    BT_LUMA      = 3'd4   // luma block of a non-Intra16x16 macro-block, 16 coefficients
  } blk_type_t;

  // How the encoder finished a sub-block.
  typedef enum logic [1:0] {
    CLS_CS   = 2'd0,  // skipped by the coded block pattern
    CLS_NSZB = 2'd1,  // not skipped, but all coefficients zero
    CLS_NAZ  = 2'd2   // at least one nonzero coefficient
  } blk_class_t;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t [NCOEF-1:0] coef_arr_t;

  // Codeword toward the bit-stream packer; 'word' is left-aligned.
  typedef struct packed {
    logic        valid;
    logic [5:0]  len;
    logic [31:0] word;
  } cw_t;

  // Zigzag scan: scan position k -> coefficient label of a 4x4 word, where a
  // label counts down the columns (label = 4*column + row).
  localparam logic [3:0] ZZ_LABEL [NCOEF] = '{
    4'd0, 4'd4, 4'd1, 4'd2, 4'd5, 4'd8, 4'd12, 4'd9,
    4'd6, 4'd3, 4'd7, 4'd10, 4'd13, 4'd14, 4'd11, 4'd15};

  // Chroma DC scan: scan position k -> label of the 2x2 register (label = 2*column + row).
  localparam logic [1:0] CDC_LABEL [4] = '{2'd0, 2'd2, 2'd1, 2'd3};

  // Largest TotalCoeff of a sub-block type.
  function automatic logic [4:0] max_coeff(input blk_type_t t);
    unique case (t)
      BT_LUMA_AC, BT_CHROMA_AC: return 5'd15;
      BT_CHROMA_DC:             return 5'd4;
      default:                  return 5'd16;
    endcase
  endfunction

  // Left-align a right-aligned code of 'len' bits in a 32-bit word.
  function automatic logic [31:0] left_align(input logic [31:0] code, input logic [5:0] len);
    return (len == 6'd0) ? 32'd0 : (code << (6'd32 - len));
  endfunction

endpackage

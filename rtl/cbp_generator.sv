// CBP Generator: derives the coded block pattern of a macro-block while its
// coefficients are written into the residual buffer, one sub-block per cycle.
// The Sub-block Index (0..15 luma in z-order, 16 U DC, 17 V DC, 18..21 U AC,
// 22..25 V AC) selects which coefficient bus is examined: luma_cof, u_dc, v_dc or
// chroma_cof. A comparator per sub-block sets or clears its bit of the 26-bit
// Nonzero Block Tag. The AC blocks' label-0 field is not a coefficient (the DC
// is stored separately) and is ignored: always for chroma AC, and for luma when
// the macro-block is Intra16x16. 'clear' empties the tag for a new macro-block.
// The pattern is combinational from the tag:
//   bit g (g = 0..3) = any nonzero luma sub-block in 8x8 group g (indices 4g..4g+3);
//   bits 5:4 = 2 if any chroma AC sub-block is nonzero, else 1 if a chroma DC
//   sub-block is nonzero, else 0.
// Structure per the design description; the identity map from the global
// counter to the Sub-block Index is an assumption. The label-0 field of
// chroma_cof (bits 191:180) is never examined, hence an unused-bits lint warning.
module cbp_generator
  import cavlc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         wr_en,
  input  logic [4:0]   sb_index,
  input  logic         intra16x16,
  input  logic [223:0] luma_cof,
  input  logic [191:0] chroma_cof,
  input  logic [55:0]  u_dc,
  input  logic [55:0]  v_dc,
  output logic [25:0]  nz_block_tag,
  output logic [5:0]   cbp
);

  logic nonzero;

  always_comb begin
    if (sb_index < 5'd16)       nonzero = intra16x16 ? (luma_cof[209:0] != '0) : (luma_cof != '0);
    else if (sb_index == 5'd16) nonzero = (u_dc != '0);
    else if (sb_index == 5'd17) nonzero = (v_dc != '0);
    else                        nonzero = (chroma_cof[179:0] != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                nz_block_tag <= '0;
    else if (clear)                            nz_block_tag <= '0;
    else if (wr_en && sb_index < 5'd26)        nz_block_tag[sb_index] <= nonzero;
  end

  always_comb begin
    for (int g = 0; g < 4; g++) cbp[g] = |nz_block_tag[4*g +: 4];
    if (|nz_block_tag[25:18])      cbp[5:4] = 2'd2;
    else if (|nz_block_tag[17:16]) cbp[5:4] = 2'd1;
    else                           cbp[5:4] = 2'd0;
  end

endmodule

// Exp-Golomb Coding Unit for macro-block header syntax elements (combinational).
// 'mode' selects how the syntax element 'data' maps to codeNum:
//   UE : codeNum = data (unsigned);
//   SE : codeNum = 2*v - 1 for v > 0, -2*v otherwise (SE_CN);
//   CBP: codeNum from the coded_block_pattern mapping of H.264 for 4:2:0,
//        Intra_4x4 or Inter column chosen by 'intra' (CBP_CN).
// The codeword is M zeros followed by the M+1 bits of codeNum + 1, where
// M = floor(log2(codeNum + 1)); it leaves left-aligned with its length 2M+1.
// codeNum must stay below 65535 (|se| <= 32767) so the codeword fits 32 bits.
// Structure (two converters, multiplexer, code table) per the design description.
module expgolomb_unit
  import cavlc_pkg::*;
(
  input  logic [1:0]  mode,     // 0 UE, 1 SE, 2 CBP
  input  logic        intra,    // CBP column: 1 Intra_4x4, 0 Inter
  input  logic [15:0] data,
  output logic [31:0] word,
  output logic [5:0]  len
);

  localparam logic [1:0] M_UE = 2'd0, M_SE = 2'd1, M_CBP = 2'd2;

  // codeNum -> coded_block_pattern
  localparam logic [5:0] CBP_INTRA [48] = '{
    47,31,15,0,23,27,29,30,7,11,13,14,39,43,45,46,16,3,5,10,12,19,21,26,
    28,35,37,42,44,1,2,4,8,17,18,20,24,6,9,22,25,32,33,34,36,40,38,41};
  localparam logic [5:0] CBP_INTER [48] = '{
    0,16,1,2,4,8,32,3,5,10,12,15,47,7,11,13,14,6,9,31,35,37,42,44,
    33,34,36,40,39,43,45,46,17,18,20,24,19,21,26,28,23,27,29,30,22,25,38,41};

  logic [16:0] code_num, se_cn, cbp_cn, v1;
  logic [4:0]  m;

  always_comb begin
    // SE_CN
    if ($signed(data) > 0) se_cn = {data, 1'b0} - 17'd1;
    else                   se_cn = {1'b0, 16'(-$signed(data))} << 1;
    // CBP_CN: inverse of the mapping table
    cbp_cn = '0;
    for (int k = 0; k < 48; k++)
      if ((intra ? CBP_INTRA[k] : CBP_INTER[k]) == data[5:0]) cbp_cn = 17'(k);
    unique case (mode)
      M_SE:    code_num = se_cn;
      M_CBP:   code_num = cbp_cn;
      M_UE:    code_num = {1'b0, data};
      default: code_num = {1'b0, data};
    endcase
    v1 = code_num + 17'd1;
    m  = '0;
    for (int i = 1; i < 17; i++) if (v1[i]) m = 5'(i);
    len  = {m, 1'b1};
    word = left_align(32'(v1), len);
  end

endmodule

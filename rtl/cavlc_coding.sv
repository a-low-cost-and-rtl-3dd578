// Table-based codeword generation of the CAVLC encoder (purely combinational).
// Three outputs, all left-aligned with their lengths:
//  - coeff_token, looked up from (nC class, TrailingOnes, TotalCoeff);
//  - total_zeros, looked up per TotalCoeff, with the 2x2 chroma DC tables used
//    for CHROMA_DC sub-blocks;
//  - the Zero-block Codeword Table: the coeff_token of an all-zero sub-block
//    (TotalCoeff = TrailingOnes = 0) for each nC class, i.e. "1", "11", "1111",
//    "000011" and "01". It lets an all-zero sub-block that the coded block
//    pattern cannot skip be finished with a single codeword.
// nC is the neighbour average from the nC unit; -1 selects the chroma DC column.
// The tables are the H.264 ones; splitting them into these three outputs follows
// the design description.
module cavlc_coding
  import cavlc_pkg::*;
  import cavlc_tables_pkg::*;
(
  input  logic signed [5:0] nc,          // -1..16
  input  logic [4:0]        num_nz,      // TotalCoeff
  input  logic [1:0]        num_t1,      // TrailingOnes
  input  logic [3:0]        total_zeros,
  input  logic              is_cdc,      // sub-block is CHROMA_DC
  output logic [31:0]       token_word,
  output logic [5:0]        token_len,
  output logic [31:0]       tz_word,
  output logic [5:0]        tz_len,
  output logic [31:0]       zero_word,
  output logic [5:0]        zero_len
);

  logic [2:0] nc_class;
  vlc_t       ct, tz, zb;

  always_comb begin
    if (nc < 0)        nc_class = 3'd4;
    else if (nc < 2)   nc_class = 3'd0;
    else if (nc < 4)   nc_class = 3'd1;
    else if (nc < 8)   nc_class = 3'd2;
    else               nc_class = 3'd3;

    ct = coeff_token_vlc(nc_class, num_t1, num_nz);
    tz = is_cdc ? total_zeros_cdc_vlc(num_nz, total_zeros)
                : total_zeros_vlc(num_nz, total_zeros);

    // Zero-block Codeword Table
    unique case (nc_class)
      3'd0:    zb = '{len: 5'd1, code: 16'b1};
      3'd1:    zb = '{len: 5'd2, code: 16'b11};
      3'd2:    zb = '{len: 5'd4, code: 16'b1111};
      3'd3:    zb = '{len: 5'd6, code: 16'b000011};
      default: zb = '{len: 5'd2, code: 16'b01};
    endcase

    token_len  = 6'(ct.len);
    token_word = left_align(32'(ct.code), token_len);
    tz_len     = 6'(tz.len);
    tz_word    = left_align(32'(tz.code), tz_len);
    zero_len   = 6'(zb.len);
    zero_word  = left_align(32'(zb.code), zero_len);
  end

endmodule

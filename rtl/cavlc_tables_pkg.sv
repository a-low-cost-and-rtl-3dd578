// Variable-length code tables of H.264 CAVLC (baseline, 4:2:0).
// Each look-up returns a codeword as {length, value}: 'value' holds the code
// right-aligned in 16 bits and 'length' gives how many of its low bits are sent.
// The ROM contents are the code tables of the H.264 standard (Tables 9-5, 9-7,
// 9-8 and 9-10), stored as 21-bit words {length[4:0], code[15:0]}:
//   coeff_token, one table per nC class, entry index 17*TrailingOnes + TotalCoeff;
//     the class nC >= 8 is a 6-bit fixed-length code and is computed:
//     code = 4*(TotalCoeff-1) + TrailingOnes, or 000011 for TotalCoeff = 0;
//   total_zeros, entry index 16*(TotalCoeff-1) + total_zeros (4x4 blocks) and
//     4*(TotalCoeff-1) + total_zeros (2x2 chroma DC);
//   run_before, entry index 16*(min(zerosLeft,7)-1) + run_before.
// Unused entries are zero (length 0). All functions are combinational look-ups.
package cavlc_tables_pkg;
  typedef struct packed { logic [4:0] len; logic [15:0] code; } vlc_t;

  // coeff_token, 0 <= nC < 2
  localparam logic [20:0] CT_NC0 [68] = '{
    21'h010001, 21'h060005, 21'h080007, 21'h090007, 21'h0a0007, 21'h0b0007, 21'h0d000f, 21'h0d000b,
    21'h0d0008, 21'h0e000f, 21'h0e000b, 21'h0f000f, 21'h0f000b, 21'h10000f, 21'h10000b, 21'h100007,
    21'h100004, 21'h0, 21'h020001, 21'h060004, 21'h080006, 21'h090006, 21'h0a0006, 21'h0b0006,
    21'h0d000e, 21'h0d000a, 21'h0e000e, 21'h0e000a, 21'h0f000e, 21'h0f000a, 21'h0f0001, 21'h10000e,
    21'h10000a, 21'h100006, 21'h0, 21'h0, 21'h030001, 21'h070005, 21'h080005, 21'h090005,
    21'h0a0005, 21'h0b0005, 21'h0d000d, 21'h0d0009, 21'h0e000d, 21'h0e0009, 21'h0f000d, 21'h0f0009,
    21'h10000d, 21'h100009, 21'h100005, 21'h0, 21'h0, 21'h0, 21'h050003, 21'h060003,
    21'h070004, 21'h080004, 21'h090004, 21'h0a0004, 21'h0b0004, 21'h0d000c, 21'h0e000c, 21'h0e0008,
    21'h0f000c, 21'h0f0008, 21'h10000c, 21'h100008
  };
  // coeff_token, 2 <= nC < 4
  localparam logic [20:0] CT_NC2 [68] = '{
    21'h020003, 21'h06000b, 21'h060007, 21'h070007, 21'h080007, 21'h080004, 21'h090007, 21'h0b000f,
    21'h0b000b, 21'h0c000f, 21'h0c000b, 21'h0c0008, 21'h0d000f, 21'h0d000b, 21'h0d0007, 21'h0e0009,
    21'h0e0007, 21'h0, 21'h020002, 21'h050007, 21'h06000a, 21'h060006, 21'h070006, 21'h080006,
    21'h090006, 21'h0b000e, 21'h0b000a, 21'h0c000e, 21'h0c000a, 21'h0d000e, 21'h0d000a, 21'h0e000b,
    21'h0e0008, 21'h0e0006, 21'h0, 21'h0, 21'h030003, 21'h060009, 21'h060005, 21'h070005,
    21'h080005, 21'h090005, 21'h0b000d, 21'h0b0009, 21'h0c000d, 21'h0c0009, 21'h0d000d, 21'h0d0009,
    21'h0d0006, 21'h0e000a, 21'h0e0005, 21'h0, 21'h0, 21'h0, 21'h040005, 21'h040004,
    21'h050006, 21'h060008, 21'h060004, 21'h070004, 21'h090004, 21'h0b000c, 21'h0b0008, 21'h0c000c,
    21'h0d000c, 21'h0d0008, 21'h0d0001, 21'h0e0004
  };
  // coeff_token, 4 <= nC < 8
  localparam logic [20:0] CT_NC4 [68] = '{
    21'h04000f, 21'h06000f, 21'h06000b, 21'h060008, 21'h07000f, 21'h07000b, 21'h070009, 21'h070008,
    21'h08000f, 21'h08000b, 21'h09000f, 21'h09000b, 21'h090008, 21'h0a000d, 21'h0a0009, 21'h0a0005,
    21'h0a0001, 21'h0, 21'h04000e, 21'h05000f, 21'h05000c, 21'h05000a, 21'h050008, 21'h06000e,
    21'h06000a, 21'h07000e, 21'h08000e, 21'h08000a, 21'h09000e, 21'h09000a, 21'h090007, 21'h0a000c,
    21'h0a0008, 21'h0a0004, 21'h0, 21'h0, 21'h04000d, 21'h05000e, 21'h05000b, 21'h050009,
    21'h06000d, 21'h060009, 21'h07000d, 21'h07000a, 21'h08000d, 21'h080009, 21'h09000d, 21'h090009,
    21'h0a000b, 21'h0a0007, 21'h0a0003, 21'h0, 21'h0, 21'h0, 21'h04000c, 21'h04000b,
    21'h04000a, 21'h040009, 21'h040008, 21'h05000d, 21'h06000c, 21'h07000c, 21'h08000c, 21'h080008,
    21'h09000c, 21'h0a000a, 21'h0a0006, 21'h0a0002
  };
  // coeff_token, chroma DC (nC = -1), index 5*TrailingOnes + TotalCoeff
  localparam logic [20:0] CT_CDC [20] = '{
    21'h020001, 21'h060007, 21'h060004, 21'h060003, 21'h060002, 21'h0, 21'h010001, 21'h060006,
    21'h070003, 21'h080003, 21'h0, 21'h0, 21'h030001, 21'h070002, 21'h080002, 21'h0,
    21'h0, 21'h0, 21'h060005, 21'h070000
  };
  // total_zeros, 4x4 blocks
  localparam logic [20:0] TZ_4X4 [240] = '{
    21'h010001, 21'h030003, 21'h030002, 21'h040003, 21'h040002, 21'h050003, 21'h050002, 21'h060003,
    21'h060002, 21'h070003, 21'h070002, 21'h080003, 21'h080002, 21'h090003, 21'h090002, 21'h090001,
    21'h030007, 21'h030006, 21'h030005, 21'h030004, 21'h030003, 21'h040005, 21'h040004, 21'h040003,
    21'h040002, 21'h050003, 21'h050002, 21'h060003, 21'h060002, 21'h060001, 21'h060000, 21'h0,
    21'h040005, 21'h030007, 21'h030006, 21'h030005, 21'h040004, 21'h040003, 21'h030004, 21'h030003,
    21'h040002, 21'h050003, 21'h050002, 21'h060001, 21'h050001, 21'h060000, 21'h0, 21'h0,
    21'h050003, 21'h030007, 21'h040005, 21'h040004, 21'h030006, 21'h030005, 21'h030004, 21'h040003,
    21'h030003, 21'h040002, 21'h050002, 21'h050001, 21'h050000, 21'h0, 21'h0, 21'h0,
    21'h040005, 21'h040004, 21'h040003, 21'h030007, 21'h030006, 21'h030005, 21'h030004, 21'h030003,
    21'h040002, 21'h050001, 21'h040001, 21'h050000, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h060001, 21'h050001, 21'h030007, 21'h030006, 21'h030005, 21'h030004, 21'h030003, 21'h030002,
    21'h040001, 21'h030001, 21'h060000, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h060001, 21'h050001, 21'h030005, 21'h030004, 21'h030003, 21'h020003, 21'h030002, 21'h040001,
    21'h030001, 21'h060000, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h060001, 21'h040001, 21'h050001, 21'h030003, 21'h020003, 21'h020002, 21'h030002, 21'h030001,
    21'h060000, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h060001, 21'h060000, 21'h040001, 21'h020003, 21'h020002, 21'h030001, 21'h020001, 21'h050001,
    21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h050001, 21'h050000, 21'h030001, 21'h020003, 21'h020002, 21'h020001, 21'h040001, 21'h0,
    21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h040000, 21'h040001, 21'h030001, 21'h030002, 21'h010001, 21'h030003, 21'h0, 21'h0,
    21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h040000, 21'h040001, 21'h020001, 21'h010001, 21'h030001, 21'h0, 21'h0, 21'h0,
    21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h030000, 21'h030001, 21'h010001, 21'h020001, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h020000, 21'h020001, 21'h010001, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h010000, 21'h010001, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0
  };
  // total_zeros, chroma DC
  localparam logic [20:0] TZ_CDC [12] = '{
    21'h010001, 21'h020001, 21'h030001, 21'h030000, 21'h010001, 21'h020001, 21'h020000, 21'h0,
    21'h010001, 21'h010000, 21'h0, 21'h0
  };
  // run_before
  localparam logic [20:0] RUN_BEFORE [112] = '{
    21'h010001, 21'h010000, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h010001, 21'h020001, 21'h020000, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h020003, 21'h020002, 21'h020001, 21'h020000, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h020003, 21'h020002, 21'h020001, 21'h030001, 21'h030000, 21'h0, 21'h0, 21'h0,
    21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h020003, 21'h020002, 21'h030003, 21'h030002, 21'h030001, 21'h030000, 21'h0, 21'h0,
    21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h020003, 21'h030000, 21'h030001, 21'h030003, 21'h030002, 21'h030005, 21'h030004, 21'h0,
    21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0, 21'h0,
    21'h030007, 21'h030006, 21'h030005, 21'h030004, 21'h030003, 21'h030002, 21'h030001, 21'h040001,
    21'h050001, 21'h060001, 21'h070001, 21'h080001, 21'h090001, 21'h0a0001, 21'h0b0001, 21'h0
  };

  // nC class: 0: 0<=nC<2, 1: 2<=nC<4, 2: 4<=nC<8, 3: 8<=nC, 4: nC==-1 (chroma DC)
  function automatic vlc_t coeff_token_vlc(input logic [2:0] nc_class, input logic [1:0] t1, input logic [4:0] tc);
    vlc_t r;
    r = '0;
    unique case (nc_class)
      3'd0:    r = CT_NC0[17 * t1 + tc];
      3'd1:    r = CT_NC2[17 * t1 + tc];
      3'd2:    r = CT_NC4[17 * t1 + tc];
      3'd3:    r = (tc == 5'd0) ? {5'd6, 16'b11} : {5'd6, 10'd0, 4'(tc - 5'd1), t1};
      3'd4:    if (tc < 5'd5) r = CT_CDC[5 * t1 + tc];
      default: r = '0;
    endcase
    return r;
  endfunction

  // total_zeros for 4x4 blocks (LUMA, LUMA_DC, LUMA_AC, CHROMA_AC); tc in 1..15
  function automatic vlc_t total_zeros_vlc(input logic [4:0] tc, input logic [3:0] tzv);
    return (tc >= 5'd1 && tc <= 5'd15) ? TZ_4X4[{4'(tc - 5'd1), tzv}] : '0;
  endfunction

  // total_zeros for 2x2 chroma DC blocks; tc in 1..3
  function automatic vlc_t total_zeros_cdc_vlc(input logic [4:0] tc, input logic [3:0] tzv);
    return (tc >= 5'd1 && tc <= 5'd3 && tzv < 4'd4) ? TZ_CDC[{2'(tc - 5'd1), tzv[1:0]}] : '0;
  endfunction

  // run_before; zl is zerosLeft saturated at 7 (7 stands for zerosLeft > 6)
  function automatic vlc_t run_before_vlc(input logic [2:0] zl, input logic [3:0] run);
    return (zl != 3'd0) ? RUN_BEFORE[{3'(zl - 3'd1), run}] : '0;
  endfunction
endpackage

// Code tables of H.264 CAVLC written as bit strings ('-' marks an unused
// entry), used by the testbench reference encoder. They are kept in a form
// different from the RTL look-up functions: strings indexed by table position.
package cavlc_ref_tables_pkg;
  // coeff_token: index [nc_class][t1][tc]
  localparam string CT [5][4][17] = '{
    '{
      '{"1", "000101", "00000111", "000000111", "0000000111", "00000000111", "0000000001111", "0000000001011", "0000000001000", "00000000001111", "00000000001011", "000000000001111", "000000000001011", "0000000000001111", "0000000000001011", "0000000000000111", "0000000000000100"},
      '{"-", "01", "000100", "00000110", "000000110", "0000000110", "00000000110", "0000000001110", "0000000001010", "00000000001110", "00000000001010", "000000000001110", "000000000001010", "000000000000001", "0000000000001110", "0000000000001010", "0000000000000110"},
      '{"-", "-", "001", "0000101", "00000101", "000000101", "0000000101", "00000000101", "0000000001101", "0000000001001", "00000000001101", "00000000001001", "000000000001101", "000000000001001", "0000000000001101", "0000000000001001", "0000000000000101"},
      '{"-", "-", "-", "00011", "000011", "0000100", "00000100", "000000100", "0000000100", "00000000100", "0000000001100", "00000000001100", "00000000001000", "000000000001100", "000000000001000", "0000000000001100", "0000000000001000"}
    },
    '{
      '{"11", "001011", "000111", "0000111", "00000111", "00000100", "000000111", "00000001111", "00000001011", "000000001111", "000000001011", "000000001000", "0000000001111", "0000000001011", "0000000000111", "00000000001001", "00000000000111"},
      '{"-", "10", "00111", "001010", "000110", "0000110", "00000110", "000000110", "00000001110", "00000001010", "000000001110", "000000001010", "0000000001110", "0000000001010", "00000000001011", "00000000001000", "00000000000110"},
      '{"-", "-", "011", "001001", "000101", "0000101", "00000101", "000000101", "00000001101", "00000001001", "000000001101", "000000001001", "0000000001101", "0000000001001", "0000000000110", "00000000001010", "00000000000101"},
      '{"-", "-", "-", "0101", "0100", "00110", "001000", "000100", "0000100", "000000100", "00000001100", "00000001000", "000000001100", "0000000001100", "0000000001000", "0000000000001", "00000000000100"}
    },
    '{
      '{"1111", "001111", "001011", "001000", "0001111", "0001011", "0001001", "0001000", "00001111", "00001011", "000001111", "000001011", "000001000", "0000001101", "0000001001", "0000000101", "0000000001"},
      '{"-", "1110", "01111", "01100", "01010", "01000", "001110", "001010", "0001110", "00001110", "00001010", "000001110", "000001010", "000000111", "0000001100", "0000001000", "0000000100"},
      '{"-", "-", "1101", "01110", "01011", "01001", "001101", "001001", "0001101", "0001010", "00001101", "00001001", "000001101", "000001001", "0000001011", "0000000111", "0000000011"},
      '{"-", "-", "-", "1100", "1011", "1010", "1001", "1000", "01101", "001100", "0001100", "00001100", "00001000", "000001100", "0000001010", "0000000110", "0000000010"}
    },
    '{
      '{"000011", "000000", "000100", "001000", "001100", "010000", "010100", "011000", "011100", "100000", "100100", "101000", "101100", "110000", "110100", "111000", "111100"},
      '{"-", "000001", "000101", "001001", "001101", "010001", "010101", "011001", "011101", "100001", "100101", "101001", "101101", "110001", "110101", "111001", "111101"},
      '{"-", "-", "000110", "001010", "001110", "010010", "010110", "011010", "011110", "100010", "100110", "101010", "101110", "110010", "110110", "111010", "111110"},
      '{"-", "-", "-", "001011", "001111", "010011", "010111", "011011", "011111", "100011", "100111", "101011", "101111", "110011", "110111", "111011", "111111"}
    },
    '{
      '{"01", "000111", "000100", "000011", "000010", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-"},
      '{"-", "1", "000110", "0000011", "00000011", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-"},
      '{"-", "-", "001", "0000010", "00000010", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-"},
      '{"-", "-", "-", "000101", "0000000", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-"}
    }
  };
  // total_zeros: index [tc-1][total_zeros]
  localparam string TZ [15][16] = '{
    '{"1", "011", "010", "0011", "0010", "00011", "00010", "000011", "000010", "0000011", "0000010", "00000011", "00000010", "000000011", "000000010", "000000001"},
    '{"111", "110", "101", "100", "011", "0101", "0100", "0011", "0010", "00011", "00010", "000011", "000010", "000001", "000000", "-"},
    '{"0101", "111", "110", "101", "0100", "0011", "100", "011", "0010", "00011", "00010", "000001", "00001", "000000", "-", "-"},
    '{"00011", "111", "0101", "0100", "110", "101", "100", "0011", "011", "0010", "00010", "00001", "00000", "-", "-", "-"},
    '{"0101", "0100", "0011", "111", "110", "101", "100", "011", "0010", "00001", "0001", "00000", "-", "-", "-", "-"},
    '{"000001", "00001", "111", "110", "101", "100", "011", "010", "0001", "001", "000000", "-", "-", "-", "-", "-"},
    '{"000001", "00001", "101", "100", "011", "11", "010", "0001", "001", "000000", "-", "-", "-", "-", "-", "-"},
    '{"000001", "0001", "00001", "011", "11", "10", "010", "001", "000000", "-", "-", "-", "-", "-", "-", "-"},
    '{"000001", "000000", "0001", "11", "10", "001", "01", "00001", "-", "-", "-", "-", "-", "-", "-", "-"},
    '{"00001", "00000", "001", "11", "10", "01", "0001", "-", "-", "-", "-", "-", "-", "-", "-", "-"},
    '{"0000", "0001", "001", "010", "1", "011", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-"},
    '{"0000", "0001", "01", "1", "001", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-"},
    '{"000", "001", "1", "01", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-"},
    '{"00", "01", "1", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-"},
    '{"0", "1", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-"}
  };
  localparam string TZC [3][4] = '{
    '{"1", "01", "001", "000"},
    '{"1", "01", "00", "-"},
    '{"1", "0", "-", "-"}
  };
  // run_before: index [min(zerosLeft,7)-1][run]
  localparam string RB [7][15] = '{
    '{"1", "0", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-"},
    '{"1", "01", "00", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-"},
    '{"11", "10", "01", "00", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-"},
    '{"11", "10", "01", "001", "000", "-", "-", "-", "-", "-", "-", "-", "-", "-", "-"},
    '{"11", "10", "011", "010", "001", "000", "-", "-", "-", "-", "-", "-", "-", "-", "-"},
    '{"11", "000", "001", "011", "010", "101", "100", "-", "-", "-", "-", "-", "-", "-", "-"},
    '{"111", "110", "101", "100", "011", "010", "001", "0001", "00001", "000001", "0000001", "00000001", "000000001", "0000000001", "00000000001"}
  };
endpackage

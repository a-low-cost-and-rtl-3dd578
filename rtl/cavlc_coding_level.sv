// Level codeword generator of the CAVLC encoder.
// The codeword of a nonzero coefficient that is not a trailing one is computed
// rather than looked up: the signed level is mapped to levelCode, which is split
// into a unary level_prefix and a level_suffix of suffixLength bits (the VLC
// table number, vlcnum), with the escape prefix 15 carrying a 12-bit suffix.
// vlcnum is held here. 'init' sets it for a new sub-block (1 when TotalCoeff > 10
// and TrailingOnes < 3, else 0) and marks the next level as the first one, whose
// levelCode is reduced by 2 when TrailingOnes < 3. 'advance' is pulsed in each
// cycle whose level codeword is sent; vlcnum then steps up when |level| exceeds
// the threshold of the current table (0, 3, 6, 12, 24, 48) and jumps to 2 after a
// first level larger than 3.
// The codeword output is combinational from 'coef' in the same cycle, left-aligned.
// The calculation follows the H.264 reference encoder; the register placement is
// this design's choice. Levels must fit the baseline escape range (levelCode
// beyond the 12-bit escape suffix is not representable and is flagged by an assertion).
// Lint note: rst_n also disables the assertion at the end of the module, which
// the linter reports as a reset used both synchronously and asynchronously;
// the circuit uses it only as an asynchronous reset.
module cavlc_coding_level
  import cavlc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,      // new sub-block: load vlcnum
  input  logic [4:0]  num_nz,    // TotalCoeff of the sub-block
  input  logic [1:0]  num_t1,    // TrailingOnes of the sub-block
  input  logic        advance,   // the level on 'coef' is sent this cycle
  input  coef_t       coef,      // level to encode
  output logic [31:0] word,      // left-aligned codeword
  output logic [5:0]  len,       // codeword length (1..28)
  output logic [2:0]  vlcnum     // current table number, for observation
);

  logic        first_q;
  logic [15:0] abs_lvl;
  logic [16:0] lvl_code;
  logic [16:0] esc_base;
  logic [4:0]  prefix;
  logic [3:0]  suf_len;
  logic [16:0] suffix;
  logic [2:0]  vlc_next;

  always_comb begin
    abs_lvl  = coef[COEF_W-1] ? 16'(-coef) : 16'(coef);
    lvl_code = coef[COEF_W-1] ? {abs_lvl, 1'b0} - 17'd1 : {abs_lvl, 1'b0} - 17'd2;
    if (first_q && num_t1 != 2'd3) lvl_code = lvl_code - 17'd2;

    esc_base = 17'd15 << vlcnum;
    if (vlcnum == 3'd0) begin
      if (lvl_code < 17'd14) begin
        prefix = 5'(lvl_code); suf_len = 4'd0; suffix = '0;
      end else if (lvl_code < 17'd30) begin
        prefix = 5'd14; suf_len = 4'd4; suffix = lvl_code - 17'd14;
      end else begin
        prefix = 5'd15; suf_len = 4'd12; suffix = lvl_code - 17'd30;
      end
    end else begin
      if (lvl_code < esc_base) begin
        prefix  = 5'(lvl_code >> vlcnum);
        suf_len = 4'(vlcnum);
        suffix  = lvl_code & ((17'd1 << vlcnum) - 17'd1);
      end else begin
        prefix = 5'd15; suf_len = 4'd12; suffix = lvl_code - esc_base;
      end
    end
    len  = 6'(prefix) + 6'd1 + 6'(suf_len);
    word = left_align((32'd1 << suf_len) | 32'(suffix[11:0]), len);
  end

  // Table update after a level has been sent.
  always_comb begin
    vlc_next = vlcnum;
    unique case (vlcnum)
      3'd0:    if (abs_lvl > 16'd0)  vlc_next = 3'd1;
      3'd1:    if (abs_lvl > 16'd3)  vlc_next = 3'd2;
      3'd2:    if (abs_lvl > 16'd6)  vlc_next = 3'd3;
      3'd3:    if (abs_lvl > 16'd12) vlc_next = 3'd4;
      3'd4:    if (abs_lvl > 16'd24) vlc_next = 3'd5;
      3'd5:    if (abs_lvl > 16'd48) vlc_next = 3'd6;
      default: vlc_next = vlcnum;
    endcase
    if (first_q && abs_lvl > 16'd3 && vlc_next < 3'd2) vlc_next = 3'd2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vlcnum  <= 3'd0;
      first_q <= 1'b0;
    end else if (init) begin
      vlcnum  <= (num_nz > 5'd10 && num_t1 != 2'd3) ? 3'd1 : 3'd0;
      first_q <= 1'b1;
    end else if (advance) begin
      vlcnum  <= vlc_next;
      first_q <= 1'b0;
    end
  end

  // A level beyond the baseline escape range cannot be coded.
  assert property (@(posedge clk) disable iff (!rst_n)
                   advance |-> (suf_len != 4'd12 || suffix < 17'd4096))
    else $error("cavlc_coding_level: level %0d out of the escape range", coef);

endmodule

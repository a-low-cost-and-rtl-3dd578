// Bit-stream Packer: concatenates variable-length codewords into 32-bit words
// of H.264 byte-stream payload and inserts emulation prevention bytes.
// A codeword arrives left-aligned on mux_word with its length mux_length when
// mux_valid is high (one per cycle). Pending bits sit right-aligned in
// residual_word_cur. When pending plus new bits reach 32 (longer_than_31), the
// first 32 bits are examined as four bytes against TwoByteBuf_cur, the last two
// bytes already sent: wherever two zero bytes would be followed by a byte 0x00 to
// 0x03, a 0x03 byte is inserted. The first four bytes of the result are
// registered in bitstream_cur with bitstream_valid_cur high; input bytes that no
// longer fit after an insertion return to the front of residual_word_cur
// (e.g. history 00 00 and bytes 00 00 00 02 give 03 00 00 03, leaving 00 02).
// 'flush' (with mux_valid low) sends the remaining bits once fewer than 32 are
// pending, left-aligned with bitstream_len giving their number; that word is
// not checked for emulation, and the byte history restarts. Full words carry
// bitstream_len = 32.
// Follows the design description, except that residual_word_cur is 64 bits
// wide, not 32: up to 31 leftover bits plus two returned bytes must fit.
// Lint note: rst_n also disables the assertion at the end of the module, which
// the linter reports as a reset used both synchronously and asynchronously;
// the circuit uses it only as an asynchronous reset.
module bitstream_packer
  import cavlc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] mux_word,
  input  logic [5:0]  mux_length,
  input  logic        mux_valid,
  input  logic        flush,
  output logic [31:0] bitstream_cur,
  output logic        bitstream_valid_cur,
  output logic [5:0]  bitstream_len_cur,
  output logic        idle                  // nothing pending
);

  logic [63:0] residual_word_cur;
  logic [6:0]  residual_length_cur;
  logic [15:0] two_byte_buf_cur;
  logic        flush_pend;

  logic [5:0]  in_len;
  logic [7:0]  total;
  logic [95:0] left_shifter;    // pending + new bits, right-aligned
  logic [95:0] right_shifter;   // the same, left-aligned
  logic        longer_than_31;
  logic [7:0]  in_b  [4];
  logic [7:0]  out_b [4];
  logic [2:0]  consumed;
  logic [7:0]  rest_len;

  always_comb begin
    logic [1:0] z;
    int         n;
    in_len         = mux_valid ? mux_length : 6'd0;
    total          = 8'(residual_length_cur) + 8'(in_len);
    left_shifter   = (96'(residual_word_cur) << in_len) |
                     ((in_len == 6'd0) ? 96'd0 : 96'(mux_word >> (6'd32 - in_len)));
    right_shifter  = (total == 8'd0) ? 96'd0 : left_shifter << (8'd96 - total);
    longer_than_31 = total > 8'd31;
    for (int i = 0; i < 4; i++) in_b[i] = right_shifter[95 - 8*i -: 8];
    // emulation prevention over the first four bytes
    z = (two_byte_buf_cur[7:0] != 8'd0) ? 2'd0 : (two_byte_buf_cur[15:8] != 8'd0) ? 2'd1 : 2'd2;
    n = 0;
    consumed = '0;
    for (int i = 0; i < 4; i++) out_b[i] = 8'd0;
    for (int i = 0; i < 4; i++) begin
      if (n < 4 && z == 2'd2 && in_b[i] <= 8'd3) begin
        out_b[n] = 8'h03;
        n++;
        z = 2'd0;
      end
      if (n < 4) begin
        out_b[n] = in_b[i];
        n++;
        consumed = consumed + 3'd1;
        z = (in_b[i] == 8'd0) ? z + 2'd1 : 2'd0;
      end
    end
    rest_len = total - 8'({consumed, 3'b000});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      residual_word_cur   <= '0;
      residual_length_cur <= '0;
      two_byte_buf_cur    <= 16'hffff;
      flush_pend          <= 1'b0;
      bitstream_cur       <= '0;
      bitstream_valid_cur <= 1'b0;
      bitstream_len_cur   <= '0;
    end else begin
      bitstream_valid_cur <= 1'b0;
      if (flush) flush_pend <= 1'b1;
      if (longer_than_31) begin
        bitstream_cur       <= {out_b[0], out_b[1], out_b[2], out_b[3]};
        bitstream_valid_cur <= 1'b1;
        bitstream_len_cur   <= 6'd32;
        two_byte_buf_cur    <= {out_b[2], out_b[3]};
        residual_word_cur   <= 64'(left_shifter & ((96'd1 << rest_len) - 96'd1));
        residual_length_cur <= 7'(rest_len);
      end else if (flush_pend || flush) begin
        if (total != 8'd0) begin
          bitstream_cur       <= right_shifter[95:64];
          bitstream_valid_cur <= 1'b1;
          bitstream_len_cur   <= 6'(total);
        end
        residual_word_cur   <= '0;
        residual_length_cur <= '0;
        two_byte_buf_cur    <= 16'hffff;
        flush_pend          <= 1'b0;
      end else begin
        residual_word_cur   <= 64'(left_shifter);
        residual_length_cur <= 7'(total);
      end
    end
  end

  assign idle = (residual_length_cur == 7'd0) && !flush_pend;

  assert property (@(posedge clk) disable iff (!rst_n) longer_than_31 |-> rest_len <= 8'd64)
    else $error("bitstream_packer: residual overflow");
  assert property (@(posedge clk) disable iff (!rst_n) flush |-> !mux_valid)
    else $error("bitstream_packer: flush together with a codeword");

endmodule

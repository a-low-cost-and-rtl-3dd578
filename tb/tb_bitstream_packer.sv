// Self-checking testbench of bitstream_packer. Random codewords of 1 to 32 bits
// (runs of zero-valued codewords included, so that zero bytes line up and
// emulation prevention is needed often) are fed with random gaps. The 32-bit
// output words are checked for start-code emulation (no two zero bytes followed
// by a byte of 0 to 3, counting the bytes of earlier words), the inserted 0x03
// bytes are removed, and the result, followed by the flushed tail, must equal
// the concatenation of the input codewords. Full words must carry length 32.
// The run ends with 'flush'; the packer must then be idle. The same is repeated
// several times, each run starting after a flush.
module tb_bitstream_packer;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] mux_word, bitstream_cur;
  logic [5:0]  mux_length, bitstream_len_cur;
  logic        mux_valid, flush, bitstream_valid_cur, idle;

  bitstream_packer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_emul = 0, n_words = 0;
  bit sent [$], got [$];
  byte unsigned hist [$];
  bit tail_seen;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side: check and de-emulate full words, keep the flushed tail raw
  always @(negedge clk) if (rst_n && bitstream_valid_cur) begin
    if (bitstream_len_cur == 6'd32 && !tail_seen) begin
      n_words++;
      for (int b = 3; b >= 0; b--) begin
        byte unsigned v;
        v = bitstream_cur[8*b +: 8];
        checks++;
        if (hist.size() >= 2 && hist[$] == 0 && hist[$-1] == 0 && v <= 8'd3) begin
          if (v == 8'd3) n_emul++;
          else begin
            failures++;
            if (failures < 20) $display("FAIL start-code emulation: 00 00 %h", v);
          end
        end
        if (!(hist.size() >= 2 && hist[$] == 0 && hist[$-1] == 0 && v == 8'd3))
          for (int i = 7; i >= 0; i--) got.push_back(v[i]);
        hist.push_back(v);
        if (v == 8'd3 && hist.size() >= 3 && hist[$-1] == 0 && hist[$-2] == 0) hist.push_back(8'hff);
      end
    end else begin
      tail_seen = 1;
      for (int i = 31; i > 31 - int'(bitstream_len_cur); i--) got.push_back(bitstream_cur[i]);
    end
  end

  initial begin
    int len, zrun;
    logic [31:0] w;
    mux_word = 0; mux_length = 0; mux_valid = 0; flush = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      sent.delete(); got.delete(); hist.delete();
      tail_seen = 0;
      zrun = 0;
      for (int i = 0; i < 3000; i++) begin
        if ($urandom_range(0, 2) == 0) begin
          len = $urandom_range(1, 32);
          if (zrun == 0 && $urandom_range(0, 9) == 0) zrun = $urandom_range(2, 8);
          if (zrun > 0) begin
            w = '0;
            if ($urandom_range(0, 3) == 0) w[$urandom_range(0, 31)] = 1'b1;
            zrun--;
          end else w = $urandom;
          w = w & ~(32'hffff_ffff >> len);   // left-aligned: unused bits zero
          for (int k = 31; k > 31 - len; k--) sent.push_back(w[k]);
          mux_valid = 1; mux_word = w; mux_length = 6'(len);
        end else begin
          mux_valid = 0; mux_word = $urandom; mux_length = 6'($urandom);
        end
        @(negedge clk);
      end
      mux_valid = 0;
      flush = 1;
      @(negedge clk);
      flush = 0;
      repeat (8) @(negedge clk);
      checks++;
      if (!idle) begin failures++; $display("FAIL not idle after flush"); end
      checks++;
      if (got != sent) begin
        failures++;
        $display("FAIL run %0d: %0d bits out (after removing emulation bytes), %0d in",
                 run, got.size(), sent.size());
        for (int i = 0; i < got.size() && i < sent.size(); i++)
          if (got[i] != sent[i]) begin $display("  first difference at bit %0d", i); break; end
      end
    end
    $display("words %0d, emulation bytes %0d", n_words, n_emul);
    checks++;
    if (n_emul == 0) begin failures++; $display("FAIL no emulation prevention byte inserted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

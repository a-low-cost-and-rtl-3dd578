// Self-checking testbench of cbp_generator. For each macro-block a random
// pattern of nonzero sub-blocks is chosen (including coefficients placed only in
// the ignored label-0 field of AC blocks) and the 26 sub-blocks are written one
// per cycle in Sub-block Index order. The coded block pattern after the last
// write is compared with one computed from the chosen pattern; the Nonzero
// Block Tag is checked too.
module tb_cbp_generator;
  import cavlc_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         clear, wr_en, intra16x16;
  logic [4:0]   sb_index;
  logic [223:0] luma_cof;
  logic [191:0] chroma_cof;
  logic [55:0]  u_dc, v_dc;
  logic [25:0]  nz_block_tag;
  logic [5:0]   cbp;

  cbp_generator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_label0 = 0;
  int n_chroma [3] = '{0, 0, 0};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [25:0] tag;
    logic [5:0]  exp;
    int          lbl, dense, ch;
    clear = 0; wr_en = 0; intra16x16 = 0; sb_index = 0;
    luma_cof = 0; chroma_cof = 0; u_dc = 0; v_dc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int mb = 0; mb < 1500; mb++) begin
      clear = 1;
      @(negedge clk);
      clear = 0;
      intra16x16 = $urandom_range(0, 1);
      dense = $urandom_range(0, 8);
      tag = '0;
      for (int sb = 0; sb < 26; sb++) begin
        luma_cof = '0; chroma_cof = '0; u_dc = '0; v_dc = '0;
        wr_en = 1; sb_index = 5'(sb);
        if ($urandom_range(0, 8) < dense) begin
          if ($urandom_range(0, 3) == 0) begin
            // only the label-0 field is nonzero
            lbl = 0;
            n_label0++;
            if (sb < 16) begin luma_cof[223:210] = 14'($urandom_range(1, 9000)); tag[sb] = !intra16x16; end
            else if (sb == 16) begin u_dc[55:42] = 14'($urandom_range(1, 9000)); tag[sb] = 1; end
            else if (sb == 17) begin v_dc[55:42] = 14'($urandom_range(1, 9000)); tag[sb] = 1; end
            else chroma_cof[191:180] = 12'($urandom_range(1, 2000));
          end else begin
            tag[sb] = 1;
            if (sb < 16) begin lbl = $urandom_range(1, 15); luma_cof[14*(15-lbl) +: 14] = 14'(-1); end
            else if (sb < 18) begin
              lbl = $urandom_range(0, 3);
              if (sb == 16) u_dc[14*(3-lbl) +: 14] = 14'($urandom_range(1, 9000));
              else          v_dc[14*(3-lbl) +: 14] = 14'($urandom_range(1, 9000));
            end else begin lbl = $urandom_range(1, 15); chroma_cof[12*(15-lbl) +: 12] = 12'd1; end
          end
        end
        @(negedge clk);
      end
      wr_en = 0;
      for (int g = 0; g < 4; g++) exp[g] = |tag[4*g +: 4];
      ch = (|tag[25:18]) ? 2 : (|tag[17:16]) ? 1 : 0;
      exp[5:4] = 2'(ch);
      n_chroma[ch]++;
      checks += 2;
      if (nz_block_tag !== tag) begin
        failures++;
        if (failures < 20) $display("FAIL mb %0d tag %b want %b", mb, nz_block_tag, tag);
      end
      if (cbp !== exp) begin
        failures++;
        if (failures < 20) $display("FAIL mb %0d cbp %b want %b", mb, cbp, exp);
      end
    end
    $display("label-0-only sub-blocks %0d, chroma pattern 0/1/2: %p", n_label0, n_chroma);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

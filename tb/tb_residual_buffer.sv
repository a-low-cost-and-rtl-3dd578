// Self-checking testbench of residual_buffer. Random whole-word writes to the
// luma and chroma SRAMs and the three DC registers are mixed with random reads.
// SRAM data must appear one cycle after the read address and must hold while
// no read is issued; the registers must show their last written value at once.
// Every word is written before it is read.
module tb_residual_buffer;
  import cavlc_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         luma_we, chroma_we, ldc_we, cdcu_we, cdcv_we, luma_re, chroma_re;
  logic [3:0]   luma_waddr, luma_raddr;
  logic [2:0]   chroma_waddr, chroma_raddr;
  logic [223:0] luma_wdata, ldc_wdata, sram_luma_data, reg_luma_dc;
  logic [191:0] chroma_wdata, sram_chroma_data;
  logic [55:0]  cdcu_wdata, cdcv_wdata, reg_chro_dcu, reg_chro_dcv;

  residual_buffer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [223:0] m_luma [16];
  logic [191:0] m_chroma [8];
  logic [223:0] m_ldc, exp_l;
  logic [55:0]  m_u, m_v;
  logic [191:0] exp_c;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [223:0] rnd224();
    logic [223:0] v;
    for (int i = 0; i < 7; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(string what, logic [223:0] got, logic [223:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h want %h", what, got, exp);
    end
  endtask

  initial begin
    {luma_we, chroma_we, ldc_we, cdcu_we, cdcv_we, luma_re, chroma_re} = '0;
    luma_waddr = 0; luma_raddr = 0; chroma_waddr = 0; chroma_raddr = 0;
    luma_wdata = 0; ldc_wdata = 0; chroma_wdata = 0; cdcu_wdata = 0; cdcv_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("LDC after reset", reg_luma_dc, '0);
    check("CDCU after reset", 224'(reg_chro_dcu), '0);
    check("CDCV after reset", 224'(reg_chro_dcv), '0);
    // fill every word
    for (int i = 0; i < 16; i++) begin
      luma_we = 1; luma_waddr = 4'(i); luma_wdata = rnd224(); m_luma[i] = luma_wdata;
      chroma_we = (i < 8); chroma_waddr = 3'(i); chroma_wdata = 192'(rnd224());
      if (i < 8) m_chroma[i] = chroma_wdata;
      @(negedge clk);
    end
    luma_we = 0; chroma_we = 0;
    ldc_we = 1; ldc_wdata = rnd224(); m_ldc = ldc_wdata;
    cdcu_we = 1; cdcu_wdata = 56'(rnd224()); m_u = cdcu_wdata;
    cdcv_we = 1; cdcv_wdata = 56'(rnd224()); m_v = cdcv_wdata;
    @(negedge clk);
    {ldc_we, cdcu_we, cdcv_we} = '0;
    exp_l = '0; exp_c = '0;
    for (int i = 0; i < 5000; i++) begin
      luma_re = $urandom_range(0, 1); luma_raddr = 4'($urandom);
      chroma_re = $urandom_range(0, 1); chroma_raddr = 3'($urandom);
      luma_we = $urandom_range(0, 3) == 0; luma_waddr = 4'($urandom); luma_wdata = rnd224();
      chroma_we = $urandom_range(0, 3) == 0; chroma_waddr = 3'($urandom);
      chroma_wdata = 192'(rnd224());
      if (luma_we && luma_re && luma_waddr == luma_raddr) luma_we = 0;
      if (chroma_we && chroma_re && chroma_waddr == chroma_raddr) chroma_we = 0;
      ldc_we = $urandom_range(0, 7) == 0; ldc_wdata = rnd224();
      cdcu_we = $urandom_range(0, 7) == 0; cdcu_wdata = 56'(rnd224());
      cdcv_we = $urandom_range(0, 7) == 0; cdcv_wdata = 56'(rnd224());
      if (luma_re) exp_l = m_luma[luma_raddr];
      if (chroma_re) exp_c = m_chroma[chroma_raddr];
      @(negedge clk);
      if (luma_we) m_luma[luma_waddr] = luma_wdata;
      if (chroma_we) m_chroma[chroma_waddr] = chroma_wdata;
      if (ldc_we) m_ldc = ldc_wdata;
      if (cdcu_we) m_u = cdcu_wdata;
      if (cdcv_we) m_v = cdcv_wdata;
      if (i > 0) begin
        check("luma SRAM read", sram_luma_data, exp_l);
        check("chroma SRAM read", 224'(sram_chroma_data), 224'(exp_c));
      end
      check("LDC", reg_luma_dc, m_ldc);
      check("CDCU", 224'(reg_chro_dcu), 224'(m_u));
      check("CDCV", 224'(reg_chro_dcv), 224'(m_v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

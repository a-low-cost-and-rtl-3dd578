// Self-checking testbench of cavlc_data_ready. For random block types, block
// indices, macro-block positions and coded block patterns it checks that the
// block information is registered on 'blk_start', that the CBP-skip decision
// 'is_cs' is right for every block type, that 'nz_flags' marks exactly the
// nonzero coefficients on 'cof', and that 'load' stores the coefficients into
// the Input Buffer, which then holds them while 'load' is low.
module tb_cavlc_data_ready;
  import cavlc_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       blk_start, load;
  blk_type_t  block_type, blk_typ_cur;
  logic [4:0] block_idx, blk_idx_cur;
  logic [6:0] mb_x, mb_y, mb_x_cur, mb_y_cur;
  logic [5:0] cbp, cbp_cur;
  coef_arr_t  cof, input_buf, exp_buf;
  logic       is_cs;
  logic [15:0] nz_flags;

  cavlc_data_ready dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_cs = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h want %h", what, got, exp);
    end
  endtask

  initial begin
    blk_type_t t;
    logic [4:0] bi;
    logic [6:0] x, y;
    logic [5:0] cb;
    logic cs;
    logic [15:0] nzf;
    blk_start = 0; load = 0; block_type = BT_LUMA; block_idx = 0; mb_x = 0; mb_y = 0;
    cbp = 0; cof = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_buf = '0;
    @(negedge clk);
    check("input buffer after reset", input_buf, exp_buf);
    for (int i = 0; i < 4000; i++) begin
      t  = blk_type_t'($urandom_range(0, 4));
      bi = (t == BT_LUMA || t == BT_LUMA_AC) ? 5'($urandom_range(0, 15)) :
           (t == BT_CHROMA_AC) ? 5'($urandom_range(16, 23)) : 5'($urandom_range(0, 1));
      x = 7'($urandom); y = 7'($urandom);
      cb = {2'($urandom_range(0, 2)), 4'($urandom_range(0, 15) & $urandom_range(0, 15))};
      case (t)
        BT_LUMA_DC:   cs = 0;
        BT_LUMA_AC:   cs = (cb[3:0] == 0);
        BT_LUMA:      cs = !cb[bi[3:2]];
        BT_CHROMA_DC: cs = (cb[5:4] == 0);
        default:      cs = (cb[5:4] != 2);
      endcase
      blk_start = 1; block_type = t; block_idx = bi; mb_x = x; mb_y = y; cbp = cb;
      @(negedge clk);
      blk_start = 0;
      block_type = BT_LUMA; block_idx = 0; mb_x = 0; mb_y = 0; cbp = 0;   // registered copies must hold
      nzf = '0;
      for (int k = 0; k < 16; k++) begin
        cof[k] = ($urandom_range(0, 2) == 0) ? coef_t'($urandom_range(0, 65535)) : '0;
        nzf[k] = (cof[k] != 0);
      end
      load = !cs;
      #1;
      check("block type", 256'(blk_typ_cur), 256'(t));
      check("block index", 256'(blk_idx_cur), 256'(bi));
      check("mb_x/mb_y", 256'({mb_x_cur, mb_y_cur}), 256'({x, y}));
      check("cbp", 256'(cbp_cur), 256'(cb));
      check("is_cs", 256'(is_cs), 256'(cs));
      check("nz_flags", 256'(nz_flags), 256'(nzf));
      n_cs += cs;
      if (!cs) exp_buf = cof;
      @(negedge clk);
      load = 0;
      cof = '0;
      check("input buffer", input_buf, exp_buf);
    end
    $display("skipped sub-blocks %0d", n_cs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

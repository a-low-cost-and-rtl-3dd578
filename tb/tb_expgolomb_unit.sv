// Self-checking testbench of expgolomb_unit. Applies codeNum values of every
// length class (0 up to 65535) in ue(v) mode, signed values in se(v) mode, and
// all 48 coded block patterns in me(v) mode for both the intra and the inter
// mapping, and compares codeword and length with an independent reference.
// Purely combinational: no cycle counts apply.
module tb_expgolomb_unit;
  import cavlc_ref_pkg::*;

  logic [1:0]  mode;
  logic        intra;
  logic [15:0] data;
  logic [31:0] word;
  logic [5:0]  len;

  expgolomb_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string exp);
    #1;
    checks++;
    if (int'(len) != exp.len() || w2s(word, int'(len)) != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL mode=%0d intra=%0d data=%0d: got %s want %s", mode, intra, data,
                 w2s(word, int'(len)), exp);
    end
  endtask

  initial begin
    int v;
    intra = 0;
    mode = 0;
    for (int i = 0; i < 300; i++) begin data = 16'(i); check(ue(i)); end
    for (int i = 0; i < 2000; i++) begin
      v = $urandom_range(0, 65535) >> $urandom_range(0, 15);
      data = 16'(v); check(ue(v));
    end
    data = 16'hfffe; check(ue(65534));   // largest codeNum whose codeword fits 32 bits
    mode = 1;
    for (int i = -300; i <= 300; i++) begin data = 16'(i); check(se(i)); end
    for (int i = 0; i < 2000; i++) begin
      v = int'($urandom_range(0, 32767) >> $urandom_range(0, 14));
      if ($urandom_range(0, 1)) v = -v;
      data = 16'(v); check(se(v));
    end
    mode = 2;
    for (int k = 0; k < 2; k++) begin
      intra = k[0];
      for (int c = 0; c < 48; c++) begin data = 16'(c); check(me_cbp(c, intra)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of sram_nonzero at its full default size. Writes
// random TotalCoeff values to random addresses and reads random addresses,
// comparing each read, one cycle after the address, with a model array. Every
// word is written first so that no uninitialised word is read.
module tb_sram_nonzero;
  localparam int AW = 7 + 5;

  logic          clk = 0;
  logic          en, we;
  logic [AW-1:0] addr;
  logic [4:0]    wdata, rdata;

  sram_nonzero dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [4:0] model [1 << AW];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] a;
    en = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < (1 << AW); i++) begin
      en = 1; we = 1; addr = AW'(i); wdata = 5'($urandom_range(0, 16));
      model[i] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 40000; i++) begin
      a = AW'($urandom);
      en = ($urandom_range(0, 7) != 0);
      we = en && ($urandom_range(0, 2) == 0);
      addr = a; wdata = 5'($urandom_range(0, 16));
      @(negedge clk);
      if (en && we) model[a] = wdata;
      else if (en) begin
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          if (failures < 20) $display("FAIL read %0h: got %0d want %0d", a, rdata, model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

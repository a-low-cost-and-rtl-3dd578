// sram_nonzero: single-port memory holding the TotalCoeff of already encoded
// sub-blocks for one row of macro-blocks, so that nC can be formed from the top
// and left neighbours. Address = {mb_addr (macro-block column), sb_addr (one of
// the 24 luma and chroma AC sub-blocks)}; one 5-bit word per sub-block.
// Synchronous: with en=1 and we=0 the word at addr appears on rdata after the
// next clock edge; with we=1 wdata is written at that edge.
// The default of 7 column bits serves frames up to 128 macro-blocks wide
// (1080p: 120), giving 4096 x 5 bits; the design example for QCIF uses 4 bits
// (512 x 5). Written as an array; a foundry SRAM macro would replace it.
module sram_nonzero #(
  parameter int unsigned MB_ADDR_W = 7
) (
  input  logic                   clk,
  input  logic                   en,
  input  logic                   we,
  input  logic [MB_ADDR_W+4:0]   addr,
  input  logic [4:0]             wdata,
  output logic [4:0]             rdata
);

  logic [4:0] mem [2**(MB_ADDR_W+5)];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule

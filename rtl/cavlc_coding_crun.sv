// run_before codeword collector of the CAVLC encoder.
// run_before values become known one per cycle while the Nonzero Index Table is
// walked, well before they may be sent (they come last in a sub-block's syntax).
// Instead of storing the run values, each one is coded at once with the
// run_before table (indexed by zerosLeft, saturated at 7 for "more than 6") and
// appended to crun_word_cur, a 32-bit right-aligned register. The total length of
// all run_before codewords of a 4x4 block is at most 25 bits, so the register
// never overflows. The collected bits are presented left-aligned on 'word' with
// their length, to be sent as a single codeword in one cycle.
// 'clear' empties the register at the start of a sub-block; 'run_valid' appends
// the codeword of 'run_before' under 'zeros_left' at the next clock edge.
// Structure as in the design description; the right-aligned register layout is
// this design's choice.
// Lint note: rst_n also disables the assertion at the end of the module, which
// the linter reports as a reset used both synchronously and asynchronously;
// the circuit uses it only as an asynchronous reset.
module cavlc_coding_crun
  import cavlc_pkg::*;
  import cavlc_tables_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        run_valid,
  input  logic [3:0]  run_before,
  input  logic [3:0]  zeros_left,   // zerosLeft before this run (1..15)
  output logic [31:0] word,         // left-aligned concatenation
  output logic [5:0]  len
);

  logic [31:0] crun_word_cur;
  logic [5:0]  crun_len_cur;
  vlc_t        rb;
  logic [2:0]  zl_sat;

  always_comb begin
    zl_sat = (zeros_left > 4'd6) ? 3'd7 : zeros_left[2:0];
    rb     = run_before_vlc(zl_sat, run_before);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crun_word_cur <= '0;
      crun_len_cur  <= '0;
    end else if (clear) begin
      crun_word_cur <= '0;
      crun_len_cur  <= '0;
    end else if (run_valid) begin
      crun_word_cur <= (crun_word_cur << rb.len) | 32'(rb.code);
      crun_len_cur  <= crun_len_cur + 6'(rb.len);
    end
  end

  assign word = left_align(crun_word_cur, crun_len_cur);
  assign len  = crun_len_cur;

  assert property (@(posedge clk) disable iff (!rst_n)
                   run_valid && !clear |-> (rb.len != 5'd0 && crun_len_cur + 6'(rb.len) <= 6'd32))
    else $error("cavlc_coding_crun: illegal run_before %0d for zerosLeft %0d", run_before, zeros_left);

endmodule

// Controller and output multiplexer of the CAVLC encoder.
// Sequences one sub-block and decides which codeword goes to the bit-stream
// packer in each cycle. Cycle numbers count from the entropy SRAM interface's
// update of the block index (cycle 0); 'blk_start' arrives in cycle 1.
//   DATA    (cycle 2) CBP-skip check. Skipped (CS): its TotalCoeff 0 is written
//           to sram_nonzero and the block ends (3 cycles). Otherwise the Input
//           Buffer and Nonzero Index Table load, and the top neighbour is read.
//   ANALYZE (cycle 3) TotalCoeff / total_zeros / all-zero flag; left neighbour read.
//   SCAN    (cycle 4..) trailing-one search, one coefficient per cycle, until
//           TrailingOnes is settled. An all-zero block goes to ZERO instead.
//   ZERO    (cycle 5) Zero-block Codeword Table output; block ends (6 cycles).
//   TOKEN   coeff_token; TotalCoeff is written to sram_nonzero.
//   SIGN    trailing_one_sign_flags (nothing sent when there are none).
//   LEVEL   one level per cycle, consuming the Nonzero Index Table, until it is
//           empty (levels + 1 cycles).
//   TZ      total_zeros (skipped when TotalCoeff is the block's maximum).
//   RUN     the collected run_before codewords; block ends.
// A sub-block with a nonzero coefficient thus takes 9 + x + y cycles, x being
// 0, 1, 2, 2 for 0..3 trailing ones and y the number of levels plus one.
// The cycle budget per block class follows the design description; the state
// encoding and the exact cycle of the sram_nonzero write are this design's.
// Lint note: rst_n also disables the assertion at the end of the module, which
// the linter reports as a reset used both synchronously and asynchronously;
// the circuit uses it only as an asynchronous reset.
module cavlc_mux
  import cavlc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        blk_start,
  input  blk_type_t   blk_typ_cur,
  input  logic        is_cs,
  input  logic        zero_blk_cur,
  input  logic        t1_end,
  input  logic        empty,
  input  logic [4:0]  num_nz_cur,
  input  logic [1:0]  num_t1_cur,
  input  logic [2:0]  sign_t1_cur,
  input  logic [31:0] zero_word,  input logic [5:0] zero_len,
  input  logic [31:0] token_word, input logic [5:0] token_len,
  input  logic [31:0] level_word, input logic [5:0] level_len,
  input  logic [31:0] tz_word,    input logic [5:0] tz_len,
  input  logic [31:0] crun_word,  input logic [5:0] crun_len,
  output logic        load,
  output logic        analyze,
  output logic        t1_step,
  output logic        lvl_step,
  output logic        level_init,
  output logic        rd_top,
  output logic        rd_left,
  output logic        wr_tc,
  output logic [4:0]  tc_wdata,
  output logic        busy,
  output logic        blk_done,
  output blk_class_t  blk_class,
  output cw_t         cw
);

  typedef enum logic [3:0] {
    S_IDLE, S_DATA, S_ANALYZE, S_SCAN, S_ZERO, S_TOKEN, S_SIGN, S_LEVEL, S_TZ, S_RUN
  } state_t;

  state_t state, state_nx;
  logic   below_max;

  assign below_max = num_nz_cur < max_coeff(blk_typ_cur);

  always_comb begin
    state_nx   = state;
    load       = 1'b0;
    analyze    = 1'b0;
    t1_step    = 1'b0;
    lvl_step   = 1'b0;
    level_init = 1'b0;
    rd_top     = 1'b0;
    rd_left    = 1'b0;
    wr_tc      = 1'b0;
    tc_wdata   = '0;
    blk_done   = 1'b0;
    blk_class  = CLS_NAZ;
    cw         = '0;
    unique case (state)
      S_IDLE: if (blk_start) state_nx = S_DATA;
      S_DATA: begin
        if (is_cs) begin
          wr_tc     = 1'b1;
          blk_done  = 1'b1;
          blk_class = CLS_CS;
          state_nx  = S_IDLE;
        end else begin
          load     = 1'b1;
          rd_top   = 1'b1;
          state_nx = S_ANALYZE;
        end
      end
      S_ANALYZE: begin
        analyze  = 1'b1;
        rd_left  = 1'b1;
        state_nx = S_SCAN;
      end
      S_SCAN: begin
        if (zero_blk_cur) state_nx = S_ZERO;
        else begin
          t1_step = 1'b1;
          if (t1_end) state_nx = S_TOKEN;
        end
      end
      S_ZERO: begin
        cw        = '{valid: 1'b1, len: zero_len, word: zero_word};
        wr_tc     = 1'b1;
        blk_done  = 1'b1;
        blk_class = CLS_NSZB;
        state_nx  = S_IDLE;
      end
      S_TOKEN: begin
        cw       = '{valid: 1'b1, len: token_len, word: token_word};
        wr_tc    = 1'b1;
        tc_wdata = num_nz_cur;
        state_nx = S_SIGN;
      end
      S_SIGN: begin
        cw.valid   = (num_t1_cur != 2'd0);
        cw.len     = 6'(num_t1_cur);
        cw.word    = left_align(32'(sign_t1_cur), 6'(num_t1_cur));
        level_init = 1'b1;
        state_nx   = S_LEVEL;
      end
      S_LEVEL: begin
        if (!empty) begin
          cw       = '{valid: 1'b1, len: level_len, word: level_word};
          lvl_step = 1'b1;
        end else state_nx = S_TZ;
      end
      S_TZ: begin
        if (below_max) cw = '{valid: 1'b1, len: tz_len, word: tz_word};
        state_nx = S_RUN;
      end
      S_RUN: begin
        if (crun_len != 6'd0) cw = '{valid: 1'b1, len: crun_len, word: crun_word};
        blk_done = 1'b1;
        state_nx = S_IDLE;
      end
      default: state_nx = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;
  end

  assign busy = (state != S_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n) blk_start |-> state == S_IDLE)
    else $error("cavlc_mux: new sub-block started while busy");

endmodule

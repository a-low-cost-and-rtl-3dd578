// Nonzero Index Table and syntax-element extraction of the CAVLC encoder.
// The Nonzero Index Table (NZT) has one bit per Input Buffer entry, set where the
// coefficient is nonzero. FindLeadingOne gives the stop index: the highest set
// bit. Each consumed coefficient has its NZT bit cleared, and the start index
// moves to its position, so the next cycle's stop index jumps straight to the next
// nonzero coefficient, skipping any number of zeros.
// Operations, one per cycle, chosen by the controller:
//  load    : NZT <= nonzero flags of the incoming sub-block, start index <= 15;
//  analyze : TotalCoeff (population count of the NZT), total_zeros
//            (stop index + 1 - TotalCoeff, or 0) and the all-zero flag are registered;
//  t1_step : if the coefficient at the stop index has magnitude 1 and fewer than
//            three trailing ones were found, it is a trailing one: its sign is
//            shifted into sign_t1_cur, num_t1_cur counts it and it is consumed.
//            t1_end tells that TrailingOnes is settled after this cycle;
//  lvl_step: the coefficient at the stop index (a level) is consumed.
// In the cycle after a coefficient is consumed, its run_before
// (start index - stop index - 1) is output with the current zerosLeft, provided
// a lower nonzero coefficient remains and zerosLeft > 0; zerosLeft then drops by it.
// Behaviour per the design description; the exact control encoding is this
// design's choice.
module cavlc_scan
  import cavlc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [15:0] nz_flags,
  input  coef_arr_t   input_buf,
  input  logic        analyze,
  input  logic        t1_step,
  input  logic        lvl_step,
  output logic [15:0] nzt,
  output logic        empty,          // no set bit left in the NZT
  output logic [3:0]  stop_idx,
  output coef_t       cur_coef,       // coefficient at the stop index
  output logic [4:0]  num_nz_cur,     // TotalCoeff
  output logic [3:0]  total_run_cur,  // total_zeros
  output logic        zero_blk_cur,
  output logic [1:0]  num_t1_cur,
  output logic [2:0]  sign_t1_cur,
  output logic        t1_end,
  output logic        run_valid,
  output logic [3:0]  run_before,
  output logic [3:0]  zeros_left
);

  logic [3:0] start_idx;
  logic       run_pend;
  logic       is_t1, consume;
  logic [4:0] popcnt;

  // FindLeadingOne and population count
  always_comb begin
    stop_idx = 4'd0;
    for (int i = 0; i < 16; i++) if (nzt[i]) stop_idx = 4'(i);
    popcnt = '0;
    for (int i = 0; i < 16; i++) popcnt = popcnt + 5'(nzt[i]);
  end

  assign empty    = (nzt == 16'd0);
  assign cur_coef = input_buf[stop_idx];
  assign is_t1    = !empty && num_t1_cur != 2'd3 &&
                    (cur_coef == coef_t'(1) || cur_coef == coef_t'(-1));
  assign t1_end   = !is_t1 || num_t1_cur == 2'd2;
  assign consume  = (t1_step && is_t1) || (lvl_step && !empty);

  assign run_valid  = run_pend && !empty && zeros_left != 4'd0;
  assign run_before = start_idx - stop_idx - 4'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nzt           <= '0;
      start_idx     <= 4'd15;
      run_pend      <= 1'b0;
      num_nz_cur    <= '0;
      total_run_cur <= '0;
      zero_blk_cur  <= 1'b0;
      num_t1_cur    <= '0;
      sign_t1_cur   <= '0;
      zeros_left    <= '0;
    end else if (load) begin
      nzt         <= nz_flags;
      start_idx   <= 4'd15;
      run_pend    <= 1'b0;
      num_t1_cur  <= '0;
      sign_t1_cur <= '0;
      zeros_left  <= '0;
    end else begin
      if (analyze) begin
        num_nz_cur    <= popcnt;
        zero_blk_cur  <= empty;
        total_run_cur <= empty ? 4'd0 : 4'(5'(stop_idx) + 5'd1 - popcnt);
        zeros_left    <= empty ? 4'd0 : 4'(5'(stop_idx) + 5'd1 - popcnt);
      end else if (run_valid) begin
        zeros_left <= zeros_left - run_before;
      end
      run_pend <= consume;
      if (consume) begin
        nzt[stop_idx] <= 1'b0;
        start_idx     <= stop_idx;
      end
      if (t1_step && is_t1) begin
        num_t1_cur  <= num_t1_cur + 2'd1;
        sign_t1_cur <= {sign_t1_cur[1:0], cur_coef[COEF_W-1]};
      end
    end
  end

endmodule

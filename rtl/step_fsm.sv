// step_fsm: step state machine of the CAVLC decoder.
//
// Runs the five steps of one residual block in order - Coeff_token,
// Trailing_ones, Level, Total_zeros, Run_before - and emits the State_select
// code of Table 1 for the active step and table.  Steps that have nothing to
// decode are skipped: Trailing_ones when TrailingOnes = 0, Level when all
// coefficients are trailing ones, Total_zeros when TotalCoeff equals the
// block's maximum, Run_before when TotalZeros = 0 or TotalCoeff = 1.
//
// It keeps the block's bookkeeping: TotalCoeff and TrailingOnes (from
// Coeff_token), the number of levels decoded (Count_codes_Level), the current
// Level_VLC table, Zero_left and the number of runs decoded
// (Count_codes_Run_before).  The Coeff_token table is chosen from
// N = (N_u + N_l + 1) >> 1 (Table 2 of the description; rounding as in
// H.264/AVC).  The first Level table is Level_VLC1 when TotalCoeff > 10 and
// TrailingOnes < 3, else Level_VLC0.
//
// A step acts in a cycle where the window is valid (`act`); its decoder's
// results are taken at that clock edge.  After the last step the machine spends
// one cycle in ST_DONE, where a new block may already start.
module step_fsm
  import cavlc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  mode_t         mode,
  input  logic          win_valid,
  // step decoder results
  input  logic [4:0]    ct_total_coeff,
  input  logic [1:0]    ct_trailing_ones,
  input  logic [3:0]    lv_count,
  input  logic [2:0]    lv_next_sl,
  input  logic [3:0]    tz_total_zeros,
  input  logic [3:0]    rb_count,
  input  logic [3:0]    rb_next_zero_left,
  // control
  output step_t         step,
  output state_select_t state_select,
  output logic          act,
  output logic          busy,
  output logic          chroma_dc,
  output logic          t1_adj,
  output logic [4:0]    lv_max,         // levels still to decode
  output logic [4:0]    rb_max,         // runs still to decode
  output logic [4:0]    total_coeff,
  output logic [1:0]    trailing_ones,
  output logic [3:0]    total_zeros,
  output logic [4:0]    lv_idx,         // levels decoded so far
  output logic [4:0]    rb_idx,         // runs decoded so far
  output logic [3:0]    zero_left
);
  step_t      step_q;
  mode_t      mode_q;
  logic [4:0] tc_q, lv_q, rb_q;
  logic [1:0] t1_q;
  logic [2:0] sl_q;
  logic [3:0] tz_q, zl_q;
  logic [5:0] n_sum;   // N_u + N_l + 1; bit 0 is dropped by the halving
  logic [4:0] n_c;
  logic [4:0] max_coeff;

  assign step          = step_q;
  assign busy          = step_q != ST_IDLE;
  assign act           = win_valid && (step_q inside {ST_COEFF_TOKEN, ST_TRAILING_ONES, ST_LEVEL,
                                                      ST_TOTAL_ZEROS, ST_RUN_BEFORE});
  assign chroma_dc     = mode_q.chroma_dc;
  assign total_coeff   = tc_q;
  assign trailing_ones = t1_q;
  assign total_zeros   = tz_q;
  assign lv_idx        = lv_q;
  assign rb_idx        = rb_q;
  assign zero_left     = zl_q;
  assign t1_adj        = (lv_q == 5'(t1_q)) && (t1_q != 2'd3);
  assign lv_max        = tc_q - lv_q;
  assign rb_max        = tc_q - 5'd1 - rb_q;
  assign max_coeff     = mode_q.chroma_dc ? 5'd4 : (mode_q.ac ? 5'd15 : 5'd16);

  // N from the neighbours' nonzero counts
  always_comb begin
    n_sum = 6'(mode_q.n_upper) + 6'(mode_q.n_left) + 6'd1;
    if (mode_q.upper_avail && mode_q.left_avail) n_c = n_sum[5:1];
    else if (mode_q.upper_avail)                 n_c = mode_q.n_upper;
    else if (mode_q.left_avail)                  n_c = mode_q.n_left;
    else                                         n_c = 5'd0;
  end

  always_comb begin
    unique case (step_q)
      ST_COEFF_TOKEN:
        if (mode_q.chroma_dc || n_c >= 5'd8) state_select = SS_NUM_VLC_DC;
        else if (n_c >= 5'd4)                state_select = SS_NUM_VLC2;
        else if (n_c >= 5'd2)                state_select = SS_NUM_VLC1;
        else                                 state_select = SS_NUM_VLC0;
      ST_TRAILING_ONES: state_select = SS_T1;
      ST_LEVEL:         state_select = state_select_t'({1'b1, sl_q});
      ST_TOTAL_ZEROS:   state_select = mode_q.chroma_dc ? SS_TZ_DC : SS_TZ;
      ST_RUN_BEFORE:    state_select = SS_RUN;
      default:          state_select = SS_NUM_VLC0;
    endcase
  end

  // step that follows the last level
  function automatic step_t after_levels(logic [4:0] tc, logic [4:0] maxc);
    return (tc < maxc) ? ST_TOTAL_ZEROS : ST_DONE;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q <= ST_IDLE;
      mode_q <= '0;
      tc_q   <= '0;
      t1_q   <= '0;
      lv_q   <= '0;
      rb_q   <= '0;
      sl_q   <= '0;
      tz_q   <= '0;
      zl_q   <= '0;
    end else begin
      unique case (step_q)
        ST_IDLE, ST_DONE:
          if (start) begin
            step_q <= ST_COEFF_TOKEN;
            mode_q <= mode;
            lv_q   <= '0;
            rb_q   <= '0;
            tz_q   <= '0;
            zl_q   <= '0;
          end else begin
            step_q <= ST_IDLE;
          end
        ST_COEFF_TOKEN:
          if (act) begin
            tc_q <= ct_total_coeff;
            t1_q <= ct_trailing_ones;
            sl_q <= (ct_total_coeff > 5'd10 && ct_trailing_ones != 2'd3) ? 3'd1 : 3'd0;
            if (ct_total_coeff == 5'd0)        step_q <= ST_DONE;
            else if (ct_trailing_ones != 2'd0) step_q <= ST_TRAILING_ONES;
            else                               step_q <= ST_LEVEL;
          end
        ST_TRAILING_ONES:
          if (act) begin
            lv_q <= 5'(t1_q);
            if (tc_q > 5'(t1_q)) step_q <= ST_LEVEL;
            else                 step_q <= after_levels(tc_q, max_coeff);
          end
        ST_LEVEL:
          if (act) begin
            lv_q <= lv_q + 5'(lv_count);
            sl_q <= lv_next_sl;
            if (lv_q + 5'(lv_count) >= tc_q) step_q <= after_levels(tc_q, max_coeff);
          end
        ST_TOTAL_ZEROS:
          if (act) begin
            tz_q <= tz_total_zeros;
            zl_q <= tz_total_zeros;
            if (tz_total_zeros == 4'd0 || tc_q == 5'd1) step_q <= ST_DONE;
            else                                       step_q <= ST_RUN_BEFORE;
          end
        ST_RUN_BEFORE:
          if (act) begin
            rb_q <= rb_q + 5'(rb_count);
            zl_q <= rb_next_zero_left;
            if (rb_next_zero_left == 4'd0 || rb_q + 5'(rb_count) >= tc_q - 5'd1) step_q <= ST_DONE;
          end
        default: step_q <= ST_IDLE;
      endcase
    end
  end
endmodule

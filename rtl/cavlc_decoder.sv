// cavlc_decoder: logical-operation-based parallel CAVLC residual decoder.
//
// Decodes H.264/AVC baseline-profile CAVLC residual blocks (4x4 luma, AC and
// 2x2 chroma DC) from a bitstream without any lookup memory.  A barrel shifter
// presents the next 28 stream bits to five step decoders (Coeff_token,
// Trailing_ones, Level, Total_zeros, Run_before); the step state machine
// enables one of them per cycle, and the active one returns its code length
// (Length_feedback) through a multiplexer to the shifter.  The Level and
// Run_before decoders look at M = 8 bits at once and decode every codeword
// that fits in them in one cycle (at least one per cycle); the other steps
// decode one syntax element per cycle (all trailing-one signs at once).
// Decoded values go to a buffer, from which the buffer controller rebuilds the
// coefficients in scan order.
//
// Interface: stream words on s_data/s_valid/s_ready (bit 31 first).  Pulse
// `start` with `mode` (block type, neighbour nonzero counts) when the stream
// is at the start of a residual block and `busy` is low, or in the cycle
// `out_valid`'s block is in ST_DONE (busy high, step DONE - see `ready_for_start`).
// The decoder needs at least 28 stream bits beyond the
// current code to act, so the stream must continue (or be padded) past the
// last block.  `out_valid` pulses once per block with out_coeff[0..15] in scan
// order (coefficients beyond the block's size are 0) and its TotalCoeff.
// `codes_decoded` counts the codewords consumed in each cycle; `error` pulses
// on a bit pattern that is no valid code.
//
// Block structure follows the description's Fig. 6; the stream handshake,
// the start/mode interface and the output format are this design's choices.
module cavlc_decoder
  import cavlc_pkg::*;
#(
  parameter int M = PAR_BITS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] s_data,
  input  logic        s_valid,
  output logic        s_ready,
  input  logic        start,
  input  mode_t       mode,
  output logic        ready_for_start,
  output logic        busy,
  output logic        out_valid,
  output level_t      out_coeff [16],
  output logic [4:0]  out_total_coeff,
  output logic [3:0]  codes_decoded,
  output step_t       step,
  output logic        error
);
  logic [WIN-1:0] window;
  logic           win_valid;
  logic [4:0]     length_feedback;

  // step state machine outputs
  state_select_t  state_select;
  logic           act, chroma_dc, t1_adj;
  logic [4:0]     lv_max, rb_max, total_coeff, lv_idx, rb_idx;
  logic [1:0]     trailing_ones;
  logic [3:0]     total_zeros, zero_left;

  // step decoder outputs
  logic [4:0]     ct_tc, ct_len;
  logic [1:0]     ct_t1;
  logic           ct_found;
  level_t         t1_level [3];
  logic [1:0]     t1_len;
  logic [3:0]     lv_count;
  logic [4:0]     lv_len;
  logic [2:0]     lv_next_sl;
  logic           lv_err;
  level_t         lv_temp [M];
  logic [3:0]     lv_temp_count;
  logic           lv_temp_valid;
  logic [4:0]     lv_base;
  logic [3:0]     tz_tz, tz_len;
  logic           tz_found;
  logic [3:0]     rb_count, rb_len, rb_next_zl;
  logic [3:0]     rb_run [M];

  level_t         levels_next [16];
  logic [3:0]     runs_next [16];

  assign ready_for_start = (step == ST_IDLE) || (step == ST_DONE);

  barrel_shifter #(.WIN(WIN), .BUF(64)) u_shifter (
    .clk(clk), .rst_n(rst_n), .flush(1'b0),
    .s_data(s_data), .s_valid(s_valid), .s_ready(s_ready),
    .shift(length_feedback), .window(window), .win_valid(win_valid)
  );

  step_fsm u_fsm (
    .clk(clk), .rst_n(rst_n), .start(start), .mode(mode), .win_valid(win_valid),
    .ct_total_coeff(ct_tc), .ct_trailing_ones(ct_t1),
    .lv_count(lv_count), .lv_next_sl(lv_next_sl),
    .tz_total_zeros(tz_tz),
    .rb_count(rb_count), .rb_next_zero_left(rb_next_zl),
    .step(step), .state_select(state_select), .act(act), .busy(busy), .chroma_dc(chroma_dc),
    .t1_adj(t1_adj), .lv_max(lv_max), .rb_max(rb_max), .total_coeff(total_coeff),
    .trailing_ones(trailing_ones), .total_zeros(total_zeros), .lv_idx(lv_idx), .rb_idx(rb_idx),
    .zero_left(zero_left)
  );

  coeff_token_dec u_coeff_token (
    .code(window[WIN-1 -: 16]), .sel(state_select), .chroma_dc(chroma_dc),
    .total_coeff(ct_tc), .trailing_ones(ct_t1), .len(ct_len), .found(ct_found)
  );

  trailing_ones_dec u_trailing_ones (
    .code(window[WIN-1 -: 3]), .t1(trailing_ones), .level(t1_level), .len(t1_len)
  );

  level_dec #(.M(M)) u_level (
    .clk(clk), .rst_n(rst_n), .en(act && step == ST_LEVEL), .code(window),
    .state_select(state_select), .t1_adj(t1_adj), .max_codes(lv_max),
    .count(lv_count), .len(lv_len), .next_sl(lv_next_sl), .error(lv_err),
    .temp(lv_temp), .temp_count(lv_temp_count), .temp_valid(lv_temp_valid)
  );

  total_zeros_dec u_total_zeros (
    .code(window[WIN-1 -: 9]), .total_coeff(total_coeff), .chroma_dc(chroma_dc),
    .total_zeros(tz_tz), .len(tz_len), .found(tz_found)
  );

  run_before_dec #(.M(M)) u_run_before (
    .code(window[WIN-1 -: 11]), .zero_left(zero_left), .max_runs(rb_max),
    .count(rb_count), .run(rb_run), .len(rb_len), .next_zero_left(rb_next_zl)
  );

  // Length_feedback multiplexer and codeword counter
  always_comb begin
    length_feedback = '0;
    codes_decoded   = '0;
    error           = 1'b0;
    if (act) begin
      unique case (step)
        ST_COEFF_TOKEN:   begin length_feedback = ct_len;       codes_decoded = 4'd1;              error = !ct_found; end
        ST_TRAILING_ONES: begin length_feedback = 5'(t1_len);   codes_decoded = 4'(trailing_ones); end
        ST_LEVEL:         begin length_feedback = lv_len;       codes_decoded = lv_count;          error = lv_err; end
        ST_TOTAL_ZEROS:   begin length_feedback = 5'(tz_len);   codes_decoded = 4'd1;              error = !tz_found; end
        ST_RUN_BEFORE:    begin length_feedback = 5'(rb_len);   codes_decoded = rb_count; end
        default: ;
      endcase
    end
  end

  coef_buffer #(.M(M)) u_buffer (
    .clk(clk), .rst_n(rst_n),
    .t1_we(act && step == ST_TRAILING_ONES), .t1_count(trailing_ones), .t1_level(t1_level),
    .lv_we(lv_temp_valid), .lv_base(lv_base), .lv_count(lv_temp_count), .lv_level(lv_temp),
    .rb_we(act && step == ST_RUN_BEFORE), .rb_base(rb_idx), .rb_count(rb_count), .rb_run(rb_run),
    .levels_next(levels_next), .runs_next(runs_next)
  );

  buffer_ctrl u_buffer_ctrl (
    .clk(clk), .rst_n(rst_n), .step(step),
    .lv_act(act && step == ST_LEVEL), .lv_idx(lv_idx), .lv_base(lv_base),
    .total_coeff(total_coeff), .total_zeros(total_zeros), .rb_done(rb_idx),
    .levels(levels_next), .runs(runs_next),
    .out_valid(out_valid), .out_coeff(out_coeff), .out_total_coeff(out_total_coeff)
  );
endmodule

// tb_step_fsm: the step state machine against scripted blocks.  For each
// block the test plays the step decoders' results and checks the sequence of
// steps, the State_select code of each step (Table 1), the Coeff_token table
// chosen from the neighbour counts (Table 2), the first Level table, the
// skipping of steps with nothing to decode, and that a missing window holds
// the machine in its step.
module tb_step_fsm;
  import cavlc_pkg::*;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start, win_valid;
  mode_t         mode;
  logic [4:0]    ct_total_coeff;
  logic [1:0]    ct_trailing_ones;
  logic [3:0]    lv_count, tz_total_zeros, rb_count, rb_next_zero_left;
  logic [2:0]    lv_next_sl;
  step_t         step;
  state_select_t state_select;
  logic          act, busy, chroma_dc, t1_adj;
  logic [4:0]    lv_max, rb_max, total_coeff, lv_idx, rb_idx;
  logic [1:0]    trailing_ones;
  logic [3:0]    total_zeros, zero_left;
  int checks = 0, failures = 0;

  step_fsm dut (.clk(clk), .rst_n(rst_n), .start(start), .mode(mode), .win_valid(win_valid),
                .ct_total_coeff(ct_total_coeff), .ct_trailing_ones(ct_trailing_ones),
                .lv_count(lv_count), .lv_next_sl(lv_next_sl), .tz_total_zeros(tz_total_zeros),
                .rb_count(rb_count), .rb_next_zero_left(rb_next_zero_left),
                .step(step), .state_select(state_select), .act(act), .busy(busy), .chroma_dc(chroma_dc),
                .t1_adj(t1_adj), .lv_max(lv_max), .rb_max(rb_max), .total_coeff(total_coeff),
                .trailing_ones(trailing_ones), .total_zeros(total_zeros), .lv_idx(lv_idx), .rb_idx(rb_idx),
                .zero_left(zero_left));

  always #5 clk = ~clk;

  // Check the current step and State_select, then let one cycle pass.
  task automatic expect_step(step_t s, state_select_t ss, string what);
    @(negedge clk);
    checks++;
    if (step != s || (s != ST_DONE && state_select != ss)) begin
      failures++;
      $display("FAIL: %s: step %s ss %b, expected %s %b", what, step.name(), state_select, s.name(), ss);
    end
  endtask

  task automatic begin_block(mode_t m);
    @(negedge clk);
    mode = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
  endtask

  function automatic mode_t mk(bit dc, bit ac, bit ua, bit la, int nu, int nl);
    mode_t m;
    m = '0;
    m.chroma_dc = dc; m.ac = ac; m.upper_avail = ua; m.left_avail = la;
    m.n_upper = 5'(nu); m.n_left = 5'(nl);
    return m;
  endfunction

  initial begin
    start = 0; win_valid = 1; mode = '0;
    ct_total_coeff = 0; ct_trailing_ones = 0; lv_count = 0; lv_next_sl = 0; tz_total_zeros = 0;
    rb_count = 0; rb_next_zero_left = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // A: the example block, N = (3 + 2 + 1) >> 1 = 3 -> Num_VLC1
    mode = mk(0, 0, 1, 1, 3, 2); start = 1'b1;
    @(negedge clk); start = 1'b0;
    checks++;
    if (step != ST_COEFF_TOKEN || state_select != SS_NUM_VLC1) begin failures++; $display("FAIL: A coeff_token"); end
    ct_total_coeff = 5; ct_trailing_ones = 3;
    expect_step(ST_TRAILING_ONES, SS_T1, "A trailing ones");
    lv_count = 2; lv_next_sl = 1;
    expect_step(ST_LEVEL, SS_LEVEL0, "A level");
    checks++;
    if (lv_max != 5'd2 || t1_adj) begin failures++; $display("FAIL: A lv_max %0d t1_adj %0d", lv_max, t1_adj); end
    // hold one cycle without a window
    win_valid = 0;
    expect_step(ST_LEVEL, SS_LEVEL0, "A level held");
    win_valid = 1;
    tz_total_zeros = 3;
    expect_step(ST_TOTAL_ZEROS, SS_TZ, "A total zeros");
    rb_count = 4; rb_next_zero_left = 1;
    expect_step(ST_RUN_BEFORE, SS_RUN, "A run before");
    checks++;
    if (rb_max != 5'd4 || zero_left != 4'd3) begin failures++; $display("FAIL: A rb_max %0d zl %0d", rb_max, zero_left); end
    expect_step(ST_DONE, SS_RUN, "A done");
    checks++;
    if (rb_idx != 5'd4 || lv_idx != 5'd5) begin failures++; $display("FAIL: A counts"); end
    @(negedge clk);
    checks++;
    if (step != ST_IDLE || busy) begin failures++; $display("FAIL: A idle"); end

    // B: chroma DC, empty block
    begin_block(mk(1, 0, 1, 1, 10, 10));
    checks++;
    if (state_select != SS_NUM_VLC_DC || !chroma_dc) begin failures++; $display("FAIL: B table"); end
    ct_total_coeff = 0; ct_trailing_ones = 0;
    expect_step(ST_DONE, SS_RUN, "B done");

    // C: N = 9 -> fixed-length table; 16 coefficients, no trailing ones:
    //    Level_VLC1 first, +1 adjustment, Total_zeros skipped
    begin_block(mk(0, 0, 1, 1, 9, 9));
    checks++;
    if (state_select != SS_NUM_VLC_DC || chroma_dc) begin failures++; $display("FAIL: C table"); end
    ct_total_coeff = 16; ct_trailing_ones = 0;
    lv_count = 8; lv_next_sl = 3;
    @(negedge clk);
    checks++;
    if (step != ST_LEVEL || state_select != SS_LEVEL1 || !t1_adj || lv_max != 5'd16) begin
      failures++; $display("FAIL: C first level: %s %b adj %0d", step.name(), state_select, t1_adj);
    end
    expect_step(ST_LEVEL, SS_LEVEL3, "C second level cycle");
    checks++;
    if (t1_adj) begin failures++; $display("FAIL: C adjustment after first level"); end
    expect_step(ST_DONE, SS_RUN, "C done (no Total_zeros)");

    // D: AC block, only the left neighbour (N = 5 -> Num_VLC2), 15 coefficients
    begin_block(mk(0, 1, 0, 1, 20, 5));
    checks++;
    if (state_select != SS_NUM_VLC2) begin failures++; $display("FAIL: D table %b", state_select); end
    ct_total_coeff = 15; ct_trailing_ones = 1;
    expect_step(ST_TRAILING_ONES, SS_T1, "D trailing ones");
    lv_count = 7; lv_next_sl = 2;
    expect_step(ST_LEVEL, SS_LEVEL1, "D level 1");
    expect_step(ST_LEVEL, SS_LEVEL2, "D level 2");
    expect_step(ST_DONE, SS_RUN, "D done");

    // E: one coefficient, Total_zeros read, no Run_before; next block started in DONE
    begin_block(mk(0, 0, 0, 0, 0, 0));
    checks++;
    if (state_select != SS_NUM_VLC0) begin failures++; $display("FAIL: E table"); end
    ct_total_coeff = 1; ct_trailing_ones = 1;
    expect_step(ST_TRAILING_ONES, SS_T1, "E trailing ones");
    tz_total_zeros = 4;
    expect_step(ST_TOTAL_ZEROS, SS_TZ, "E total zeros");
    expect_step(ST_DONE, SS_RUN, "E done");
    mode = mk(1, 0, 0, 0, 0, 0); start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    checks++;
    if (step != ST_COEFF_TOKEN || state_select != SS_NUM_VLC_DC) begin failures++; $display("FAIL: F not started from DONE"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

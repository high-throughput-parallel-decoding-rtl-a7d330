// tb_buffer_ctrl: coefficient placement.  The example block (levels 1, -1,
// -1, 1, 3; TotalZeros 3; runs 1, 0, 0, 1) must give 0 3 0 1 -1 -1 0 1; then
// random blocks: the buffered levels and runs are derived from a random block
// in scan order, and the registered output must reproduce it one cycle after
// ST_DONE.  Also checks that Reg_temp's base index follows the level index.
module tb_buffer_ctrl;
  import cavlc_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  step_t      step;
  logic       lv_act, out_valid;
  logic [4:0] lv_idx, lv_base, total_coeff, rb_done, out_total_coeff;
  logic [3:0] total_zeros;
  level_t     levels [16];
  logic [3:0] runs [16];
  level_t     out_coeff [16];
  int checks = 0, failures = 0;

  buffer_ctrl dut (.clk(clk), .rst_n(rst_n), .step(step), .lv_act(lv_act), .lv_idx(lv_idx), .lv_base(lv_base),
                   .total_coeff(total_coeff), .total_zeros(total_zeros), .rb_done(rb_done),
                   .levels(levels), .runs(runs), .out_valid(out_valid), .out_coeff(out_coeff),
                   .out_total_coeff(out_total_coeff));

  always #5 clk = ~clk;

  task automatic run_block(int blk[16], int maxc, bit all_runs);
    int tc, last, n, zl;
    tc = 0; last = -1; n = 0;
    for (int i = 0; i < 16; i++) begin levels[i] = level_t'($urandom); runs[i] = 4'($urandom); end
    for (int p = maxc - 1; p >= 0; p--)
      if (blk[p] != 0) begin
        int r;
        r = 0;
        for (int z = p - 1; z >= 0 && blk[z] == 0; z--) r++;
        levels[tc] = level_t'(blk[p]);
        runs[tc] = 4'(r);
        if (last < 0) last = p;
        tc++;
      end
    total_coeff = 5'(tc);
    total_zeros = 4'((tc == 0) ? 0 : last + 1 - tc);
    // runs are decoded only while zeros are left (and at most tc-1 of them)
    zl = int'(total_zeros);
    for (int i = 0; i < tc - 1 && zl > 0; i++) begin zl -= int'(runs[i]); n++; end
    rb_done = 5'(n);
    if (!all_runs) for (int i = n; i < 16; i++) runs[i] = 4'($urandom);
    @(negedge clk);
    step = ST_DONE;
    @(negedge clk);
    step = ST_IDLE;
    checks++;
    if (!out_valid || out_total_coeff != 5'(tc)) begin failures++; $display("FAIL: out_valid/TotalCoeff"); end
    for (int p = 0; p < 16; p++) begin
      checks++;
      if (out_coeff[p] != level_t'(blk[p])) begin
        failures++;
        if (failures < 10) $display("FAIL: coeff %0d = %0d expected %0d", p, out_coeff[p], blk[p]);
      end
    end
  endtask

  initial begin
    int fig1[16] = '{0, 3, 0, 1, -1, -1, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0};
    step = ST_IDLE; lv_act = 0; lv_idx = 0; total_coeff = 0; total_zeros = 0; rb_done = 0;
    for (int i = 0; i < 16; i++) begin levels[i] = '0; runs[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_block(fig1, 16, 1'b1);
    for (int it = 0; it < 3000; it++) begin
      int blk[16], maxc, dens;
      maxc = ($urandom_range(0, 2) == 0) ? 4 : ($urandom_range(0, 1) ? 15 : 16);
      dens = $urandom_range(0, 100);
      for (int p = 0; p < 16; p++)
        blk[p] = (p < maxc && $urandom_range(0, 99) < dens) ? ($urandom_range(0, 1) ? 1 : -1) * $urandom_range(1, 300) : 0;
      run_block(blk, maxc, 1'b0);
    end
    // Reg_temp base index
    @(negedge clk);
    lv_act = 1; lv_idx = 5'd7;
    @(negedge clk);
    lv_act = 0; lv_idx = 5'd2;
    @(negedge clk);
    checks++;
    if (lv_base != 5'd7) begin failures++; $display("FAIL: lv_base %0d", lv_base); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

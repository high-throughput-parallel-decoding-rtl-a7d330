// tb_coef_buffer: random writes through the trailing-ones, level and run
// ports (in the same cycle or apart) against a model of the two arrays; checks
// the write-through outputs in the write cycle and the stored contents after.
module tb_coef_buffer;
  import cavlc_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       t1_we, lv_we, rb_we;
  logic [1:0] t1_count;
  logic [4:0] lv_base, rb_base;
  logic [3:0] lv_count, rb_count;
  level_t     t1_level [3];
  level_t     lv_level [8];
  logic [3:0] rb_run [8];
  level_t     levels_next [16];
  logic [3:0] runs_next [16];
  level_t     m_lv [16];
  logic [3:0] m_rb [16];
  int checks = 0, failures = 0;

  coef_buffer #(.M(8)) dut (.clk(clk), .rst_n(rst_n), .t1_we(t1_we), .t1_count(t1_count), .t1_level(t1_level),
                            .lv_we(lv_we), .lv_base(lv_base), .lv_count(lv_count), .lv_level(lv_level),
                            .rb_we(rb_we), .rb_base(rb_base), .rb_count(rb_count), .rb_run(rb_run),
                            .levels_next(levels_next), .runs_next(runs_next));

  always #5 clk = ~clk;

  initial begin
    t1_we = 0; lv_we = 0; rb_we = 0; t1_count = 0; lv_base = 0; rb_base = 0; lv_count = 0; rb_count = 0;
    for (int i = 0; i < 3; i++) t1_level[i] = '0;
    for (int i = 0; i < 8; i++) begin lv_level[i] = '0; rb_run[i] = '0; end
    for (int i = 0; i < 16; i++) begin m_lv[i] = '0; m_rb[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      t1_we = 1'($urandom_range(0, 1)); t1_count = 2'($urandom_range(0, 3));
      lv_we = 1'($urandom_range(0, 1)); lv_base = 5'($urandom_range(0, 15)); lv_count = 4'($urandom_range(0, 8));
      rb_we = 1'($urandom_range(0, 1)); rb_base = 5'($urandom_range(0, 15)); rb_count = 4'($urandom_range(0, 8));
      for (int i = 0; i < 3; i++) t1_level[i] = level_t'($urandom_range(0, 1) ? 1 : -1);
      for (int i = 0; i < 8; i++) begin lv_level[i] = level_t'($urandom); rb_run[i] = 4'($urandom); end
      if (t1_we) for (int i = 0; i < int'(t1_count); i++) m_lv[i] = t1_level[i];
      if (lv_we) for (int i = 0; i < int'(lv_count); i++) if (int'(lv_base) + i < 16) m_lv[int'(lv_base) + i] = lv_level[i];
      if (rb_we) for (int i = 0; i < int'(rb_count); i++) if (int'(rb_base) + i < 16) m_rb[int'(rb_base) + i] = rb_run[i];
      #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (levels_next[i] != m_lv[i] || runs_next[i] != m_rb[i]) begin
          failures++;
          if (failures < 10) $display("FAIL: entry %0d level %0d/%0d run %0d/%0d", i, levels_next[i], m_lv[i], runs_next[i], m_rb[i]);
        end
      end
      @(posedge clk);
      #1;
      t1_we = 0; lv_we = 0; rb_we = 0;
      #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (levels_next[i] != m_lv[i] || runs_next[i] != m_rb[i]) begin
          failures++;
          if (failures < 10) $display("FAIL: stored entry %0d", i);
        end
      end
    end
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

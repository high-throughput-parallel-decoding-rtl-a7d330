// tb_run_before_dec: the Run_before decoder.
//
// Worked examples: 10010000 with Zero_left 7 gives runs 3, 1, 3 in one step
// (Zero_left 0), and the example block's 101101 with Zero_left 3 gives 1, 0,
// 0, 1 in one step.  Then random run sequences encoded with Table 5 for random
// Zero_left and run limits: the decoder must return exactly the codes that fit
// in 8 bits (or the single long code when none fits).
module tb_run_before_dec;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;
  logic [10:0] code;
  logic [3:0]  zero_left, count, len, next_zero_left;
  logic [4:0]  max_runs;
  logic [3:0]  run [8];
  int checks = 0, failures = 0;

  run_before_dec #(.M(8)) dut (.code(code), .zero_left(zero_left), .max_runs(max_runs), .count(count),
                               .run(run), .len(len), .next_zero_left(next_zero_left));

  task automatic check_example(logic [10:0] c, int zl, int mr, int n, int exp[4], int l, int nzl);
    code = c; zero_left = 4'(zl); max_runs = 5'(mr); #1;
    checks++;
    if (count != 4'(n) || len != 4'(l) || next_zero_left != 4'(nzl)) begin
      failures++; $display("FAIL: example %b zl=%0d count=%0d len=%0d zl'=%0d", c, zl, count, len, next_zero_left);
    end
    for (int i = 0; i < n; i++) begin
      checks++;
      if (run[i] != 4'(exp[i])) begin failures++; $display("FAIL: example %b run %0d = %0d", c, i, run[i]); end
    end
  endtask

  initial begin
    check_example(11'b10010000_000, 7, 15, 3, '{3, 1, 3, 0}, 7, 0);
    check_example(11'b101101_00000, 3, 4, 4, '{1, 0, 0, 1}, 6, 1);
    for (int iter = 0; iter < 20000; iter++) begin
      bitq_t q;
      int zl0, zl, mr, k, cum, n;
      int runs[16], lens[16], zls[16];
      q.delete();
      zl0 = $urandom_range(1, 14);
      mr  = $urandom_range(1, 15);
      zl  = zl0; n = 0;
      while (zl > 0 && n < 16) begin
        int r, c;
        r = ($urandom_range(0, 3) == 0) ? $urandom_range(0, zl) : $urandom_range(0, (zl > 1) ? 1 : zl);
        runs[n] = r;
        lens[n] = rb_code(r, zl, c);
        put(q, c, lens[n]);
        zl -= r;
        zls[n] = zl;
        n++;
      end
      code = 11'($urandom);
      for (int i = 0; i < 11 && i < q.size(); i++) code[10 - i] = logic'(q[i]);
      zero_left = 4'(zl0); max_runs = 5'(mr); #1;
      k = 0; cum = 0;
      while (k < n && k < mr && k < 8 && cum + lens[k] <= 8) begin cum += lens[k]; k++; end
      if (k == 0) begin k = 1; cum = lens[0]; end
      checks++;
      if (count != 4'(k) || len != 4'(cum) || next_zero_left != 4'(zls[k - 1])) begin
        failures++;
        if (failures < 10) $display("FAIL: zl=%0d code=%b count=%0d/%0d len=%0d/%0d zl'=%0d/%0d", zl0, code,
                                    count, k, len, cum, next_zero_left, zls[k - 1]);
      end
      for (int i = 0; i < k; i++) begin
        checks++;
        if (run[i] != 4'(runs[i])) begin
          failures++;
          if (failures < 10) $display("FAIL: zl=%0d code=%b run %0d = %0d expected %0d", zl0, code, i, run[i], runs[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

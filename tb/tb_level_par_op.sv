// tb_level_par_op: the extensive parallel Level operator (M = 8).
//
// Checks the three worked examples of the description for the input
// 00100111 (Level_VLC0: 2, -3; Level_VLC1: 3, -2; Level_VLC2: 5, -2), then
// random level sequences encoded by the reference encoder from every starting
// table, with and without the trailing-ones adjustment and with a random
// limit on the levels left: the operator must return exactly the codewords
// that fit in 8 bits, their values, the bits used and the next table.
module tb_level_par_op;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;
  logic [7:0] code;
  logic [2:0] suffix_len, next_sl;
  logic       t1_adj;
  logic [4:0] max_codes;
  logic [3:0] count, len;
  level_t     temp [8];
  int checks = 0, failures = 0;

  level_par_op #(.M(8)) dut (.code(code), .suffix_len(suffix_len), .t1_adj(t1_adj), .max_codes(max_codes),
                             .count(count), .len(len), .temp(temp), .next_sl(next_sl));

  task automatic check_case(int sl, logic [7:0] c, int n, int exp[8], int exp_len);
    code = c; suffix_len = 3'(sl); t1_adj = 1'b0; max_codes = 5'd16; #1;
    checks++;
    if (count != 4'(n) || len != 4'(exp_len)) begin
      failures++; $display("FAIL: example VLC%0d count=%0d len=%0d", sl, count, len);
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (temp[i] != level_t'(exp[i])) begin
        failures++; $display("FAIL: example VLC%0d Temp_%0d=%0d expected %0d", sl, i, temp[i], exp[i]);
      end
    end
  endtask

  initial begin
    check_case(0, 8'b00100111, 2, '{2, -3, 0, 0, 0, 0, 0, 0}, 7);
    check_case(1, 8'b00100111, 2, '{3, -2, 0, 0, 0, 0, 0, 0}, 7);
    check_case(2, 8'b00100111, 2, '{5, -2, 0, 0, 0, 0, 0, 0}, 8);
    for (int iter = 0; iter < 20000; iter++) begin
      bitq_t q;
      int lv[12], lens[12], sls[12];
      int sl, sl0, maxc, k, cum;
      bit adj;
      q.delete();
      sl0  = $urandom_range(0, 6);
      adj  = (sl0 == 0 || sl0 == 1) ? 1'($urandom_range(0, 1)) : 1'b0;
      maxc = $urandom_range(1, 16);
      sl   = sl0;
      for (int i = 0; i < 12; i++) begin
        int m;
        m = ($urandom_range(0, 9) < 7) ? $urandom_range(1, 2) : $urandom_range(3, 40);
        if (i == 0 && adj && m < 2) m = 2;    // the adjusted level is at least 2 in magnitude
        lv[i]   = $urandom_range(0, 1) ? m : -m;
        lens[i] = encode_level(q, lv[i], sl, adj && i == 0);
        sls[i]  = sl;
      end
      for (int i = 0; i < 8; i++) code[7 - i] = (i < q.size()) ? logic'(q[i]) : 1'b0;
      suffix_len = 3'(sl0); t1_adj = adj; max_codes = 5'(maxc); #1;
      k = 0; cum = 0;
      while (k < 8 && k < maxc && cum + lens[k] <= 8) begin cum += lens[k]; k++; end
      checks++;
      if (count != 4'(k) || len != 4'(cum) || next_sl != 3'((k == 0) ? sl0 : sls[k - 1])) begin
        failures++;
        if (failures < 10) $display("FAIL: sl=%0d code=%b count=%0d/%0d len=%0d/%0d next=%0d", sl0, code, count, k, len, cum, next_sl);
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (temp[i] != level_t'((i < k) ? lv[i] : 0)) begin
          failures++;
          if (failures < 10) $display("FAIL: sl=%0d code=%b Temp_%0d=%0d expected %0d", sl0, code, i, temp[i], lv[i]);
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

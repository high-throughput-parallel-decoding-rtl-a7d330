// tb_level_ser_op: the serial Level operator on single codewords of every
// length, escape codes included, from every table.  Also the worked example
// 001001 with Level_VLC3 (prefix 2, suffix 001: levelCode 17, level -9).
module tb_level_ser_op;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;
  logic [27:0] code;
  logic [2:0]  suffix_len, next_sl;
  logic        t1_adj, error;
  level_t      level;
  logic [4:0]  len;
  int checks = 0, failures = 0;

  level_ser_op dut (.code(code), .suffix_len(suffix_len), .t1_adj(t1_adj), .level(level), .len(len),
                    .next_sl(next_sl), .error(error));

  initial begin
    code = {8'b00100111, 20'h0}; suffix_len = 3'd3; t1_adj = 1'b0; #1;
    checks++;
    if (level != -16'sd9 || len != 5'd6 || next_sl != 3'd3) begin
      failures++; $display("FAIL: 001001 with Level_VLC3 gave %0d len %0d", level, len);
    end
    for (int iter = 0; iter < 20000; iter++) begin
      bitq_t q;
      int lv, sl, sl0, l, m, r;
      bit adj;
      q.delete();
      sl0 = $urandom_range(0, 6);
      adj = 1'($urandom_range(0, 1));
      r = $urandom_range(0, 9);
      m = (r < 4) ? $urandom_range(1, 8) : (r < 8) ? $urandom_range(9, 200) : $urandom_range(201, 2000);
      if (adj && m < 2) m = 2;
      lv = $urandom_range(0, 1) ? m : -m;
      sl = sl0;
      l  = encode_level(q, lv, sl, adj);
      code = 28'($urandom);
      for (int i = 0; i < q.size(); i++) code[27 - i] = logic'(q[i]);
      suffix_len = 3'(sl0); t1_adj = adj; #1;
      checks++;
      if (level != level_t'(lv) || len != 5'(l) || next_sl != 3'(sl) || error) begin
        failures++;
        if (failures < 10) $display("FAIL: sl=%0d adj=%0d code=%b level=%0d/%0d len=%0d/%0d next=%0d/%0d",
                                    sl0, adj, code, level, lv, len, l, next_sl, sl);
      end
    end
    code = 28'h0000abc; #1;
    checks++;
    if (!error) begin failures++; $display("FAIL: 16 leading zeros not flagged"); end
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

// tb_level_dec: the Level block with its Reg_temp bank.  Streams random level
// sequences (short codes, long codes and escapes) through the block the way
// the decoder does - shifting the window by Length_feedback and following the
// next table - and checks each cycle's count, and one cycle later the values
// in Temp_0..Temp_7, against the reference encoder.  Checks that codewords that
// fit in 8 bits are decoded together (a cycle with several codewords is
// required) and that a codeword longer than 8 bits takes one cycle.
module tb_level_dec;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic          en, t1_adj, error, temp_valid;
  logic [27:0]   code;
  state_select_t state_select;
  logic [4:0]    max_codes, len;
  logic [3:0]    count, temp_count;
  logic [2:0]    next_sl;
  level_t        temp [8];
  int checks = 0, failures = 0;
  int multi = 0, serial = 0;

  level_dec #(.M(8)) dut (.clk(clk), .rst_n(rst_n), .en(en), .code(code), .state_select(state_select),
                          .t1_adj(t1_adj), .max_codes(max_codes), .count(count), .len(len),
                          .next_sl(next_sl), .error(error), .temp(temp), .temp_count(temp_count),
                          .temp_valid(temp_valid));

  always #5 clk = ~clk;

  initial begin
    bitq_t q;
    int lv[400], lens[400], sls[400];
    int n, pos, idx, sl, exp_lv[8], exp_n;
    en = 1'b0; code = '0; state_select = SS_LEVEL0; t1_adj = 1'b0; max_codes = '0;
    n = 400; sl = 0;
    for (int i = 0; i < n; i++) begin
      int m, r;
      r = $urandom_range(0, 19);
      m = (r < 14) ? $urandom_range(1, 3) : (r < 18) ? $urandom_range(4, 60) : $urandom_range(61, 2000);
      lv[i] = $urandom_range(0, 1) ? m : -m;
      lens[i] = encode_level(q, lv[i], sl, 1'b0);
      sls[i] = sl;
    end
    for (int i = 0; i < 40; i++) q.push_back(1'b0);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    pos = 0; idx = 0; exp_n = 0;
    while (idx < n) begin
      int k, cum;
      @(negedge clk);
      // Reg_temp holds the previous cycle's levels
      if (exp_n > 0) begin
        checks++;
        if (!temp_valid || temp_count != 4'(exp_n)) begin failures++; $display("FAIL: Reg_temp count %0d expected %0d", temp_count, exp_n); end
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (temp[i] != level_t'((i < exp_n) ? exp_lv[i] : 0)) begin
            failures++;
            if (failures < 10) $display("FAIL: Temp_%0d=%0d expected %0d", i, temp[i], exp_lv[i]);
          end
        end
      end
      for (int i = 0; i < 28; i++) code[27 - i] = logic'(q[pos + i]);
      state_select = state_select_t'({1'b1, 3'((idx == 0) ? 0 : sls[idx - 1])});
      max_codes = 5'((n - idx > 16) ? 16 : n - idx);
      en = 1'b1;
      #1;
      k = 0; cum = 0;
      while (k < 8 && k < int'(max_codes) && cum + lens[idx + k] <= 8) begin cum += lens[idx + k]; k++; end
      if (k == 0) begin k = 1; cum = lens[idx]; serial++; end
      if (k >= 2) multi++;
      checks++;
      if (count != 4'(k) || len != 5'(cum) || next_sl != 3'(sls[idx + k - 1]) || error) begin
        failures++;
        if (failures < 10) $display("FAIL: level %0d count=%0d/%0d len=%0d/%0d", idx, count, k, len, cum);
      end
      for (int i = 0; i < 8; i++) exp_lv[i] = (i < k) ? lv[idx + i] : 0;
      exp_n = k;
      pos += int'(len);
      idx += int'(count);
    end
    @(negedge clk);
    en = 1'b0;
    checks++;
    if (multi == 0 || serial == 0) begin failures++; $display("FAIL: multi=%0d serial=%0d", multi, serial); end
    $display("levels %0d, cycles with several codewords %0d, serial cycles %0d", n, multi, serial);
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

// tb_trailing_ones_dec: all sign patterns for 0..3 trailing ones; the signs
// are read one bit each (0 = +1, 1 = -1) and all are consumed in one step.
module tb_trailing_ones_dec;
  import cavlc_pkg::*;
  logic [2:0] code;
  logic [1:0] t1;
  level_t     level [3];
  logic [1:0] len;
  int checks = 0, failures = 0;

  trailing_ones_dec dut (.code(code), .t1(t1), .level(level), .len(len));

  initial begin
    for (int n = 0; n < 4; n++) begin
      for (int c = 0; c < 8; c++) begin
        code = 3'(c); t1 = 2'(n); #1;
        checks++;
        if (len != 2'(n)) begin failures++; $display("FAIL: len %0d for t1 %0d", len, n); end
        for (int i = 0; i < 3; i++) begin
          int exp;
          exp = (i >= n) ? 0 : (((c >> (2 - i)) & 1) ? -1 : 1);
          checks++;
          if (level[i] != level_t'(exp)) begin
            failures++; $display("FAIL: t1=%0d code=%b level[%0d]=%0d expected %0d", n, code, i, level[i], exp);
          end
        end
      end
    end
    // example block: signs 0,1,1 -> +1, -1, -1
    code = 3'b011; t1 = 2'd3; #1;
    checks++;
    if (level[0] != 1 || level[1] != -1 || level[2] != -1) begin failures++; $display("FAIL: example signs"); end
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

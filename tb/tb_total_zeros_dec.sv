// tb_total_zeros_dec: every Total_zeros and Total_zeros_DC code, followed by
// random bits, must decode to its TotalZeros and length, plus hand-checked
// codes (the example block's 111 with TotalCoeff 5 gives 3).
module tb_total_zeros_dec;
  import cavlc_pkg::*;
  logic [8:0] code;
  logic [4:0] total_coeff;
  logic       chroma_dc;
  logic [3:0] total_zeros, len;
  logic       found;
  int checks = 0, failures = 0;

  total_zeros_dec dut (.code(code), .total_coeff(total_coeff), .chroma_dc(chroma_dc),
                       .total_zeros(total_zeros), .len(len), .found(found));

  task automatic expect_code(int tc, bit dc, int l, int b, int tz);
    logic [8:0] c;
    c = 9'($urandom);
    for (int i = 0; i < l; i++) c[8 - i] = 1'((b >> (l - 1 - i)) & 1);
    code = c; total_coeff = 5'(tc); chroma_dc = dc; #1;
    checks++;
    if (!found || total_zeros != 4'(tz) || len != 4'(l)) begin
      failures++;
      $display("FAIL: tc=%0d dc=%0d code=%b -> tz=%0d len=%0d expected %0d %0d", tc, dc, c, total_zeros, len, tz, l);
    end
  endtask

  initial begin
    expect_code(5, 0, 3, 3'b111, 3);
    expect_code(1, 0, 1, 1'b1, 0);
    expect_code(1, 0, 9, 9'b000000001, 15);
    expect_code(15, 0, 1, 1'b1, 1);
    expect_code(1, 1, 3, 3'b000, 3);
    expect_code(3, 1, 1, 1'b0, 1);
    for (int tc = 1; tc <= 15; tc++)
      for (int z = 0; z < 16; z++)
        if (TZ_LEN[(tc - 1) * 16 + z] != 0)
          for (int k = 0; k < 4; k++)
            expect_code(tc, 0, int'(TZ_LEN[(tc - 1) * 16 + z]), int'(TZ_BITS[(tc - 1) * 16 + z]), z);
    for (int tc = 1; tc <= 3; tc++)
      for (int z = 0; z < 4; z++)
        if (TZDC_LEN[(tc - 1) * 4 + z] != 0)
          for (int k = 0; k < 4; k++)
            expect_code(tc, 1, int'(TZDC_LEN[(tc - 1) * 4 + z]), int'(TZDC_BITS[(tc - 1) * 4 + z]), z);
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

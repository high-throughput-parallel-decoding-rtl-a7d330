// tb_coeff_token_dec: every Coeff_token code of every table (Num_VLC0/1/2,
// chroma DC, 6-bit fixed length), each followed by random bits, must decode
// to its TotalCoeff/TrailingOnes and length.  Also hand-checked codes from
// the H.264/AVC tables, including the example block's 0000100 (5, 3).
module tb_coeff_token_dec;
  import cavlc_pkg::*;
  logic [15:0]   code;
  state_select_t sel;
  logic          chroma_dc;
  logic [4:0]    total_coeff, len;
  logic [1:0]    trailing_ones;
  logic          found;
  int checks = 0, failures = 0;

  coeff_token_dec dut (.code(code), .sel(sel), .chroma_dc(chroma_dc), .total_coeff(total_coeff),
                       .trailing_ones(trailing_ones), .len(len), .found(found));

  task automatic expect_code(state_select_t s, bit dc, string bitstr, int tc, int t1);
    logic [15:0] c;
    c = 16'($urandom);
    for (int i = 0; i < bitstr.len(); i++) c[15 - i] = (bitstr[i] == "1");
    code = c; sel = s; chroma_dc = dc; #1;
    checks++;
    if (!found || total_coeff != 5'(tc) || trailing_ones != 2'(t1) || len != 5'(bitstr.len())) begin
      failures++;
      $display("FAIL: sel=%b dc=%0d code %s -> tc=%0d t1=%0d len=%0d, expected %0d %0d %0d",
               s, dc, bitstr, total_coeff, trailing_ones, len, tc, t1, bitstr.len());
    end
  endtask

  initial begin
    // hand-checked codes
    expect_code(SS_NUM_VLC0, 0, "1", 0, 0);
    expect_code(SS_NUM_VLC0, 0, "01", 1, 1);
    expect_code(SS_NUM_VLC0, 0, "001", 2, 2);
    expect_code(SS_NUM_VLC0, 0, "00011", 3, 3);
    expect_code(SS_NUM_VLC0, 0, "0000100", 5, 3);
    expect_code(SS_NUM_VLC0, 0, "000101", 1, 0);
    expect_code(SS_NUM_VLC1, 0, "11", 0, 0);
    expect_code(SS_NUM_VLC1, 0, "10", 1, 1);
    expect_code(SS_NUM_VLC1, 0, "011", 2, 2);
    expect_code(SS_NUM_VLC2, 0, "1111", 0, 0);
    expect_code(SS_NUM_VLC2, 0, "1110", 1, 1);
    expect_code(SS_NUM_VLC_DC, 0, "000011", 0, 0);
    expect_code(SS_NUM_VLC_DC, 0, "000000", 1, 0);
    expect_code(SS_NUM_VLC_DC, 0, "111111", 16, 3);
    expect_code(SS_NUM_VLC_DC, 1, "01", 0, 0);
    expect_code(SS_NUM_VLC_DC, 1, "1", 1, 1);
    expect_code(SS_NUM_VLC_DC, 1, "001", 2, 2);
    expect_code(SS_NUM_VLC_DC, 1, "0000000", 4, 3);
    // every entry of every table
    for (int t = 0; t < 5; t++) begin
      for (int e = 0; e < 68; e++) begin
        int l, b;
        string s;
        l = (t == 4) ? ((e < 20) ? int'(CTDC_LEN[e]) : 0) : int'(CT_LEN[t * 68 + e]);
        b = (t == 4) ? ((e < 20) ? int'(CTDC_BITS[e]) : 0) : int'(CT_BITS[t * 68 + e]);
        if (l == 0) continue;
        s = "";
        for (int i = l - 1; i >= 0; i--) s = {s, ((b >> i) & 1) ? "1" : "0"};
        for (int k = 0; k < 4; k++)
          expect_code(state_select_t'((t == 4) ? 3 : t), t == 4, s, e / 4, e % 4);
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

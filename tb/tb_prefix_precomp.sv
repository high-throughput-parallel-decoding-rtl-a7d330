// tb_prefix_precomp: checks the prefix precomputation symbols of Table 6
// (A = 0000 for 00001 ... L = 1011 for 0000000000000001) and the direct
// leading-zero count of short prefixes, for every prefix length with random
// bits after the closing one.
module tb_prefix_precomp;
  logic [15:0] bits;
  logic        is_long, none;
  logic [3:0]  symbol;
  logic [1:0]  short_lz;
  int checks = 0, failures = 0;

  prefix_precomp dut (.bits(bits), .is_long(is_long), .symbol(symbol), .short_lz(short_lz), .none(none));

  initial begin
    for (int z = 0; z <= 16; z++) begin
      for (int k = 0; k < 50; k++) begin
        bits = 16'($urandom);
        for (int b = 0; b < z && b < 16; b++) bits[15 - b] = 1'b0;
        if (z < 16) bits[15 - z] = 1'b1;
        #1;
        checks++;
        if (z == 16) begin
          if (!none || is_long) begin failures++; $display("FAIL: 16 zeros not flagged"); end
        end else if (z < 4) begin
          if (is_long || none || short_lz != 2'(z)) begin
            failures++; $display("FAIL: %b short prefix %0d got %0d", bits, z, short_lz);
          end
        end else begin
          if (!is_long || none || symbol != 4'(z - 4)) begin
            failures++; $display("FAIL: %b prefix of %0d zeros got symbol %b", bits, z, symbol);
          end
        end
      end
    end
    // the example of the description: 00000001 xxxx -> 0011
    bits = 16'b0000_0001_1010_0000; #1;
    checks++;
    if (!(is_long && symbol == 4'b0011)) begin failures++; $display("FAIL: 00000001xxxx example"); end
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

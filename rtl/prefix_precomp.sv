// prefix_precomp: prefix precomputation of long Level codewords.
//
// A Level codeword begins with a prefix of leading zeros closed by a one.  For
// prefixes of 4 to 15 zeros (00001 ... 0000000000000001) the block returns the
// 4-bit symbol of the document's Table 6 (A = 0000 for four zeros up to
// L = 1011 for fifteen), so the logic behind it sees 4 bits instead of up to 16
// (the document's Figs. 7 and 8).  Shorter prefixes (0 to 3 zeros) are reported
// directly on `short_lz`; `none` flags 16 zeros, which no baseline code has.
// Purely combinational.
module prefix_precomp (
  input  logic [15:0] bits,      // code bits, first bit at bit 15
  output logic        is_long,   // 4..15 leading zeros
  output logic [3:0]  symbol,    // Table 6 symbol when is_long
  output logic [1:0]  short_lz,  // leading zeros when fewer than 4
  output logic        none       // no one within 16 bits
);
  always_comb begin
    is_long  = 1'b0;
    symbol   = 4'd0;
    short_lz = 2'd0;
    none     = 1'b0;
    casez (bits)
      16'b1???????????????: short_lz = 2'd0;
      16'b01??????????????: short_lz = 2'd1;
      16'b001?????????????: short_lz = 2'd2;
      16'b0001????????????: short_lz = 2'd3;
      16'b00001???????????: begin is_long = 1'b1; symbol = 4'b0000; end  // A
      16'b000001??????????: begin is_long = 1'b1; symbol = 4'b0001; end  // B
      16'b0000001?????????: begin is_long = 1'b1; symbol = 4'b0010; end  // C
      16'b00000001????????: begin is_long = 1'b1; symbol = 4'b0011; end  // D
      16'b000000001???????: begin is_long = 1'b1; symbol = 4'b0100; end  // E
      16'b0000000001??????: begin is_long = 1'b1; symbol = 4'b0101; end  // F
      16'b00000000001?????: begin is_long = 1'b1; symbol = 4'b0110; end  // G
      16'b000000000001????: begin is_long = 1'b1; symbol = 4'b0111; end  // H
      16'b0000000000001???: begin is_long = 1'b1; symbol = 4'b1000; end  // I
      16'b00000000000001??: begin is_long = 1'b1; symbol = 4'b1001; end  // J
      16'b000000000000001?: begin is_long = 1'b1; symbol = 4'b1010; end  // K
      16'b0000000000000001: begin is_long = 1'b1; symbol = 4'b1011; end  // L
      default:              none = 1'b1;
    endcase
  end
endmodule

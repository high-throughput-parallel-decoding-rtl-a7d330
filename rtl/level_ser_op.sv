// level_ser_op: serial logic operator of the Level block.
//
// Decodes the single Level codeword at the head of the 28-bit window, for any
// prefix length the baseline profile allows (0..15 leading zeros), including
// the escape codes (prefix 14 with Level_VLC0: 4-bit suffix; prefix 15: 12-bit
// suffix).  Long prefixes are first reduced to a 4-bit symbol by prefix
// precomputation (Table 6), so the logic that follows sees the symbol instead
// of up to 16 prefix bits.  The level value follows the H.264/AVC rule
// levelCode = (prefix << suffix_len) + suffix, +15 for the Level_VLC0 escape,
// +2 for the first level after fewer than three trailing ones.  Also returns
// the table for the next codeword.  Combinational.
module level_ser_op
  import cavlc_pkg::*;
(
  input  logic [27:0] code,            // Codeword[27:0], first bit at bit 27
  input  logic [2:0]  suffix_len,      // current Level_VLC table
  input  logic        t1_adj,
  output level_t      level,
  output logic [4:0]  len,
  output logic [2:0]  next_sl,
  output logic        error            // 16 or more leading zeros
);
  logic       is_long;
  logic [3:0] symbol;
  logic [1:0] short_lz;
  logic       none;

  prefix_precomp u_pre (
    .bits(code[27:12]), .is_long(is_long), .symbol(symbol), .short_lz(short_lz), .none(none)
  );

  logic [3:0]  prefix;
  logic [3:0]  suffix_size;
  logic [27:0] rest;
  logic [11:0] suffix;
  logic [13:0] level_code;

  always_comb begin
    prefix      = is_long ? symbol + 4'd4 : {2'b00, short_lz};
    if (prefix == 4'd14 && suffix_len == 3'd0) suffix_size = 4'd4;
    else if (prefix == 4'd15)                  suffix_size = 4'd12;
    else                                       suffix_size = {1'b0, suffix_len};
    rest        = code << ({1'b0, prefix} + 5'd1);
    suffix      = (suffix_size == 4'd0) ? 12'd0 : 12'(rest >> (5'd28 - {1'b0, suffix_size}));
    level_code  = (14'(prefix) << suffix_len) + 14'(suffix);
    if (prefix == 4'd15 && suffix_len == 3'd0) level_code = level_code + 14'd15;
    if (t1_adj) level_code = level_code + 14'd2;
    level   = level_of_code(level_code);
    len     = 5'(prefix) + 5'd1 + 5'(suffix_size);
    next_sl = next_suffix_len(suffix_len, level);
    error   = none;
  end
endmodule

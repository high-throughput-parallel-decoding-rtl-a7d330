// trailing_ones_dec: the Trailing_ones step (step 2).
//
// Each trailing one is coded by one sign bit (0 = +1, 1 = -1), and there are at
// most three, so all of them are decoded at once from the first three window
// bits, as the design description proposes.  level[0] is the highest-frequency
// trailing one (the first coefficient in decoding order).  Combinational.
module trailing_ones_dec
  import cavlc_pkg::*;
(
  input  logic [2:0] code,    // window bits, first bit at bit 2
  input  logic [1:0] t1,      // TrailingOnes from Coeff_token
  output level_t     level [3],
  output logic [1:0] len
);
  always_comb begin
    for (int i = 0; i < 3; i++)
      level[i] = (i < int'(t1)) ? (code[2-i] ? -16'sd1 : 16'sd1) : 16'sd0;
    len = t1;
  end
endmodule

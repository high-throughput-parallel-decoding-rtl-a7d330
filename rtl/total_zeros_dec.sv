// total_zeros_dec: the Total_zeros step (step 4).
//
// Decodes TotalZeros with the table of the current TotalCoeff: Total_zeros
// (State_select 0110) for 4x4 blocks and Total_zeros_DC (0111) for chroma DC
// blocks, both as in H.264/AVC.  Codes are at most 9 bits long; each entry is a
// comparator on the first bits of the window.  Combinational.
module total_zeros_dec
  import cavlc_pkg::*;
(
  input  logic [8:0]  code,          // window bits, first bit at bit 8
  input  logic [4:0]  total_coeff,   // 1..15 (1..3 for chroma DC)
  input  logic        chroma_dc,
  output logic [3:0]  total_zeros,
  output logic [3:0]  len,
  output logic        found
);
  // Constant comparators for every (TotalCoeff, TotalZeros) code; TotalCoeff
  // and the block type only pick which row's match is used.
  always_comb begin
    total_zeros = '0;
    len         = '0;
    found       = 1'b0;
    for (int r = 0; r < 15; r++) begin
      for (int z = 0; z < 16; z++) begin
        logic [3:0] l;
        logic [8:0] b;
        logic       row;
        if (r < 3) begin
          // Total_zeros_DC rows (TotalCoeff 1..3), used for chroma DC blocks
          l   = chroma_dc ? ((z < 4) ? TZDC_LEN[(r % 3) * 4 + (z % 4)] : 4'd0) : TZ_LEN[r * 16 + z];
          b   = chroma_dc ? ((z < 4) ? TZDC_BITS[(r % 3) * 4 + (z % 4)] : 9'd0) : TZ_BITS[r * 16 + z];
        end else begin
          l   = chroma_dc ? 4'd0 : TZ_LEN[r * 16 + z];
          b   = TZ_BITS[r * 16 + z];
        end
        row = (total_coeff == 5'(r + 1));
        if (row && l != 0 && !found && (code >> (4'd9 - l)) == b) begin
          found       = 1'b1;
          total_zeros = 4'(z);
          len         = l;
        end
      end
    end
  end
endmodule

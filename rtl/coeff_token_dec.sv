// coeff_token_dec: the Coeff_token step (step 1).
//
// Decodes TotalCoeff (0..16) and TrailingOnes (0..3) from the first bits of the
// window.  State_select picks the table (Table 1 / Table 2 of the design
// description): Num_VLC0 for N < 2, Num_VLC1 for 2 <= N < 4, Num_VLC2 for
// 4 <= N < 8 and Num_VLC_DC otherwise.  Under Num_VLC_DC the block decodes the
// chroma DC table when `chroma_dc` is set and the 6-bit fixed-length code used
// for N >= 8 otherwise; the code tables themselves are the H.264/AVC ones.
// Every table entry is a comparator on the first `len` bits, so the step is a
// single cycle of logic with no memory.  Combinational.
module coeff_token_dec
  import cavlc_pkg::*;
(
  input  logic [15:0]   code,          // window bits, first bit at bit 15
  input  state_select_t sel,
  input  logic          chroma_dc,
  output logic [4:0]    total_coeff,
  output logic [1:0]    trailing_ones,
  output logic [4:0]    len,
  output logic          found
);
  // Every table is matched with constant comparators; State_select only picks
  // which table's match is used.
  always_comb begin
    logic [2:0] tab;   // 0..3 = rows of CT_LEN, 4 = chroma DC table
    total_coeff   = '0;
    trailing_ones = '0;
    len           = '0;
    found         = 1'b0;
    tab = (sel == SS_NUM_VLC_DC && chroma_dc) ? 3'd4 : {1'b0, sel[1:0]};
    for (int t = 0; t < 5; t++) begin
      for (int e = 0; e < 68; e++) begin
        logic [4:0]  l;
        logic [15:0] b;
        l = (t == 4) ? ((e < 20) ? CTDC_LEN[e % 20] : 5'd0) : CT_LEN[(t % 4) * 68 + e];
        b = (t == 4) ? ((e < 20) ? CTDC_BITS[e % 20] : 16'd0) : CT_BITS[(t % 4) * 68 + e];
        if (tab == 3'(t) && l != 0 && !found && (code >> (5'd16 - l)) == b) begin
          found         = 1'b1;
          total_coeff   = 5'(e / 4);
          trailing_ones = 2'(e % 4);
          len           = l;
        end
      end
    end
  end
endmodule

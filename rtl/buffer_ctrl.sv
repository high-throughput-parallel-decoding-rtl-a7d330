// buffer_ctrl: buffer controller - places the levels and presents the block.
//
// Tracks where the Level block's Reg_temp contents belong in the buffer (the
// level index at the cycle the codewords were decoded, one cycle earlier), and
// when the step machine reaches ST_DONE it rebuilds the block in scan order:
// the first level sits at position TotalCoeff + TotalZeros - 1 and every
// following level sits 1 + Run_before below the previous one (runs that were
// not coded because Zero_left had reached 0 count as 0).  The block is
// registered on `out_coeff` with a one-cycle `out_valid` pulse, together with
// TotalCoeff; positions above the block's last coefficient are 0.  This is the
// standard CAVLC reconstruction; the description shows the controller only as
// a block between the step decoders and the buffer.
module buffer_ctrl
  import cavlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  step_t      step,
  input  logic       lv_act,           // Level step decoded codewords this cycle
  input  logic [4:0] lv_idx,           // level index of those codewords
  output logic [4:0] lv_base,          // where Reg_temp is written
  input  logic [4:0] total_coeff,
  input  logic [3:0] total_zeros,
  input  logic [4:0] rb_done,          // runs decoded
  input  level_t     levels [16],
  input  logic [3:0] runs [16],
  output logic       out_valid,
  output level_t     out_coeff [16],
  output logic [4:0] out_total_coeff
);
  level_t coeff_d [16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lv_base <= '0;
    else if (lv_act) lv_base <= lv_idx;
  end

  always_comb begin
    int pos;
    pos = int'(total_coeff) + int'(total_zeros) - 1;
    for (int i = 0; i < 16; i++) coeff_d[i] = '0;
    for (int i = 0; i < 16; i++) begin
      if (i < int'(total_coeff) && pos >= 0 && pos < 16) begin
        coeff_d[pos] = levels[i];
        pos = pos - 1 - ((i < int'(rb_done)) ? int'(runs[i]) : 0);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid       <= 1'b0;
      out_total_coeff <= '0;
      for (int i = 0; i < 16; i++) out_coeff[i] <= '0;
    end else begin
      out_valid <= (step == ST_DONE);
      if (step == ST_DONE) begin
        out_coeff       <= coeff_d;
        out_total_coeff <= total_coeff;
      end
    end
  end
endmodule

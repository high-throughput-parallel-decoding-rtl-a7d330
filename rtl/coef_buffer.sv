// coef_buffer: buffer of the decoded values of one residual block.
//
// Holds up to 16 levels in decoding order (index 0 = highest-frequency
// nonzero coefficient) and up to 16 Run_before values.  Three write ports:
// the Trailing_ones decoder writes levels 0..t1-1, the Level block writes
// Temp_0..Temp_(count-1) from Reg_temp at a base index, and the Run_before
// decoder writes up to M runs at a base index, all in the same cycle if
// needed.  `levels_next`/`runs_next` show the contents including this
// cycle's writes, so the buffer controller can read a block in the cycle its
// last values arrive.  Storage and port structure are this design's choices;
// the description shows the buffer only as a block.
module coef_buffer
  import cavlc_pkg::*;
#(
  parameter int M = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       t1_we,
  input  logic [1:0] t1_count,
  input  level_t     t1_level [3],
  input  logic       lv_we,
  input  logic [4:0] lv_base,
  input  logic [3:0] lv_count,
  input  level_t     lv_level [M],
  input  logic       rb_we,
  input  logic [4:0] rb_base,
  input  logic [3:0] rb_count,
  input  logic [3:0] rb_run [M],
  output level_t     levels_next [16],
  output logic [3:0] runs_next [16]
);
  level_t     levels_q [16];
  logic [3:0] runs_q   [16];

  always_comb begin
    levels_next = levels_q;
    runs_next   = runs_q;
    if (t1_we)
      for (int i = 0; i < 3; i++)
        if (i < int'(t1_count)) levels_next[i] = t1_level[i];
    if (lv_we)
      for (int i = 0; i < M; i++)
        if (i < int'(lv_count) && int'(lv_base) + i < 16) levels_next[int'(lv_base) + i] = lv_level[i];
    if (rb_we)
      for (int i = 0; i < M; i++)
        if (i < int'(rb_count) && int'(rb_base) + i < 16) runs_next[int'(rb_base) + i] = rb_run[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) begin
        levels_q[i] <= '0;
        runs_q[i]   <= '0;
      end
    end else begin
      levels_q <= levels_next;
      runs_q   <= runs_next;
    end
  end
endmodule

// level_dec: the Level block (step 3) with its Reg_temp register bank.
//
// The logic operator holds two decoders fed from the same window: the
// extensive parallel logic operator on Codeword[27:20] (all codewords that fit
// in M bits) and the serial logic operator on Codeword[27:0] (one codeword of
// any length).  When the parallel operator finds at least one codeword its
// result is used; otherwise (first codeword longer than M) the serial result
// is used, so at least one level is decoded in every enabled cycle.
// State_select = 1sss selects Level_VLC(sss); an MSB of 0 forces serial mode.
// Count_code_number (`count`), Length_feedback (`len`) and the next table
// (`next_sl`) are combinational; the levels are captured in Temp_0..Temp_7 at
// the clock edge of an enabled cycle, with `temp_count` and `temp_valid`
// valid one cycle after the codewords were in the window.
module level_dec
  import cavlc_pkg::*;
#(
  parameter int M = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [27:0]   code,
  input  state_select_t state_select,
  input  logic          t1_adj,
  input  logic [4:0]    max_codes,
  output logic [3:0]    count,
  output logic [4:0]    len,
  output logic [2:0]    next_sl,
  output logic          error,
  output level_t        temp [M],     // Reg_temp
  output logic [3:0]    temp_count,
  output logic          temp_valid
);
  localparam int LW = $clog2(M+1);

  logic [LW-1:0] p_count, p_len;
  level_t        p_temp [M];
  logic [2:0]    p_sl;
  level_t        s_level;
  logic [4:0]    s_len;
  logic [2:0]    s_sl;
  logic          s_err;
  logic          use_par;
  level_t        temp_d [M];

  level_par_op #(.M(M)) u_par (
    .code(code[27 -: M]), .suffix_len(state_select[2:0]), .t1_adj(t1_adj), .max_codes(max_codes),
    .count(p_count), .len(p_len), .temp(p_temp), .next_sl(p_sl)
  );

  level_ser_op u_ser (
    .code(code), .suffix_len(state_select[2:0]), .t1_adj(t1_adj),
    .level(s_level), .len(s_len), .next_sl(s_sl), .error(s_err)
  );

  always_comb begin
    use_par = state_select[3] && (p_count != '0);
    count   = use_par ? 4'(p_count) : 4'd1;
    len     = use_par ? 5'(p_len) : s_len;
    next_sl = use_par ? p_sl : s_sl;
    error   = !use_par && s_err;
    for (int i = 0; i < M; i++)
      temp_d[i] = use_par ? p_temp[i] : ((i == 0) ? s_level : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) temp[i] <= '0;
      temp_count <= '0;
      temp_valid <= 1'b0;
    end else begin
      temp_valid <= en;
      if (en) begin
        temp       <= temp_d;
        temp_count <= count;
      end
    end
  end
endmodule

// level_par_op: extensive parallel logic operator of the Level block.
//
// Looks at the first M bits of the window (Codeword[27:20] for M = 8) and
// decodes every Level codeword that lies wholly inside them, in stream order:
// the first codeword with the current table, each following one with the table
// chosen by the value just decoded (Table 3 thresholds).  Temp_i receives the
// i-th level, Temp_i = 0 where no codeword was decoded.  Decoding stops at the
// first codeword that does not fit in M bits or when `max_codes` levels (the
// levels left in the block) have been found, so bits of the next step are
// never consumed.  `count` is Count_code_number and `len` the bits used.
//
// The document specifies this operator as a logic function of the M input bits
// and State_select that synthesis optimises, with the dependency between
// codewords resolved inside it; here that function is written as an unrolled
// chain of M small decoders, which is the same function.  Combinational.
module level_par_op
  import cavlc_pkg::*;
#(
  parameter int M = 8
) (
  input  logic [M-1:0]          code,        // first bit at bit M-1
  input  logic [2:0]            suffix_len,
  input  logic                  t1_adj,
  input  logic [4:0]            max_codes,
  output logic [$clog2(M+1)-1:0] count,
  output logic [$clog2(M+1)-1:0] len,
  output level_t                temp [M],
  output logic [2:0]            next_sl
);
  localparam int LW = $clog2(M+1);

  always_comb begin
    int         off;
    logic [2:0] sl;
    logic       adj;
    logic       go;
    off   = 0;
    sl    = suffix_len;
    adj   = t1_adj;
    go    = 1'b1;
    count = '0;
    for (int i = 0; i < M; i++) begin
      logic [M-1:0] w;
      int           p;
      int           l;
      logic         hit;
      logic [13:0]  lc;
      logic [M-1:0] sfx;
      level_t       lv;
      temp[i] = '0;
      w   = code << off;
      // prefix = leading zeros of the bits still unused
      p   = M;
      hit = 1'b0;
      for (int b = M - 1; b >= 0; b--)
        if (!hit && w[b] && (M - 1 - b) < (M - off)) begin
          hit = 1'b1;
          p   = M - 1 - b;
        end
      l   = p + 1 + int'(sl);
      sfx = (sl == 3'd0) ? '0 : M'((w << (p + 1)) >> (M - int'(sl)));
      lc  = 14'((p << sl) + int'(sfx)) + (adj ? 14'd2 : 14'd0);
      lv  = level_of_code(lc);
      if (go && hit && (off + l <= M) && (i < int'(max_codes))) begin
        temp[i] = lv;
        count   = count + LW'(1);
        off     = off + l;
        sl      = next_suffix_len(sl, lv);
        adj     = 1'b0;
      end else begin
        go = 1'b0;
      end
    end
    len     = LW'(off);
    next_sl = sl;
  end
endmodule

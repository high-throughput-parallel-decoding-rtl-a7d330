// cavlc_ref_pkg: reference CAVLC encoder used by the testbenches.
//
// Encodes a residual block the way an H.264/AVC encoder does (coefficients in
// scan order -> Coeff_token, trailing-one signs, Level prefix/suffix codes,
// Total_zeros, Run_before) and appends the bits to a queue, so the decoder's
// output can be compared with the block that was encoded.  The Run_before code
// table is written out here independently of the decoder; Coeff_token and
// Total_zeros use the code tables of cavlc_pkg in the encoding direction.
package cavlc_ref_pkg;
  import cavlc_pkg::*;

  typedef bit bitq_t[$];

  function automatic void put(ref bitq_t q, input int unsigned value, input int len);
    for (int b = len - 1; b >= 0; b--) q.push_back(bit'((value >> b) & 1));
  endfunction

  // N = (N_u + N_l + 1) >> 1 with availability
  function automatic int n_of(bit ua, bit la, int nu, int nl);
    if (ua && la) return (nu + nl + 1) >> 1;
    if (ua) return nu;
    if (la) return nl;
    return 0;
  endfunction

  // Run_before code for (run, zero_left): returns length, value in `code`
  function automatic int rb_code(int run, int zl, output int code);
    int t6 [7] = '{3, 0, 1, 3, 2, 5, 4};           // zero_left = 6, run 0..6
    int l6 [7] = '{2, 3, 3, 3, 3, 3, 3};
    case (zl)
      1: begin code = (run == 0) ? 1 : 0; return 1; end
      2: begin
        if (run == 0) begin code = 1; return 1; end
        code = (run == 1) ? 1 : 0; return 2;
      end
      3: begin code = 3 - run; return 2; end
      4: begin
        if (run < 3) begin code = 3 - run; return 2; end
        code = (run == 3) ? 1 : 0; return 3;
      end
      5: begin
        if (run < 2) begin code = 3 - run; return 2; end
        code = 5 - run; return 3;
      end
      6: begin code = t6[run]; return l6[run]; end
      default: begin
        if (run < 7) begin code = 7 - run; return 3; end
        code = 1; return run - 3;
      end
    endcase
  endfunction

  // One Level codeword for `level` with table suffix_len; `adj` is set for the
  // first level after fewer than three trailing ones.  Updates suffix_len to
  // the table of the next level and returns the code length.
  function automatic int encode_level(ref bitq_t q, input int level, ref int sl, input bit adj);
    int lc, prefix, sfx, sfx_len, mag;
    lc = (level > 0) ? 2 * level - 2 : -2 * level - 1;
    if (adj) lc -= 2;
    if (sl == 0) begin
      if (lc < 14)      begin prefix = lc; sfx_len = 0; sfx = 0; end
      else if (lc < 30) begin prefix = 14; sfx_len = 4; sfx = lc - 14; end
      else              begin prefix = 15; sfx_len = 12; sfx = lc - 30; end
    end else begin
      if (lc < (15 << sl)) begin prefix = lc >> sl; sfx_len = sl; sfx = lc & ((1 << sl) - 1); end
      else                 begin prefix = 15; sfx_len = 12; sfx = lc - (15 << sl); end
    end
    put(q, 1, prefix + 1);
    if (sfx_len > 0) put(q, sfx, sfx_len);
    if (sl == 0) sl = 1;
    mag = (level < 0) ? -level : level;
    if (mag > (3 << (sl - 1)) && sl < 6) sl++;
    return prefix + 1 + sfx_len;
  endfunction

  // Encode one block.  coeff[0..maxc-1] in scan order.  Returns the number of
  // codewords written.
  function automatic int encode_block(ref bitq_t q, input int coeff[16], input int maxc,
                                      input bit chroma_dc, input int n_c);
    int lv[16];
    int rn[16];
    int tc, t1, tz, last, codes, zl, sl, tbl;
    int l, b, idx;
    tc = 0; t1 = 0; tz = 0; last = -1; codes = 0;
    // collect levels from the highest frequency down, with runs
    for (int p = maxc - 1; p >= 0; p--) begin
      if (coeff[p] != 0) begin
        lv[tc] = coeff[p];
        rn[tc] = 0;
        for (int z = p - 1; z >= 0 && coeff[z] == 0; z--) rn[tc]++;
        if (last < 0) last = p;
        tc++;
      end
    end
    for (int i = 0; i < tc && i < 3; i++) begin
      if (lv[i] == 1 || lv[i] == -1) t1++;
      else break;
    end
    if (tc > 0) tz = last + 1 - tc;
    // coeff_token
    if (chroma_dc) begin
      l = CTDC_LEN[tc * 4 + t1]; b = CTDC_BITS[tc * 4 + t1];
    end else begin
      tbl = (n_c < 2) ? 0 : (n_c < 4) ? 1 : (n_c < 8) ? 2 : 3;
      l = CT_LEN[tbl * 68 + tc * 4 + t1]; b = CT_BITS[tbl * 68 + tc * 4 + t1];
    end
    put(q, b, l); codes++;
    if (tc == 0) return codes;
    // trailing-one signs
    for (int i = 0; i < t1; i++) begin put(q, (lv[i] < 0) ? 1 : 0, 1); codes++; end
    // levels
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int i = t1; i < tc; i++) begin
      void'(encode_level(q, lv[i], sl, i == t1 && t1 < 3));
      codes++;
    end
    // total zeros
    if (tc < maxc) begin
      if (chroma_dc) begin
        idx = (tc - 1) * 4 + tz; put(q, TZDC_BITS[idx], TZDC_LEN[idx]);
      end else begin
        idx = (tc - 1) * 16 + tz; put(q, TZ_BITS[idx], TZ_LEN[idx]);
      end
      codes++;
    end
    // run before
    zl = tz;
    for (int i = 0; i < tc - 1 && zl > 0; i++) begin
      int c;
      l = rb_code(rn[i], zl, c);
      put(q, c, l);
      codes++;
      zl -= rn[i];
    end
    return codes;
  endfunction
endpackage

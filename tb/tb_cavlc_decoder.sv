// tb_cavlc_decoder: end-to-end test of the CAVLC decoder at its default size.
//
// Builds a bitstream from random residual blocks (luma 4x4, AC and chroma DC,
// random neighbour counts, mostly small coefficients with occasional large
// ones that need escape codes) with the reference encoder, feeds it to the
// decoder with random stream stalls, and compares every decoded block with
// the block that was encoded.  The first block is the 4x4 example with stream
// 000010001110010111101101: its codes and its five decoding cycles (one per
// step, two Level codewords and four Run_before codewords in one cycle each)
// are checked exactly.  Also checks that the codewords counted by the decoder
// equal those written, reports codewords per cycle, and counts how often each
// mechanism of the design was exercised (a mechanism never hit is a failure).
module tb_cavlc_decoder;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  localparam int NB       = 3000;
  localparam int WATCHDOG = 400000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [31:0] s_data;
  logic        s_valid;
  logic        s_ready;
  logic        start;
  mode_t       mode;
  logic        ready_for_start, busy, out_valid, error;
  level_t      out_coeff [16];
  logic [4:0]  out_total_coeff;
  logic [3:0]  codes_decoded;
  step_t       step;

  cavlc_decoder dut (
    .clk(clk), .rst_n(rst_n), .s_data(s_data), .s_valid(s_valid), .s_ready(s_ready),
    .start(start), .mode(mode), .ready_for_start(ready_for_start), .busy(busy),
    .out_valid(out_valid), .out_coeff(out_coeff), .out_total_coeff(out_total_coeff),
    .codes_decoded(codes_decoded), .step(step), .error(error)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bitq_t bits;
  mode_t modes [NB];
  int    blocks [NB][16];
  int    maxcs [NB];
  int    codes_written = 0;
  longint codes_seen = 0, active_cycles = 0;
  int    n_out = 0;
  int    next_blk = 0;
  int    word_idx = 0;
  bit    start_pending = 1'b0;
  int    fig1_cycles = 0;
  bit    fig1_done = 1'b0;

  // mechanism counters
  int m_par_level = 0, m_ser_level = 0, m_escape = 0, m_par_run = 0, m_long_run = 0;
  int m_t1 = 0, m_tz_skip = 0, m_empty = 0, m_dc = 0, m_ac = 0, m_vlc6 = 0, m_stall = 0;
  int m_tab [5] = '{0, 0, 0, 0, 0};   // Num_VLC0, 1, 2, DC (chroma), fixed-length
  int m_first_vlc1 = 0, m_t1_adj = 0, m_back2back = 0;

  function automatic int rand_level();
    int r, m;
    r = $urandom_range(0, 99);
    if (r < 70)      m = 1;
    else if (r < 90) m = $urandom_range(2, 3);
    else if (r < 98) m = $urandom_range(4, 20);
    else             m = $urandom_range(21, 2000);
    return $urandom_range(0, 1) ? m : -m;
  endfunction

  task automatic make_blocks();
    int fig1 [16] = '{0, 3, 0, 1, -1, -1, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0};
    bitq_t ref_q;
    string s;
    for (int k = 0; k < NB; k++) begin
      int kind, dens, nc;
      mode_t md;
      md = '0;
      kind = $urandom_range(0, 9);
      md.chroma_dc = (kind >= 8);
      md.ac        = (kind == 6 || kind == 7);
      md.upper_avail = $urandom_range(0, 3) != 0;
      md.left_avail  = $urandom_range(0, 3) != 0;
      md.n_upper = 5'($urandom_range(0, 16));
      md.n_left  = 5'($urandom_range(0, 16));
      maxcs[k] = md.chroma_dc ? 4 : (md.ac ? 15 : 16);
      dens = $urandom_range(0, 9);
      for (int p = 0; p < 16; p++) begin
        int prob;
        prob = (dens == 0) ? 0 : (dens == 9) ? 100 : 70 - p * (4 + dens);
        blocks[k][p] = (p < maxcs[k] && $urandom_range(0, 99) < prob) ? rand_level() : 0;
      end
      // every 50th block: a long Run_before (run of 12..14 zeros)
      if (k % 50 == 1 && !md.chroma_dc) begin
        int r;
        r = $urandom_range(12, 13);
        for (int p = 0; p < 16; p++) blocks[k][p] = 0;
        blocks[k][14] = rand_level();
        blocks[k][13 - r] = rand_level();
        if (13 - r > 0) blocks[k][0] = 1;
      end
      // every 50th block: all coefficients large, reaching Level_VLC6
      if (k % 50 == 2)
        for (int p = 0; p < maxcs[k]; p++) blocks[k][p] = ($urandom_range(0, 1) ? 1 : -1) * $urandom_range(60, 2000);
      if (k == 0) begin
        md = '0;
        md.upper_avail = 1'b1; md.left_avail = 1'b1;     // N = 0
        maxcs[k] = 16;
        blocks[k] = fig1;
      end
      modes[k] = md;
      nc = n_of(md.upper_avail, md.left_avail, md.n_upper, md.n_left);
      if (k == 0) begin
        void'(encode_block(ref_q, blocks[k], 16, 1'b0, nc));
        s = "";
        foreach (ref_q[i]) s = {s, ref_q[i] ? "1" : "0"};
        checks++;
        if (s != "000010001110010111101101") begin
          failures++;
          $display("FAIL: example block encodes to %s", s);
        end
      end
      codes_written += encode_block(bits, blocks[k], maxcs[k], md.chroma_dc, nc);
    end
  endtask

  // stream source with random stalls; zero padding after the last block
  always @(posedge clk) begin
    if (rst_n && s_valid && s_ready) word_idx <= word_idx + 1;
  end
  always_comb begin
    s_data = '0;
    for (int b = 0; b < 32; b++)
      if (word_idx * 32 + b < bits.size()) s_data[31 - b] = bits[word_idx * 32 + b];
  end
  initial s_valid = 1'b0;
  always @(negedge clk) s_valid <= rst_n && ($urandom_range(0, 9) != 0);

  // block starts
  initial begin start = 1'b0; mode = '0; end
  always @(negedge clk) begin
    if (start_pending) next_blk = next_blk + 1;
    start_pending = 1'b0;
    start <= 1'b0;
    if (rst_n && ready_for_start && next_blk < NB) begin
      if (step == ST_DONE) m_back2back++;
      start <= 1'b1;
      mode  <= modes[next_blk];
      start_pending = 1'b1;
    end
  end

  // output check and statistics
  always @(posedge clk) begin
    if (rst_n) begin
      codes_seen += longint'(codes_decoded);
      if (busy) active_cycles++;
      if (step == ST_DONE) fig1_done = 1'b1;
      if (!fig1_done && dut.act) fig1_cycles++;
      if (error) begin failures++; $display("FAIL: decoder flagged an invalid code"); end
      if (dut.act) begin
        if (step == ST_COEFF_TOKEN) begin
          if (dut.state_select == SS_NUM_VLC_DC) begin
            if (dut.chroma_dc) m_tab[3]++; else m_tab[4]++;
          end else m_tab[int'(dut.state_select[1:0])]++;
          if (dut.ct_tc == 5'd0) m_empty++;
          if (dut.ct_tc > 5'd10 && dut.ct_t1 != 2'd3) m_first_vlc1++;
          if (dut.ct_tc != 0 && dut.ct_tc == dut.u_fsm.max_coeff) m_tz_skip++;
          if (dut.chroma_dc) m_dc++;
          if (dut.u_fsm.mode_q.ac) m_ac++;
        end
        if (step == ST_TRAILING_ONES) m_t1++;
        if (step == ST_LEVEL) begin
          if (dut.u_level.use_par && dut.lv_count >= 2) m_par_level++;
          if (!dut.u_level.use_par) m_ser_level++;
          if (!dut.u_level.use_par && dut.u_level.u_ser.prefix >= 4'd14) m_escape++;
          if (dut.state_select == SS_LEVEL6) m_vlc6++;
          if (dut.t1_adj) m_t1_adj++;
        end
        if (step == ST_RUN_BEFORE) begin
          if (dut.rb_count >= 2) m_par_run++;
          if (dut.rb_len > 4'd8) m_long_run++;
        end
      end
      if (busy && !dut.win_valid && step != ST_DONE) m_stall++;
      if (out_valid) begin
        if (n_out >= NB) begin
          failures++; $display("FAIL: extra output block");
        end else begin
          int tc;
          tc = 0;
          for (int p = 0; p < 16; p++) begin
            checks++;
            if (out_coeff[p] != level_t'(blocks[n_out][p])) begin
              failures++;
              if (failures < 20)
                $display("FAIL: block %0d coeff %0d got %0d expected %0d", n_out, p, out_coeff[p], blocks[n_out][p]);
            end
            if (blocks[n_out][p] != 0) tc++;
          end
          checks++;
          if (out_total_coeff != 5'(tc)) begin
            failures++; $display("FAIL: block %0d TotalCoeff %0d expected %0d", n_out, out_total_coeff, tc);
          end
          if (n_out == 0) begin
            checks++;
            if (fig1_cycles != 5) begin
              failures++; $display("FAIL: example block took %0d decoding cycles, expected 5", fig1_cycles);
            end
          end
        end
        n_out++;
      end
    end
  end

  task automatic need(string name, int count);
    checks++;
    $display("  %-34s %0d", name, count);
    if (count == 0) begin failures++; $display("FAIL: mechanism never exercised: %s", name); end
  endtask

  initial begin
    make_blocks();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_out == NB);
    repeat (5) @(posedge clk);
    checks++;
    if (codes_seen != longint'(codes_written)) begin
      failures++; $display("FAIL: decoder counted %0d codewords, %0d written", codes_seen, codes_written);
    end
    $display("blocks %0d, codewords %0d, busy cycles %0d, codewords/cycle %0.3f",
             NB, codes_written, active_cycles, real'(codes_seen) / real'(active_cycles));
    $display("mechanisms:");
    need("Level: several codewords per cycle", m_par_level);
    need("Level: serial (codeword > M bits)", m_ser_level);
    need("Level: escape code (prefix 14/15)", m_escape);
    need("Level: Level_VLC6 reached", m_vlc6);
    need("Level: first level +1 (T1 < 3)", m_t1_adj);
    need("Level: starts in Level_VLC1", m_first_vlc1);
    need("Run_before: several per cycle", m_par_run);
    need("Run_before: code > M bits", m_long_run);
    need("Trailing_ones step", m_t1);
    need("Total_zeros skipped (TC = max)", m_tz_skip);
    need("empty block (TC = 0)", m_empty);
    need("chroma DC block", m_dc);
    need("AC block (15 coeffs)", m_ac);
    need("Coeff_token Num_VLC0", m_tab[0]);
    need("Coeff_token Num_VLC1", m_tab[1]);
    need("Coeff_token Num_VLC2", m_tab[2]);
    need("Coeff_token Num_VLC_DC (chroma)", m_tab[3]);
    need("Coeff_token fixed length (N >= 8)", m_tab[4]);
    need("stream stall (window not full)", m_stall);
    need("next block started in DONE", m_back2back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d blocks out", n_out, NB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

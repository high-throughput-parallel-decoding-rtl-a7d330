// tb_barrel_shifter: random stream words with random stalls and random shifts
// (0..28 bits, never more than held); the 28-bit window must always equal the
// next 28 bits of the reference bit sequence.  Also checks that a full window
// is available again after the maximum shift within a few cycles.
module tb_barrel_shifter;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] s_data;
  logic        s_valid, s_ready, win_valid;
  logic [4:0]  shift;
  logic [27:0] window;
  int checks = 0, failures = 0;
  bit ref_q[$];
  int consumed = 0, words = 0, max_shifts = 0;

  barrel_shifter #(.WIN(28), .BUF(64)) dut (
    .clk(clk), .rst_n(rst_n), .flush(1'b0), .s_data(s_data), .s_valid(s_valid), .s_ready(s_ready),
    .shift(shift), .window(window), .win_valid(win_valid)
  );

  always #5 clk = ~clk;

  initial begin
    s_valid = 1'b0; s_data = '0; shift = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // check the window against the reference
      if (win_valid) begin
        logic [27:0] exp;
        for (int i = 0; i < 28; i++) exp[27 - i] = ref_q[consumed + i];
        checks++;
        if (window != exp) begin
          failures++;
          if (failures < 10) $display("FAIL: cycle %0d window %h expected %h", cyc, window, exp);
        end
      end
      // new stimulus
      s_valid = ($urandom_range(0, 3) != 0);
      s_data  = $urandom;
      shift   = win_valid ? (($urandom_range(0, 3) == 0) ? 5'd28 : 5'($urandom_range(0, 8))) : 5'd0;
      if (shift == 5'd28) max_shifts++;
      @(posedge clk);
      if (s_valid && s_ready) begin
        for (int b = 31; b >= 0; b--) ref_q.push_back(s_data[b]);
        words++;
      end
      consumed += int'(shift);
    end
    checks++;
    if (max_shifts == 0 || words < 1000) begin failures++; $display("FAIL: too little traffic"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

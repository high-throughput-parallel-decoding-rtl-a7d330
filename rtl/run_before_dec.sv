// run_before_dec: the Run_before step (step 5), parallel and serial.
//
// Run_before codes depend on Zero_left (Table 5 of the design description:
// codes of 1..3 bits for Zero_left 1..6, and for Zero_left of 7 or more 3-bit
// codes for runs 0..6 and 0001, 00001, ... for runs 7..14).  The parallel part
// decodes, in stream order, every code that lies wholly in the first M window
// bits, subtracting each run from Zero_left before decoding the next; it stops
// when Zero_left reaches 0, when `max_runs` runs (TotalCoeff-1 minus those
// already decoded) have been found, or at a code that does not fit.  If no
// code fits in M bits (runs of 12..14 need 9..11 bits) one code is decoded
// from the first 11 bits.  Combinational.
module run_before_dec
  import cavlc_pkg::*;
#(
  parameter int M = 8
) (
  input  logic [10:0] code,            // window bits, first bit at bit 10
  input  logic [3:0]  zero_left,       // >= 1
  input  logic [4:0]  max_runs,        // >= 1
  output logic [3:0]  count,
  output logic [3:0]  run [M],
  output logic [3:0]  len,
  output logic [3:0]  next_zero_left
);
  // One Run_before code at the head of `w` (first bit at bit 10) for zero_left zl.
  function automatic void rb_code(input logic [10:0] w, input logic [3:0] zl,
                                  output logic [3:0] r, output logic [3:0] l);
    logic [2:0] t;
    t = w[10:8];
    r = 4'd0;
    l = 4'd1;
    unique case (zl)
      4'd1: begin l = 4'd1; r = t[2] ? 4'd0 : 4'd1; end
      4'd2: begin
        if (t[2]) begin l = 4'd1; r = 4'd0; end
        else      begin l = 4'd2; r = t[1] ? 4'd1 : 4'd2; end
      end
      4'd3: begin l = 4'd2; r = 4'd3 - {2'b00, t[2:1]}; end
      4'd4: begin
        if (t[2:1] != 2'b00) begin l = 4'd2; r = 4'd3 - {2'b00, t[2:1]}; end
        else                 begin l = 4'd3; r = t[0] ? 4'd3 : 4'd4; end
      end
      4'd5: begin
        if (t[2]) begin l = 4'd2; r = t[1] ? 4'd0 : 4'd1; end
        else      begin l = 4'd3; r = 4'd5 - {2'b00, t[1:0]}; end
      end
      4'd6: begin
        l = (t[2:1] == 2'b11) ? 4'd2 : 4'd3;
        unique case (t)
          3'b110, 3'b111: r = 4'd0;
          3'b000: r = 4'd1;
          3'b001: r = 4'd2;
          3'b011: r = 4'd3;
          3'b010: r = 4'd4;
          3'b101: r = 4'd5;
          default: r = 4'd6;   // 100
        endcase
      end
      default: begin             // zero_left of 7 or more
        if (t != 3'b000) begin l = 4'd3; r = 4'd7 - {1'b0, t}; end
        else begin
          l = 4'd11;
          r = 4'd14;
          // the highest set bit wins: the lowest bits are scanned first
          for (int b = 0; b <= 7; b++)
            if (w[b]) begin l = 4'(11 - b); r = 4'(l + 3); end
        end
      end
    endcase
  endfunction

  always_comb begin
    int         off;
    logic [3:0] zl;
    logic       go;
    logic [3:0] r0, l0;
    r0    = '0;
    l0    = '0;
    off   = 0;
    zl    = zero_left;
    go    = 1'b1;
    count = '0;
    for (int i = 0; i < M; i++) begin
      logic [10:0] w;
      logic [3:0]  r, l;
      run[i] = '0;
      w = code << off;
      rb_code(w, zl, r, l);
      if (go && zl != 4'd0 && i < int'(max_runs) && off + int'(l) <= M) begin
        run[i] = r;
        count  = count + 4'd1;
        off    = off + int'(l);
        zl     = zl - r;
      end else begin
        go = 1'b0;
      end
    end
    if (count == 4'd0) begin
      // first code longer than M bits: serial decode
      rb_code(code, zero_left, r0, l0);
      run[0] = r0;
      count  = 4'd1;
      off    = int'(l0);
      zl     = zero_left - r0;
    end
    len            = 4'(off);
    next_zero_left = zl;
  end
endmodule

// barrel_shifter: bit buffer and barrel shifter in front of the step decoders.
//
// Stream words of 32 bits (first bit in bit 31) are appended behind the bits
// still held in a 64-bit register.  The oldest WIN bits are always presented,
// MSB first, on `window`; `win_valid` says that at least WIN bits are held.
// Each cycle the active step decoder returns how many bits it used
// (Length_feedback, `shift`), and the register drops them by a left barrel shift
// in the same clock edge that may also append a new word.  A word is accepted
// (s_ready) while at most 64-32 bits remain after the shift.
//
// The document gives the shifter and its feedback path (its Fig. 6); the buffer
// depth, word width and handshake are this design's choices.  `shift` must not
// exceed the number of bits held, which holds because a decoder only acts on a
// valid window and no code is longer than WIN.
module barrel_shifter #(
  parameter int WIN = 28,
  parameter int BUF = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           flush,      // drop every held bit
  input  logic [31:0]    s_data,
  input  logic           s_valid,
  output logic           s_ready,
  input  logic [4:0]     shift,      // Length_feedback
  output logic [WIN-1:0] window,
  output logic           win_valid
);
  localparam int CW = $clog2(BUF + 1);

  logic [BUF-1:0] buf_q;   // held bits, oldest at MSB
  logic [CW-1:0]  cnt_q;   // number of held bits
  logic [BUF-1:0] shifted;
  logic [CW-1:0]  cnt_after;

  assign window    = buf_q[BUF-1 -: WIN];
  assign win_valid = cnt_q >= CW'(WIN);
  assign shifted   = buf_q << shift;
  assign cnt_after = cnt_q - CW'(shift);
  assign s_ready   = !flush && (cnt_after <= CW'(BUF - 32));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (flush) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (s_valid && s_ready) begin
      buf_q <= shifted | (BUF'({s_data, {(BUF-32){1'b0}}}) >> cnt_after);
      cnt_q <= cnt_after + CW'(32);
    end else begin
      buf_q <= shifted;
      cnt_q <= cnt_after;
    end
  end

  a_shift_in_range: assert property (@(posedge clk) disable iff (!rst_n) CW'(shift) <= cnt_q)
    else $error("barrel_shifter: shift beyond held bits");
endmodule

// golay_encoder: check-bit generator of the binary Golay (23,12,7) code
// by long division, without a linear feedback shift register.
//
// The 12-bit message M(x) followed by 11 zeros forms the 23-bit dividend
// P(x) = M(x) x^11, which is divided by the generator G(x). Instead of
// moving one bit per clock as an LFSR does, each clock performs one whole
// division step on the 12-bit window at the top of the dividend:
//   1. controlled subtraction: if the window starts with a one, G(x) is
//      XORed onto it (modulo-2 subtraction);
//   2. a 12:4 priority encoder counts the leading zeros of the result;
//   3. a circular shifter rotates the 23-bit intermediate result left by
//      that count (limited to the number of positions still left), so the
//      window again starts with a one;
//   4. the loop counter R7, loaded with 11, is decreased by the shift.
// When R7 has reached zero the window sits over the last 12 dividend bits;
// the step taken then leaves the remainder, the 11 check bits, in the low
// 11 bits of the window. They are loaded into R3 (under the load strobe Ld)
// and the codeword {message, check bits} into R6.
//
// A 2:1 multiplexer in front of the subtractor selects the new message in
// the cycle `start` is accepted, so the first division step happens in
// that same cycle. Every step shifts by at least one position, so the
// codeword is ready at most 12 clock edges after the start edge (counting
// the start edge as the first); messages with long zero runs finish
// sooner. `done` is a one-cycle pulse with cw23/check valid; they hold until
// the next codeword. `start` is ignored while `busy` is high.
//
// Codeword layout: cw23[22:11] = message (bit 22 = coefficient of x^22),
// cw23[10:0] = check bits. The division algorithm, the priority encoder,
// the circular shifter, the counter R7 loaded with 11 and the registers R3
// and R6 follow the source architecture; the start/busy/done handshake, the
// limit on the last shift and the synchronous active-low reset are choices
// of this implementation.
module golay_encoder
  import golay_pkg::*;
#(
  parameter logic [11:0] GPOLY = GEN_POLY  // G(x), bit k = coefficient of x^k
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,   // accept msg (when not busy)
  input  logic [11:0] msg,
  output logic        busy,
  output logic        done,    // one-cycle pulse: cw23/check valid
  output logic [10:0] check,   // R3: check bits
  output logic [22:0] cw23     // R6: (23,12,7) codeword
);

  logic [22:0] work_q;         // rotated intermediate result
  logic [3:0]  r7_q;           // positions the divisor may still move
  logic [11:0] msg_q;

  logic        load;
  logic [22:0] div_in, sub_out, rot_out;
  logic [3:0]  cnt_in, lz, shamt;
  logic [11:0] msg_in;
  logic        ld;             // load strobe of R3 / R6

  assign load   = start && !busy;
  // 2:1 multiplexer: new message or circularly shifted intermediate result
  assign div_in = load ? {msg, 11'b0} : work_q;
  assign cnt_in = load ? 4'd11 : r7_q;
  assign msg_in = load ? msg : msg_q;

  // controlled subtractor (modulo 2)
  assign sub_out = div_in[22] ? (div_in ^ {GPOLY, 11'b0}) : div_in;

  prio_enc12 u_lzc (
    .in  (sub_out[22:11]),
    .idx (lz)
  );

  // loop control: never move past the last dividend bit
  assign shamt = (lz > cnt_in) ? cnt_in : lz;

  circ_shift23 u_rot (
    .in  (sub_out),
    .amt (shamt),
    .out (rot_out)
  );

  assign ld = (load || busy) && (cnt_in == 4'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      work_q <= '0;
      r7_q   <= '0;
      msg_q  <= '0;
      check  <= '0;
      cw23   <= '0;
    end else begin
      done <= 1'b0;
      if (load || busy) begin
        msg_q <= msg_in;
        if (ld) begin
          check <= sub_out[21:11];
          cw23  <= {msg_in, sub_out[21:11]};
          done  <= 1'b1;
          busy  <= 1'b0;
        end else begin
          work_q <= rot_out;
          r7_q   <= cnt_in - shamt;
          busy   <= 1'b1;
        end
      end
    end
  end

  // The loop counter never exceeds its load value, and a finished codeword
  // always ends the busy period.
  a_r7_range: assert property (@(posedge clk) disable iff (!rst_n) r7_q <= 4'd11);
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule

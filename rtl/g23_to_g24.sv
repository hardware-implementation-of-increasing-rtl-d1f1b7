// g23_to_g24: turns a binary Golay (23,12,7) codeword into an extended
// Golay (24,12,8) codeword by appending an overall parity bit.
//
// First edge: register R9 takes the weight of the 23-bit codeword and a copy
// of the codeword is held (R6). Two candidates are formed from it, R6' (the
// codeword followed by 0) and R6'' (followed by 1). Second edge: a 2:1
// multiplexer steered by bit 0 of R9 loads R10 with R6' for an even weight
// and R6'' for an odd weight, so every extended codeword has even weight.
//
// The weight is taken with two 12-bit weight measurement units, one over
// cw23[22:11] and one over cw23[10:0] padded with a zero, whose results are
// added; this split is a choice of this implementation.
//
// Timing: in_valid/cw23 sampled at one edge give out_valid/cw24 two edges
// later; one word per clock can be accepted. cw24 = {cw23, parity}.
// Synchronous active-low reset clears the valid flags and registers.
module g23_to_g24 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [22:0] cw23,
  output logic        out_valid,
  output logic [23:0] cw24       // R10
);

  logic [3:0]  wt_hi, wt_lo;
  logic [4:0]  r9_q;             // weight, 0..23 (only bit 0 steers the mux)
  logic [22:0] r6_q;
  logic        v1_q;
  logic [23:0] r6_0, r6_1;

  weight_unit12 u_wt_hi (.in(cw23[22:11]),         .weight(wt_hi));
  weight_unit12 u_wt_lo (.in({1'b0, cw23[10:0]}),  .weight(wt_lo));

  assign r6_0 = {r6_q, 1'b0};   // R6'
  assign r6_1 = {r6_q, 1'b1};   // R6''

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r9_q      <= '0;
      r6_q      <= '0;
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
      cw24      <= '0;
    end else begin
      v1_q      <= in_valid;
      out_valid <= v1_q;
      if (in_valid) begin
        r9_q <= {1'b0, wt_hi} + {1'b0, wt_lo};
        r6_q <= cw23;
      end
      if (v1_q) cw24 <= r9_q[0] ? r6_1 : r6_0;
    end
  end

endmodule

// circ_shift23: 23-bit left rotator (barrel shifter).
//
// Rotates the intermediate result of the long division left by `amt`
// positions (0 to 15 accepted; the encoder never asks for more than 11).
// Bits leaving at the top re-enter at the bottom. In the encoder the bits
// rotated out are always leading zeros, so the rotation acts as a left
// shift that brings zeros in, which is why a circular shifter suffices.
// Built as four stages of fixed rotations (1, 2, 4, 8). Combinational.
module circ_shift23 (
  input  logic [22:0] in,
  input  logic [3:0]  amt,
  output logic [22:0] out
);

  logic [22:0] st1, st2, st4;

  always_comb begin
    st1 = amt[0] ? {in[21:0],  in[22]}     : in;
    st2 = amt[1] ? {st1[20:0], st1[22:21]} : st1;
    st4 = amt[2] ? {st2[18:0], st2[22:19]} : st2;
    out = amt[3] ? {st4[14:0], st4[22:15]} : st4;
  end

endmodule

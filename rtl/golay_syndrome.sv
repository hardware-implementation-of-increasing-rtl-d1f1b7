// golay_syndrome: syndrome of a received extended Golay word.
//
// For the code generated by G = [I | B] the parity-check matrix may be
// taken as [I | B] as well (B is symmetric and B*B = I). With the received
// word w = (w1, w2), w1 = rx[23:12] and w2 = rx[11:0], the syndrome is
// s = w1 + w2*B over GF(2): w1 XORed with the rows of B selected by the set
// bits of w2 (rx[11] selects the first row). A zero syndrome means rx is a
// codeword. Purely combinational: twelve 12-bit AND-XOR terms.
module golay_syndrome
  import golay_pkg::*;
(
  input  logic [23:0] rx,
  output logic [11:0] s
);

  assign s = rx[23:12] ^ mul_b(rx[11:0]);

endmodule

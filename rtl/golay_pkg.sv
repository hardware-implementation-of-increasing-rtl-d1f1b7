// golay_pkg: constants shared by the Golay (23,12,7) encoder and the
// extended Golay (24,12,8) decoder.
//
// GEN_POLY is the 12-bit generator polynomial G(x) of the cyclic (23,12,7)
// code, bit k being the coefficient of x^k. Two generator polynomials exist
// for this code; x^11+x^10+x^6+x^5+x^4+x^2+1 is the default and
// x^11+x^9+x^7+x^6+x^5+x+1 (GEN_POLY_ALT) can be passed to the encoder.
//
// B_ROWS holds the 12x12 matrix B of the extended code in the form
// G = [I | B]. Row i (i = 0 is the first row) is B_ROWS[i]; within a row,
// bit 11 is the leftmost column. B is symmetric and B*B = I, which the
// decoder relies on: the second syndrome s*B carries the errors of the
// second half of the word.
package golay_pkg;

  localparam logic [11:0] GEN_POLY = 12'b1100_0111_0101;      // 0xC75
  localparam logic [11:0] GEN_POLY_ALT = 12'b1010_1110_0011;  // 0xAE3

  localparam logic [11:0] B_ROWS[12] = '{
    12'b110111000101,
    12'b101110001011,
    12'b011100010111,
    12'b111000101101,
    12'b110001011011,
    12'b100010110111,
    12'b000101101111,
    12'b001011011101,
    12'b010110111001,
    12'b101101110001,
    12'b011011100011,
    12'b111111111110
  };

  // How the decoder found its error pattern.
  typedef enum logic [2:0] {
    PATH_S      = 3'd0,  // weight(s) <= 3: errors only in the first half
    PATH_S_BI   = 3'd1,  // weight(s + b_i) <= 2: one error in the second half
    PATH_SB     = 3'd2,  // weight(sB) <= 3: errors only in the second half
    PATH_SB_BI  = 3'd3,  // weight(sB + b_i) <= 2: one error in the first half
    PATH_UNCORR = 3'd4   // no pattern of weight <= 3 found
  } dec_path_e;

  // Product v * B over GF(2) of a 12-bit row vector v (bit 11 = first
  // element) with B: the XOR of the rows of B selected by the set bits of v.
  function automatic logic [11:0] mul_b(input logic [11:0] v);
    logic [11:0] acc;
    acc = '0;
    for (int i = 0; i < 12; i++) begin
      if (v[11-i]) acc ^= B_ROWS[i];
    end
    return acc;
  endfunction

endpackage

// weight_unit12: number of ones (Hamming weight) of a 12-bit word.
//
// Structure of the weight measurement unit: the input is split into four
// groups of three bits, each summed by a full adder into a 2-bit count
// (0..3). Two second-level adders each add the counts of two full adders
// into a 3-bit count (0..6), and a final 3-bit adder gives the 4-bit weight
// (0..12). The tree is three adder levels deep, which keeps the critical
// path short. The second-level blocks are labelled half adders in the
// original drawing; since each of them has to add two 2-bit counts they are
// written here as 2-bit adders. Purely combinational.
module weight_unit12 (
  input  logic [11:0] in,
  output logic [3:0]  weight
);

  logic [1:0] fa_cnt[4];   // full-adder level: {carry, sum}
  logic [2:0] pair_cnt[2]; // second level

  always_comb begin
    for (int g = 0; g < 4; g++) begin
      fa_cnt[g][0] = in[3*g] ^ in[3*g+1] ^ in[3*g+2];
      fa_cnt[g][1] = (in[3*g] & in[3*g+1]) | (in[3*g] & in[3*g+2]) |
                     (in[3*g+1] & in[3*g+2]);
    end
    pair_cnt[0] = {1'b0, fa_cnt[0]} + {1'b0, fa_cnt[1]};
    pair_cnt[1] = {1'b0, fa_cnt[2]} + {1'b0, fa_cnt[3]};
    weight = {1'b0, pair_cnt[0]} + {1'b0, pair_cnt[1]};
  end

endmodule

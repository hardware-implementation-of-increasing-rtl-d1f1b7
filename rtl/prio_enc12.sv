// prio_enc12: 12-input priority encoder with a 4-bit output.
//
// Returns the position of the first set bit counted from the MSB: 0 when
// in[11] is set, 11 when only in[0] is set, and 12 when no bit is set. The
// encoder uses this as the number of leading zeros of the 12-bit window of
// the division (the "12:4 priority encoder"); the decoder uses it to pick
// the first row of B that meets the weight limit, the value 12 steering its
// 13:1 multiplexer to the "no match" input. Purely combinational.
module prio_enc12 (
  input  logic [11:0] in,
  output logic [3:0]  idx
);

  always_comb begin
    idx = 4'd12;
    for (int i = 0; i < 12; i++) begin
      if (in[i]) idx = 4'(11 - i);  // lowest bit first, so the MSB wins
    end
  end

endmodule

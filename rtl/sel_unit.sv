// sel_unit: finds the row b_i of B for which v + b_i has weight at most 2.
//
// Twelve candidates v XOR b_i (i = 0..11, i = 0 being the first row of B)
// are formed in parallel and each goes through a 12-bit weight measurement
// unit; comparing each weight with 2 gives a 12-bit hit vector, hit bit 11
// standing for the first row. A 12:1 priority encoder turns the vector
// into a 4-bit index, the first matching row winning, and a 13:1
// multiplexer steered by that index delivers the matching candidate, its
// 13th input (index 12, no row matched) being zero. In the decoder, v is
// the syndrome s or the second syndrome sB. Purely combinational.
module sel_unit
  import golay_pkg::*;
(
  input  logic [11:0] v,
  output logic        found,  // some weight(v + b_i) <= 2
  output logic [3:0]  idx,    // row index i, 12 when none
  output logic [11:0] sel     // v + b_idx, 0 when none
);

  logic [11:0] cand[13];
  logic [3:0]  wt[12];
  logic [11:0] hit;

  for (genvar i = 0; i < 12; i++) begin : g_row
    assign cand[i] = v ^ B_ROWS[i];
    weight_unit12 u_wt (.in(cand[i]), .weight(wt[i]));
    assign hit[11-i] = (wt[i] <= 4'd2);
  end
  assign cand[12] = '0;

  prio_enc12 u_pe (.in(hit), .idx(idx));

  assign found = (idx != 4'd12);
  assign sel   = cand[idx];

endmodule

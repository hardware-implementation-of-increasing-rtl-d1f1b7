// golay24_decoder: pipelined incomplete maximum-likelihood (IMLD) decoder
// for the extended Golay (24,12,8) code in the form G = [I | B].
//
// The received word is w = (w1, w2), w1 = rx[23:12] (information half) and
// w2 = rx[11:0]. Two syndromes are used, s = w1 + w2*B and sB = s*B, one
// for each of the two parity-check forms [I|B] and [B|I]. The error pattern
// u is the first of these that applies:
//   weight(s)  <= 3                 ->  u = (s, 0)
//   weight(s + b_i) <= 2 for some i ->  u = (s + b_i, e_i)
//   weight(sB) <= 3                 ->  u = (0, sB)
//   weight(sB + b_i) <= 2           ->  u = (e_i, sB + b_i)
// where b_i is row i of B and e_i the unit vector with a one at position i
// (first row <-> bit 11). Any pattern of up to three errors is corrected;
// if no test applies (four or more errors) `uncorrectable` is raised and
// the word is passed on unchanged. The corrected word is w + u and its
// information half is the message.
//
// Pipeline, one word accepted per clock:
//   edge 1: input register (rx, valid)
//   edge 2: syndrome s
//   edge 3: weight(s) and the s + b_i selection unit; sB
//   edge 4: weight(sB) and the sB + b_i selection unit, choice of u,
//           correction; outputs registered
// so out_valid follows in_valid by four clock cycles. The decoding rule,
// the weight measurement units, the selection units with their 12:1
// priority encoder and 13:1 multiplexer follow the source architecture;
// the split into these four stages, the handshake, the `path` output and
// the synchronous active-low reset are choices of this implementation.
module golay24_decoder
  import golay_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [23:0] rx,
  output logic        out_valid,
  output logic [23:0] corrected,      // w + u
  output logic [11:0] msg,            // corrected[23:12]
  output logic [23:0] err_pattern,    // u
  output logic        uncorrectable,
  output dec_path_e   path            // which test produced u
);

  // ---- stage 1: input register
  logic        v1_q;
  logic [23:0] w1_q;

  // ---- stage 2: syndrome
  logic        v2_q;
  logic [23:0] w2_q;
  logic [11:0] s_d, s2_q;

  // ---- stage 3: tests on s, second syndrome
  logic        v3_q;
  logic [23:0] w3_q;
  logic [11:0] s3_q, sb3_q;
  logic [3:0]  wt_s;
  logic        s_hit_d;
  logic [3:0]  s_idx_d;
  logic [11:0] s_sel_d;
  logic        s_le3_q, s_hit_q;
  logic [3:0]  s_idx_q;
  logic [11:0] s_sel_q;

  // ---- stage 4: tests on sB, correction
  logic [3:0]  wt_sb;
  logic        sb_hit;
  logic [3:0]  sb_idx;
  logic [11:0] sb_sel;
  logic [23:0] u;
  dec_path_e   path_d;

  golay_syndrome u_syn (.rx(w1_q), .s(s_d));

  weight_unit12 u_wt_s (.in(s2_q), .weight(wt_s));
  sel_unit u_sel_s (.v(s2_q), .found(s_hit_d), .idx(s_idx_d), .sel(s_sel_d));

  weight_unit12 u_wt_sb (.in(sb3_q), .weight(wt_sb));
  sel_unit u_sel_sb (.v(sb3_q), .found(sb_hit), .idx(sb_idx), .sel(sb_sel));

  // unit vector e_i, position i counted from bit 11
  function automatic logic [11:0] unit_vec(input logic [3:0] i);
    return (i < 4'd12) ? (12'h800 >> i) : 12'h000;
  endfunction

  always_comb begin
    if (s_le3_q) begin
      u = {s3_q, 12'h000};
      path_d = PATH_S;
    end else if (s_hit_q) begin
      u = {s_sel_q, unit_vec(s_idx_q)};
      path_d = PATH_S_BI;
    end else if (wt_sb <= 4'd3) begin
      u = {12'h000, sb3_q};
      path_d = PATH_SB;
    end else if (sb_hit) begin
      u = {unit_vec(sb_idx), sb_sel};
      path_d = PATH_SB_BI;
    end else begin
      u = '0;
      path_d = PATH_UNCORR;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q <= 1'b0; v2_q <= 1'b0; v3_q <= 1'b0; out_valid <= 1'b0;
      w1_q <= '0; w2_q <= '0; w3_q <= '0;
      s2_q <= '0; s3_q <= '0; sb3_q <= '0;
      s_le3_q <= 1'b0; s_hit_q <= 1'b0; s_idx_q <= '0; s_sel_q <= '0;
      corrected <= '0; msg <= '0; err_pattern <= '0;
      uncorrectable <= 1'b0; path <= PATH_S;
    end else begin
      v1_q <= in_valid;
      w1_q <= rx;

      v2_q <= v1_q;
      w2_q <= w1_q;
      s2_q <= s_d;

      v3_q    <= v2_q;
      w3_q    <= w2_q;
      s3_q    <= s2_q;
      sb3_q   <= mul_b(s2_q);
      s_le3_q <= (wt_s <= 4'd3);
      s_hit_q <= s_hit_d;
      s_idx_q <= s_idx_d;
      s_sel_q <= s_sel_d;

      out_valid     <= v3_q;
      corrected     <= w3_q ^ u;
      msg           <= w3_q[23:12] ^ u[23:12];
      err_pattern   <= u;
      uncorrectable <= (path_d == PATH_UNCORR);
      path          <= path_d;
    end
  end

endmodule

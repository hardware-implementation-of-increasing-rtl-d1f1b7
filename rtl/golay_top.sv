// golay_top: Golay codec, encoder chain and decoder side by side.
//
// Encoder chain: golay_encoder divides M(x) x^11 by G(x) and produces the
// (23,12,7) codeword in at most 12 clock cycles; g23_to_g24 appends the
// overall parity bit two cycles later, giving the (24,12,8) codeword.
// Decoder: golay24_decoder corrects up to three errors in a received
// (24,12,8) word, one word per clock with a four-cycle latency.
//
// The encoder produces the cyclic form of the code (generator polynomial
// plus parity) while the decoder works on the systematic form G = [I | B].
// The two forms are equivalent codes, each with minimum distance 8, but not
// the same set of words, so the encoder output is brought out rather than
// wired into the decoder; the decoder takes its input from its own port.
module golay_top
  import golay_pkg::*;
#(
  parameter logic [11:0] GPOLY = GEN_POLY
) (
  input  logic        clk,
  input  logic        rst_n,
  // encoder
  input  logic        enc_start,
  input  logic [11:0] enc_msg,
  output logic        enc_busy,
  output logic        enc_done,      // cw23 / check valid
  output logic [10:0] enc_check,
  output logic [22:0] enc_cw23,
  output logic        enc_cw24_valid,
  output logic [23:0] enc_cw24,
  // decoder
  input  logic        dec_in_valid,
  input  logic [23:0] dec_rx,
  output logic        dec_out_valid,
  output logic [23:0] dec_corrected,
  output logic [11:0] dec_msg,
  output logic [23:0] dec_err_pattern,
  output logic        dec_uncorrectable,
  output dec_path_e   dec_path
);

  golay_encoder #(.GPOLY(GPOLY)) u_enc (
    .clk   (clk),
    .rst_n (rst_n),
    .start (enc_start),
    .msg   (enc_msg),
    .busy  (enc_busy),
    .done  (enc_done),
    .check (enc_check),
    .cw23  (enc_cw23)
  );

  g23_to_g24 u_ext (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (enc_done),
    .cw23      (enc_cw23),
    .out_valid (enc_cw24_valid),
    .cw24      (enc_cw24)
  );

  golay24_decoder u_dec (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_valid      (dec_in_valid),
    .rx            (dec_rx),
    .out_valid     (dec_out_valid),
    .corrected     (dec_corrected),
    .msg           (dec_msg),
    .err_pattern   (dec_err_pattern),
    .uncorrectable (dec_uncorrectable),
    .path          (dec_path)
  );

endmodule

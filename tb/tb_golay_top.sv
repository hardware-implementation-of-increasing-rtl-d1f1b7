// tb_golay_top: end-to-end test of the codec at its default parameters.
//
// Encoder side: every one of the 4096 messages is encoded; the (23,12)
// codeword, its check bits and the (24,12) codeword with its parity bit are
// compared with a bit-serial long division, and the cycles from the start
// edge to the done pulse (at most 12) and to the extended codeword (two
// more) are checked. Decoder side, running at the same time: a stream of
// systematic codewords with 0 to 4 bit errors, one per clock with gaps,
// checked for correction or for the uncorrectable flag and a latency of
// four cycles. Each mechanism is counted and must occur at least once:
// early finish of the division, the full 12-cycle division, a start request
// ignored while busy, both parity values, and the five decoding paths.
module tb_golay_top;
  import golay_pkg::*;
  import golay_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic        enc_start;
  logic [11:0] enc_msg;
  logic        enc_busy, enc_done, enc_cw24_valid;
  logic [10:0] enc_check;
  logic [22:0] enc_cw23;
  logic [23:0] enc_cw24;
  logic        dec_in_valid, dec_out_valid, dec_uncorrectable;
  logic [23:0] dec_rx, dec_corrected, dec_err_pattern;
  logic [11:0] dec_msg;
  dec_path_e   dec_path;

  int checks = 0, failures = 0, cyc = 0;
  int n_early = 0, n_full = 0, n_ignored = 0, n_par0 = 0, n_par1 = 0;
  int path_cnt[5];
  bit enc_finished = 0, dec_finished = 0;

  typedef struct {
    logic [23:0] cw;
    logic [23:0] e;
    int          t;
  } item_t;
  item_t q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  golay_top dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- encoder
  initial begin
    enc_start = 1'b0;
    enc_msg = '0;
    wait (rst_n);
    @(posedge clk);
    for (int m = 0; m < 4096; m++) begin
      logic [11:0] mv;
      logic [10:0] rem;
      int lat, lat24;
      mv = 12'(m);
      rem = ref_rem(mv, GEN_POLY);
      enc_msg   <= mv;
      enc_start <= 1'b1;
      lat = 0;
      lat24 = 0;
      for (int e = 1; e <= 16 && lat24 == 0; e++) begin
        @(posedge clk);
        if (e == 1) begin
          enc_msg <= 12'($urandom);   // held high while busy: must be ignored
          n_ignored++;
        end
        if (e == 2) enc_start <= 1'b0;
        #1;
        if (enc_done) begin
          lat = e;
          chk(enc_cw23 == {mv, rem} && enc_check == rem, "G23 codeword");
        end
        if (enc_cw24_valid) begin
          lat24 = e;
          chk(enc_cw24 == {mv, rem, ^{mv, rem}}, "G24 codeword");
          chk(ref_weight(enc_cw24) % 2 == 0, "G24 weight even");
          if (enc_cw24[0]) n_par1++; else n_par0++;
        end
      end
      chk(lat >= 1 && lat <= 12, "encoder latency");
      chk(lat24 == lat + 2, "extension latency");
      if (lat == 12) n_full++; else n_early++;
    end
    enc_finished = 1;
  end

  // ---------------- decoder
  always @(posedge clk) begin
    if (rst_n && dec_out_valid) begin
      item_t it;
      bit ok;
      if (q.size() == 0) begin
        chk(0, "decoder output without input");
      end else begin
        it = q.pop_front();
        if (ref_weight(it.e) <= 3)
          ok = !dec_uncorrectable && dec_corrected == it.cw && dec_msg == it.cw[23:12] &&
               dec_err_pattern == it.e;
        else
          ok = dec_uncorrectable && dec_corrected == (it.cw ^ it.e);
        chk(ok && (cyc - it.t == 4), "decoder result");
        path_cnt[int'(dec_path)]++;
      end
    end
  end

  initial begin
    dec_in_valid = 1'b0;
    dec_rx = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 20000; k++) begin
      item_t it;
      @(negedge clk);
      dec_in_valid = ($urandom_range(4, 0) != 0);
      it.cw = ref_cw24_sys(12'($urandom));
      it.e  = rand_err(int'($urandom_range(4, 0)));
      it.t  = cyc;
      dec_rx = it.cw ^ it.e;
      if (dec_in_valid) q.push_back(it);
    end
    @(negedge clk);
    dec_in_valid = 1'b0;
    repeat (8) @(posedge clk);
    chk(q.size() == 0, "decoder outputs missing");
    dec_finished = 1;
  end

  initial begin
    wait (enc_finished && dec_finished);
    $display("encoder: early=%0d full12=%0d ignored_start=%0d parity0=%0d parity1=%0d",
             n_early, n_full, n_ignored, n_par0, n_par1);
    $display("decoder paths: s=%0d s+b=%0d sB=%0d sB+b=%0d uncorrectable=%0d",
             path_cnt[0], path_cnt[1], path_cnt[2], path_cnt[3], path_cnt[4]);
    chk(n_early > 0, "early finish never seen");
    chk(n_full > 0, "12-cycle division never seen");
    chk(n_ignored > 0, "ignored start never seen");
    chk(n_par0 > 0 && n_par1 > 0, "a parity value never seen");
    for (int p = 0; p < 5; p++) chk(path_cnt[p] > 0, "a decoding path never taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_golay24_decoder: a stream of systematic codewords (m, mB) with 0 to 4
// random bit errors, one word per clock with random gaps. Up to three
// errors must be corrected (corrected word, message and error pattern);
// four errors must be flagged uncorrectable (every codeword is then at
// distance four or more). The output must follow the input by exactly four
// clock edges, and every decoding path must be taken at least once.
module tb_golay24_decoder;
  import golay_pkg::*;
  import golay_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic [23:0] rx;
  logic out_valid, uncorrectable;
  logic [23:0] corrected, err_pattern;
  logic [11:0] msg;
  dec_path_e path;
  int checks = 0, failures = 0;
  int path_cnt[5];
  int cyc = 0;

  typedef struct {
    logic [23:0] cw;
    logic [23:0] e;
    int          t;
  } item_t;
  item_t q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  golay24_decoder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .rx(rx),
    .out_valid(out_valid), .corrected(corrected), .msg(msg),
    .err_pattern(err_pattern), .uncorrectable(uncorrectable), .path(path));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      bit ok;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        it = q.pop_front();
        if (ref_weight(it.e) <= 3)
          ok = !uncorrectable && corrected == it.cw && msg == it.cw[23:12] && err_pattern == it.e;
        else
          ok = uncorrectable && corrected == (it.cw ^ it.e);
        ok = ok && (cyc - it.t == 4);
        if (!ok) begin
          failures++;
          if (failures < 10)
            $display("FAIL cw=%h e=%h corr=%h u=%h unc=%b lat=%0d", it.cw, it.e, corrected,
                     err_pattern, uncorrectable, cyc - it.t);
        end
        path_cnt[int'(path)]++;
      end
    end
  end

  initial begin
    in_valid = 1'b0;
    rx = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 20000; k++) begin
      item_t it;
      @(negedge clk);
      in_valid = ($urandom_range(4, 0) != 0);
      it.cw = ref_cw24_sys(12'($urandom));
      it.e  = rand_err(int'($urandom_range(4, 0)));
      it.t  = cyc;
      rx = it.cw ^ it.e;
      if (in_valid) q.push_back(it);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (8) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    for (int p = 0; p < 5; p++) begin
      checks++;
      $display("path %0d taken %0d times", p, path_cnt[p]);
      if (path_cnt[p] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

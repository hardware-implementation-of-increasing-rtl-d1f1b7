// tb_golay_encoder: all 4096 messages through two encoders, one per
// generator polynomial, compared with bit-serial long division. The number
// of clock edges from the start edge to the done pulse (start edge counted
// as the first) must never exceed 12 and must reach 12 for some message.
// Also checks that start is ignored while busy.
module tb_golay_encoder;
  import golay_pkg::*;
  import golay_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [11:0] msg;
  logic busy_a, done_a, busy_b, done_b;
  logic [10:0] check_a, check_b;
  logic [22:0] cw_a, cw_b;
  int checks = 0, failures = 0;
  int max_lat = 0, min_lat = 100;

  always #5 clk = ~clk;

  golay_encoder dut_a (
    .clk(clk), .rst_n(rst_n), .start(start), .msg(msg),
    .busy(busy_a), .done(done_a), .check(check_a), .cw23(cw_a));

  golay_encoder #(.GPOLY(GEN_POLY_ALT)) dut_b (
    .clk(clk), .rst_n(rst_n), .start(start), .msg(msg),
    .busy(busy_b), .done(done_b), .check(check_b), .cw23(cw_b));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s msg=%h", what, msg);
    end
  endtask

  initial begin
    start = 1'b0;
    msg = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int m = 0; m < 4096; m++) begin
      int lat_a, lat_b;
      logic [11:0] m_v;
      m_v = 12'(m);
      msg   <= m_v;
      start <= 1'b1;
      lat_a = 0;
      lat_b = 0;
      for (int e = 1; e <= 14; e++) begin
        @(posedge clk);
        if (e == 1) msg <= ~m_v;   // second start edge: must be ignored (busy)
        if (e == 2) start <= 1'b0;
        #1;
        if (done_a) lat_a = e;
        if (done_b) lat_b = e;
      end
      chk(lat_a != 0 && lat_b != 0, "no done");
      chk(check_a == ref_rem(m_v, GEN_POLY), "check bits (G1)");
      chk(cw_a == {m_v, ref_rem(m_v, GEN_POLY)}, "codeword (G1)");
      chk(check_b == ref_rem(m_v, GEN_POLY_ALT), "check bits (G2)");
      chk(cw_b == {m_v, ref_rem(m_v, GEN_POLY_ALT)}, "codeword (G2)");
      chk(lat_a <= 12 && lat_b <= 12, "latency above 12");
      chk(!busy_a && !busy_b, "busy after done");
      if (lat_a > max_lat) max_lat = lat_a;
      if (lat_b > max_lat) max_lat = lat_b;
      if (lat_a < min_lat) min_lat = lat_a;
      if (lat_b < min_lat) min_lat = lat_b;
    end
    chk(max_lat == 12, "maximum latency not reached");
    $display("latency min=%0d max=%0d", min_lat, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

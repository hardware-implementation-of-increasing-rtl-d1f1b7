// tb_g23_to_g24: random (23,12) words, fed back to back and with gaps; the
// output must be {cw23, parity} with an even total weight, exactly two
// clock edges after the input edge. Both parity values must occur.
module tb_g23_to_g24;
  import golay_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic [22:0] cw23;
  logic out_valid;
  logic [23:0] cw24;
  int checks = 0, failures = 0, n_par0 = 0, n_par1 = 0;
  logic [22:0] sent[$];
  int sent_t[$];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  g23_to_g24 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .cw23(cw23),
                  .out_valid(out_valid), .cw24(cw24));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [22:0] exp_w;
      int t;
      checks++;
      if (sent.size() == 0) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        exp_w = sent.pop_front();
        t = sent_t.pop_front();
        if (cw24 !== {exp_w, ^exp_w} || (ref_weight(cw24) % 2) != 0 || cyc - t != 2) begin
          failures++;
          if (failures < 10) $display("FAIL cw24=%h exp=%h lat=%0d", cw24, {exp_w, ^exp_w}, cyc - t);
        end
        if (cw24[0]) n_par1++; else n_par0++;
      end
    end
  end

  initial begin
    in_valid = 1'b0;
    cw23 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3, 0) != 0);
      cw23 = 23'($urandom);
      if (in_valid) begin
        sent.push_back(cw23);
        sent_t.push_back(cyc);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (sent.size() != 0 || n_par0 == 0 || n_par1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

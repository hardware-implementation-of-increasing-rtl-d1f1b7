// tb_circ_shift23: random words rotated by every amount 0..15, compared
// with a rotation built bit by bit.
module tb_circ_shift23;
  logic [22:0] in, out, exp_v;
  logic [3:0]  amt;
  int checks = 0, failures = 0;

  circ_shift23 dut (.in(in), .amt(amt), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      in = 23'($urandom);
      for (int a = 0; a < 16; a++) begin
        amt = 4'(a);
        for (int b = 0; b < 23; b++) exp_v[(b + a) % 23] = in[b];
        #1;
        checks++;
        if (out !== exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL in=%h amt=%0d out=%h exp=%h", in, a, out, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_golay_syndrome: the syndrome of every codeword (m, mB) must be zero,
// and for a word with errors (e1, e2) it must equal e1 + e2*B.
module tb_golay_syndrome;
  import golay_ref_pkg::*;
  logic [23:0] rx, cw, e;
  logic [11:0] s;
  int checks = 0, failures = 0;

  golay_syndrome dut (.rx(rx), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4096; m++) begin
      cw = ref_cw24_sys(12'(m));
      rx = cw;
      #1;
      checks++;
      if (s !== 12'h000) begin
        failures++;
        if (failures < 10) $display("FAIL codeword %h syndrome %h", cw, s);
      end
      e = rand_err(int'($urandom_range(4, 1)));
      rx = cw ^ e;
      #1;
      checks++;
      if (s !== (e[23:12] ^ ref_mul_b(e[11:0]))) begin
        failures++;
        if (failures < 10) $display("FAIL rx %h syndrome %h", rx, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

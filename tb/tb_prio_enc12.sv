// tb_prio_enc12: exhaustive check of the 12-input priority encoder against
// a count of leading zeros (12 for an all-zero input).
module tb_prio_enc12;
  logic [11:0] in;
  logic [3:0]  idx;
  int checks = 0, failures = 0;

  prio_enc12 dut (.in(in), .idx(idx));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      int lz;
      in = 12'(v);
      lz = 0;
      while (lz < 12 && !in[11-lz]) lz++;
      #1;
      checks++;
      if (int'(idx) != lz) begin
        failures++;
        if (failures < 10) $display("FAIL in=%b idx=%0d exp=%0d", in, idx, lz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

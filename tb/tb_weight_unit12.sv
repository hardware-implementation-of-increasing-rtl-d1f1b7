// tb_weight_unit12: exhaustive check of the 12-bit weight measurement unit
// against a plain count of ones.
module tb_weight_unit12;
  import golay_ref_pkg::*;
  logic [11:0] in;
  logic [3:0]  weight;
  int checks = 0, failures = 0;

  weight_unit12 dut (.in(in), .weight(weight));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      in = 12'(v);
      #1;
      checks++;
      if (int'(weight) != ref_weight({12'b0, in})) begin
        failures++;
        if (failures < 10) $display("FAIL in=%b weight=%0d", in, weight);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

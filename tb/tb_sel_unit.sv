// tb_sel_unit: vectors v built as b_i plus up to three random bit flips,
// and fully random vectors; the expected row is the first i (first row of
// B first) with weight(v + b_i) <= 2, or none.
module tb_sel_unit;
  import golay_ref_pkg::*;
  logic [11:0] v, sel;
  logic        found;
  logic [3:0]  idx;
  logic [23:0] flips;
  int checks = 0, failures = 0, n_found = 0, n_none = 0;

  sel_unit dut (.v(v), .found(found), .idx(idx), .sel(sel));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 6000; t++) begin
      int exp_i;
      logic [11:0] exp_sel;
      flips = rand_err(int'($urandom_range(3, 0)));
      if (t % 2 == 0) v = golay_pkg::B_ROWS[$urandom_range(11, 0)] ^ flips[23:12];
      else v = 12'($urandom);
      exp_i = 12;
      exp_sel = '0;
      for (int i = 11; i >= 0; i--) begin
        if (ref_weight({12'b0, v ^ golay_pkg::B_ROWS[i]}) <= 2) begin
          exp_i = i;
          exp_sel = v ^ golay_pkg::B_ROWS[i];
        end
      end
      #1;
      checks++;
      if (int'(idx) != exp_i || found != (exp_i != 12) || sel !== exp_sel) begin
        failures++;
        if (failures < 10) $display("FAIL v=%b idx=%0d exp=%0d sel=%b", v, idx, exp_i, sel);
      end
      if (exp_i != 12) n_found++; else n_none++;
    end
    checks++;
    if (n_found == 0 || n_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

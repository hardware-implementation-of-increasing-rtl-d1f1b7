// golay_ref_pkg: reference models used by the testbenches. They compute
// the expected values in a different way from the RTL (bit-serial long
// division, column-by-column matrix products, plain bit counting), so a
// testbench compares the design against an independent calculation.
package golay_ref_pkg;

  // Remainder of m(x) * x^11 divided by g(x), one bit per step.
  function automatic logic [10:0] ref_rem(input logic [11:0] m, input logic [11:0] g);
    logic [22:0] p;
    p = {m, 11'b0};
    for (int i = 22; i >= 11; i--) begin
      if (p[i]) p[i -: 12] = p[i -: 12] ^ g;
    end
    return p[10:0];
  endfunction

  function automatic int ref_weight(input logic [23:0] v);
    int n;
    n = 0;
    for (int i = 0; i < 24; i++) n += int'(v[i]);
    return n;
  endfunction

  // v * B computed per output column j: XOR over rows i of v_i & B[i][j].
  // Element 0 (first row / first column) is bit 11.
  function automatic logic [11:0] ref_mul_b(input logic [11:0] v);
    logic [11:0] r;
    logic [11:0] row;
    for (int j = 0; j < 12; j++) begin
      logic acc;
      acc = 1'b0;
      for (int i = 0; i < 12; i++) begin
        row = golay_pkg::B_ROWS[i];
        acc ^= v[11-i] & row[11-j];
      end
      r[11-j] = acc;
    end
    return r;
  endfunction

  // Systematic extended Golay codeword (m, m*B).
  function automatic logic [23:0] ref_cw24_sys(input logic [11:0] m);
    return {m, ref_mul_b(m)};
  endfunction

  // Random 24-bit pattern of exactly n ones.
  function automatic logic [23:0] rand_err(input int n);
    logic [23:0] e;
    int k;
    e = '0;
    k = 0;
    while (k < n) begin
      int p;
      p = int'($urandom_range(23, 0));
      if (!e[p]) begin
        e[p] = 1'b1;
        k++;
      end
    end
    return e;
  endfunction

endpackage

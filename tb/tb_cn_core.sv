// tb_cn_core: exhaustive test of the check node core over all 2^18 input triples.
// Expected value from the sum-product check rule in floating point, quantised the same way
// as the hardware: phi(x) = -ln(tanh(x/2)) with 2 fractional bits, rounded, clamped to 31,
// phi(0) = 31; magnitude = phi(sum of the three phi values); sign = XOR of the input signs.
module tb_cn_core;
  int checks = 0, failures = 0;
  logic signed [5:0] m0, m1, m2, e;

  cn_core dut (.m_in({m2, m1, m0}), .e_out(e));

  function automatic int phi(int m);
    real x, y;
    if (m == 0) return 31;
    x = m / 4.0;
    y = -$ln($tanh(x / 2.0)) * 4.0;
    if (y >= 31.0) return 31;
    return int'($floor(y + 0.5));
  endfunction

  int ptab [128];

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) ptab[i] = phi(i);
    for (int a = -32; a < 32; a++)
      for (int b = -32; b < 32; b++)
        for (int c = -32; c < 32; c++) begin
          int s, mag, ex;
          bit neg;
          m0 = 6'(a); m1 = 6'(b); m2 = 6'(c);
          #1;
          s = ptab[(a < 0) ? ((-a > 31) ? 31 : -a) : a]
            + ptab[(b < 0) ? ((-b > 31) ? 31 : -b) : b]
            + ptab[(c < 0) ? ((-c > 31) ? 31 : -c) : c];
          mag = ptab[s];
          neg = (a < 0) ^ (b < 0) ^ (c < 0);
          ex = neg ? -mag : mag;
          checks++;
          if (int'(e) != ex) begin
            failures++;
            if (failures < 10) $display("FAIL %0d %0d %0d -> %0d exp %0d", a, b, c, e, ex);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

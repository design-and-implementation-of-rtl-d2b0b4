// tb_cnu: runs a check node processor through several iterations of random variable node
// totals over the three bands and checks e_out after every compute step against a model
// that keeps its own copy of the previous messages: M = sat(L - E_old), E = sign * phi(sum
// of phi(|M|) over the other three inputs). Also checks that clr empties the local RAM and
// that e_out holds between compute steps.
module tb_cnu;
  int checks = 0, failures = 0;
  logic clk = 1'b0, clr, sub_en, cn_en;
  logic [1:0] band;
  logic signed [5:0] l_in [4];
  logic [3:0][5:0] l_pk, e_pk;

  assign l_pk = {l_in[3], l_in[2], l_in[1], l_in[0]};

  cnu dut (.clk(clk), .clr(clr), .sub_en(sub_en), .cn_en(cn_en), .band(band),
           .l_in(l_pk), .e_out(e_pk));

  always #5 clk = ~clk;

  function automatic int sat(int x);
    return (x > 31) ? 31 : (x < -31) ? -31 : x;
  endfunction
  function automatic int phi(int m);
    real x, y;
    if (m == 0) return 31;
    x = m / 4.0;
    y = -$ln($tanh(x / 2.0)) * 4.0;
    if (y >= 31.0) return 31;
    return int'($floor(y + 0.5));
  endfunction

  int eold [3][4];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; sub_en = 1'b0; cn_en = 1'b0; band = '0;
    foreach (l_in[p]) l_in[p] = '0;
    for (int g = 0; g < 3; g++) for (int p = 0; p < 4; p++) eold[g][p] = 0;
    @(negedge clk);
    clr = 1'b0;
    for (int run = 0; run < 3; run++) begin
      for (int it = 0; it < 12; it++) begin
        for (int g = 0; g < 3; g++) begin
          int m [4];
          int ex [4];
          band = 2'(g);
          for (int p = 0; p < 4; p++) l_in[p] = 6'($urandom_range(62) - 31);
          for (int p = 0; p < 4; p++) m[p] = sat(int'(l_in[p]) - eold[g][p]);
          sub_en = 1'b1;
          @(negedge clk);
          sub_en = 1'b0;
          foreach (l_in[p]) l_in[p] = 6'($urandom);   // inputs no longer matter
          for (int p = 0; p < 4; p++) begin
            int s;
            bit neg;
            s = 0; neg = 0;
            for (int k = 0; k < 4; k++) if (k != p) begin
              s += phi((m[k] < 0) ? -m[k] : m[k]);
              neg ^= (m[k] < 0);
            end
            ex[p] = neg ? -phi(s) : phi(s);
          end
          cn_en = 1'b1;
          @(negedge clk);
          cn_en = 1'b0;
          repeat ($urandom_range(2)) @(negedge clk);
          for (int p = 0; p < 4; p++) begin
            logic signed [5:0] got;
            got = e_pk[p];
            checks++;
            if (int'(got) != ex[p]) begin
              failures++;
              if (failures < 10) $display("FAIL it %0d band %0d p %0d: %0d exp %0d", it, g, p,
                                          got, ex[p]);
            end
            eold[g][p] = ex[p];
          end
        end
      end
      // clear: previous messages forgotten
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      for (int g = 0; g < 3; g++) for (int p = 0; p < 4; p++) eold[g][p] = 0;
      checks++;
      if (e_pk != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_syndrome_chk: checks every syndrome bit against parity sums computed from the check
// list (1-based bit indices of each check) for all 2^20 words, and that `ok` flags exactly
// the words whose syndrome is zero; at least one codeword besides 0 must be seen.
module tb_syndrome_chk;
  int checks = 0, failures = 0;
  int ncw = 0;

  logic [19:0] bits;
  logic [14:0] syn;
  logic        ok;

  syndrome_chk dut (.bits(bits), .syndrome(syn), .ok(ok));

  int chk [15][4] = '{
    '{1,2,3,4}, '{5,6,7,8}, '{9,10,11,12}, '{13,14,15,16}, '{17,18,19,20},
    '{1,5,9,13}, '{2,6,10,17}, '{3,7,14,18}, '{4,11,15,19}, '{8,12,16,20},
    '{1,6,12,18}, '{2,7,11,16}, '{3,8,13,19}, '{4,9,14,17}, '{5,10,15,20}
  };

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < (1 << 20); w++) begin
      logic [14:0] exp_s;
      bits = 20'(w);
      #1;
      for (int j = 0; j < 15; j++) begin
        exp_s[j] = 1'b0;
        for (int p = 0; p < 4; p++) exp_s[j] ^= bits[chk[j][p]-1];
      end
      checks++;
      if (syn !== exp_s || ok !== (exp_s == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL w=%05h syn=%04h exp=%04h ok=%0d", w, syn, exp_s, ok);
      end
      if (exp_s == 0) ncw++;
    end
    checks++;
    if (ncw < 2) failures++;
    $display("codewords seen: %0d", ncw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ldpc_decoder: end-to-end test of the LDPC decoder at its default parameters.
//
// The testbench builds its own model of the code and of the algorithm, independent of the
// RTL: the 15 checks are listed as column indices, the codebook is found by testing all
// 2^20 words, and a behavioural flooding decoder (same word lengths, saturation and phi
// quantisation, plain integer arithmetic, no permutation network) gives the expected output.
// Checks:
//  * every received word: message_o and codeword_ok_o equal the model's, valid_o rises
//    exactly 112 cycles after the start edge;
//  * all 128 codewords come back unchanged without errors, and every single-bit error on
//    every codeword is corrected;
//  * a start pulse while busy is ignored, a reset in the middle of a decode recovers;
//  * mechanisms counted, each must occur: VN-bank and CN-bank clock gated off, all three
//    bands processed, a decode that ends on a non-codeword, an ignored start, a mid-run reset.
module tb_ldpc_decoder;
  localparam int NV = 20;
  localparam int NC = 15;
  localparam int ITERS = 10;
  localparam int LAT = 2 + 11 * ITERS;
  localparam int MAXM = 31;
  localparam int CHL = 8;

  logic clk = 1'b0;
  logic rst, start;
  logic [NV-1:0] msg_i, msg_o;
  logic valid, ok;

  int checks = 0, failures = 0;
  longint cyc = 0;

  ldpc_decoder dut (
    .clock_c(clk), .rst(rst), .start_i(start), .message_i(msg_i),
    .message_o(msg_o), .valid_o(valid), .codeword_ok_o(ok)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    #(5_000_000 * 10);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model of the code
  // 1-based column indices of each check (three bands of five checks)
  int chk [NC][4] = '{
    '{1,2,3,4}, '{5,6,7,8}, '{9,10,11,12}, '{13,14,15,16}, '{17,18,19,20},
    '{1,5,9,13}, '{2,6,10,17}, '{3,7,14,18}, '{4,11,15,19}, '{8,12,16,20},
    '{1,6,12,18}, '{2,7,11,16}, '{3,8,13,19}, '{4,9,14,17}, '{5,10,15,20}
  };

  function automatic bit is_codeword(logic [NV-1:0] w);
    for (int j = 0; j < NC; j++) begin
      bit s = 0;
      for (int p = 0; p < 4; p++) s ^= w[chk[j][p]-1];
      if (s) return 0;
    end
    return 1;
  endfunction

  function automatic int sat(int x);
    return (x > MAXM) ? MAXM : (x < -MAXM) ? -MAXM : x;
  endfunction

  function automatic int phi(int m);
    real x, y;
    if (m == 0) return MAXM;
    x = m / 4.0;
    y = -$ln($tanh(x / 2.0)) * 4.0;
    if (y >= MAXM) return MAXM;
    return int'($floor(y + 0.5));
  endfunction

  task automatic ref_decode(input logic [NV-1:0] rx, output logic [NV-1:0] dec, output bit cw);
    int r [NV];
    int L [NV];
    int E [NC][4];
    int M [4];
    for (int v = 0; v < NV; v++) begin
      r[v] = rx[v] ? -CHL : CHL;
      L[v] = r[v];
    end
    for (int j = 0; j < NC; j++) for (int p = 0; p < 4; p++) E[j][p] = 0;
    for (int it = 0; it < ITERS; it++) begin
      for (int j = 0; j < NC; j++) begin
        int en [4];
        for (int p = 0; p < 4; p++) M[p] = sat(L[chk[j][p]-1] - E[j][p]);
        for (int p = 0; p < 4; p++) begin
          int s = 0;
          bit neg = 0;
          for (int k = 0; k < 4; k++) if (k != p) begin
            int a = (M[k] < 0) ? -M[k] : M[k];
            s += phi(a);
            neg ^= (M[k] < 0);
          end
          en[p] = neg ? -phi(s) : phi(s);
        end
        for (int p = 0; p < 4; p++) E[j][p] = en[p];
      end
      for (int v = 0; v < NV; v++) L[v] = r[v];
      for (int j = 0; j < NC; j++) for (int p = 0; p < 4; p++)
        L[chk[j][p]-1] += E[j][p];
      for (int v = 0; v < NV; v++) L[v] = sat(L[v]);
    end
    for (int v = 0; v < NV; v++) dec[v] = (L[v] < 0);
    cw = is_codeword(dec);
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_vn_gated = 0, n_cn_gated = 0, n_noncw = 0, n_ign_start = 0, n_midrst = 0;
  int n_band [3] = '{0, 0, 0};
  always @(posedge clk) begin
    if (!dut.vn_clk && dut.busy) n_vn_gated++;
    if (!dut.cn_clk && dut.busy) n_cn_gated++;
    if (dut.sub_en) n_band[dut.band]++;
  end

  // ---------------------------------------------------------------- stimulus
  logic [NV-1:0] codebook [$];

  task automatic decode(input logic [NV-1:0] rx, input bit expect_exact, input logic [NV-1:0] want);
    logic [NV-1:0] rdec;
    bit rcw;
    longint t0;
    int wait_cyc;
    ref_decode(rx, rdec, rcw);
    @(negedge clk);
    msg_i = rx;
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    wait_cyc = 0;
    while (!valid && wait_cyc < 1000) begin
      @(negedge clk);
      wait_cyc++;
    end
    checks++;
    if (cyc - t0 != longint'(LAT)) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc - t0, LAT);
    end
    checks++;
    if (msg_o !== rdec || ok !== rcw) begin
      failures++;
      $display("FAIL rx=%05h out=%05h ok=%0d model=%05h ok=%0d", rx, msg_o, ok, rdec, rcw);
    end
    if (expect_exact) begin
      checks++;
      if (msg_o !== want || ok !== 1'b1) begin
        failures++;
        $display("FAIL not corrected rx=%05h out=%05h want=%05h", rx, msg_o, want);
      end
    end
    if (!ok) n_noncw++;
  endtask

  initial begin
    rst = 1'b1;
    start = 1'b0;
    msg_i = '0;
    for (logic [NV:0] w = 0; w < (1 << NV); w++)
      if (is_codeword(w[NV-1:0])) codebook.push_back(w[NV-1:0]);
    $display("codebook: %0d codewords", codebook.size());
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // every codeword, error free and with every single-bit error
    for (int c = 0; c < codebook.size(); c++) begin
      logic [NV-1:0] cw;
      cw = codebook[c];
      decode(cw, 1'b1, cw);
      for (int b = 0; b < NV; b++) decode(cw ^ (NV'(1) << b), 1'b1, cw);
    end

    // random words with two to five errors: compare with the model
    for (int n = 0; n < 150; n++) begin
      logic [NV-1:0] cw, e;
      int ne;
      cw = codebook[$urandom_range(codebook.size() - 1)];
      ne = 2 + (n % 4);
      e = '0;
      while ($countones(e) < ne) e[$urandom_range(NV - 1)] = 1'b1;
      decode(cw ^ e, 1'b0, cw);
    end

    // start while busy is ignored
    begin
      logic [NV-1:0] cw, rdec;
      bit rcw;
      longint t0;
      cw = codebook[3 % codebook.size()];
      ref_decode(cw ^ 20'h00010, rdec, rcw);
      @(negedge clk);
      msg_i = cw ^ 20'h00010;
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      repeat (30) @(negedge clk);
      msg_i = 20'hABCDE;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!valid) @(negedge clk);
      checks++;
      if (cyc - t0 != longint'(LAT) || msg_o !== rdec) begin
        failures++;
        $display("FAIL start while busy was not ignored");
      end else n_ign_start++;
    end

    // reset in the middle of a decode, then a clean decode
    @(negedge clk);
    msg_i = 20'h12345;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (40) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    checks++;
    if (valid !== 1'b0 || dut.busy !== 1'b0) begin
      failures++;
      $display("FAIL reset did not return to idle");
    end else n_midrst++;
    decode(codebook[1] ^ 20'h80000, 1'b1, codebook[1]);

    // every mechanism must have happened
    checks++; if (n_vn_gated == 0) begin failures++; $display("FAIL VN clock never gated"); end
    checks++; if (n_cn_gated == 0) begin failures++; $display("FAIL CN clock never gated"); end
    for (int g = 0; g < 3; g++) begin
      checks++; if (n_band[g] == 0) begin failures++; $display("FAIL band %0d never used", g); end
    end
    checks++; if (n_noncw == 0) begin failures++; $display("FAIL no non-codeword result seen"); end
    checks++; if (n_ign_start == 0) begin failures++; $display("FAIL ignored start not seen"); end
    checks++; if (n_midrst == 0) begin failures++; $display("FAIL mid-run reset not seen"); end
    $display("mechanisms: vn_gated=%0d cn_gated=%0d bands=%0d/%0d/%0d noncodeword=%0d ignored_start=%0d midrun_reset=%0d",
             n_vn_gated, n_cn_gated, n_band[0], n_band[1], n_band[2], n_noncw, n_ign_start, n_midrst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

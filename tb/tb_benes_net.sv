// tb_benes_net: the 32-port Benes network must realise any permutation. For the identity,
// the reversal, all 32 rotations and 3000 random permutations, the switch settings from the
// looping-algorithm router are applied and every output is checked to carry the value of
// the input mapped to it (inputs carry distinct values: their own index plus a random tag).
module tb_benes_net;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  bctl_t ctl;
  logic [BENES_N-1:0][MSG_W-1:0] din, dout;

  benes_net #(.N(BENES_N), .W(MSG_W)) dut (.ctl(ctl), .din(din), .dout(dout));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_perm(perm_t perm);
    ctl = benes_route(perm);
    for (int i = 0; i < BENES_N; i++) din[i] = MSG_W'(i);
    #1;
    for (int i = 0; i < BENES_N; i++) begin
      checks++;
      if (dout[perm[i]] !== MSG_W'(i)) begin
        failures++;
        if (failures < 10) $display("FAIL input %0d should reach %0d", i, perm[i]);
      end
    end
  endtask

  initial begin
    perm_t perm;
    for (int i = 0; i < BENES_N; i++) perm[i] = BENES_LG'(i);
    try_perm(perm);
    for (int i = 0; i < BENES_N; i++) perm[i] = BENES_LG'(BENES_N - 1 - i);
    try_perm(perm);
    for (int r = 0; r < BENES_N; r++) begin
      for (int i = 0; i < BENES_N; i++) perm[i] = BENES_LG'(i + r);
      try_perm(perm);
    end
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < BENES_N; i++) perm[i] = BENES_LG'(i);
      for (int i = BENES_N - 1; i > 0; i--) begin   // Fisher-Yates shuffle
        int j;
        logic [BENES_LG-1:0] t;
        j = $urandom_range(i);
        t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      try_perm(perm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

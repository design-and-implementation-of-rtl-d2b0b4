// tb_msg_perm_net: fills all 60 edge registers with random values and checks, for each
// band, that CNU k input p receives edge register `band` of the p-th bit of check
// band*5+k (checks listed here by their 1-based bit indices), and that the return path
// delivers CNU k output p to that same bit. Return and forward bands are set independently.
module tb_msg_perm_net;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic [1:0] band, ret_band;
  msg_t [N_VAR-1:0][WC-1:0] vn_edge;
  msg_t [N_CNU-1:0][WR-1:0] cn_in, cn_out;
  msg_t [N_VAR-1:0]         vn_ret;

  msg_perm_net dut (.band(band), .vn_edge(vn_edge), .cn_in(cn_in), .ret_band(ret_band),
                    .cn_out(cn_out), .vn_ret(vn_ret));

  int chk [15][4] = '{
    '{1,2,3,4}, '{5,6,7,8}, '{9,10,11,12}, '{13,14,15,16}, '{17,18,19,20},
    '{1,5,9,13}, '{2,6,10,17}, '{3,7,14,18}, '{4,11,15,19}, '{8,12,16,20},
    '{1,6,12,18}, '{2,7,11,16}, '{3,8,13,19}, '{4,9,14,17}, '{5,10,15,20}
  };

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int v = 0; v < N_VAR; v++) for (int g = 0; g < WC; g++) vn_edge[v][g] = msg_t'($urandom);
      for (int k = 0; k < N_CNU; k++) for (int p = 0; p < WR; p++) cn_out[k][p] = msg_t'($urandom);
      band = 2'($urandom_range(2));
      ret_band = 2'($urandom_range(2));
      #1;
      for (int k = 0; k < N_CNU; k++)
        for (int p = 0; p < WR; p++) begin
          int v;
          v = chk[band * 5 + k][p] - 1;
          checks++;
          if (cn_in[k][p] !== vn_edge[v][band]) begin
            failures++;
            if (failures < 10) $display("FAIL fwd band %0d cnu %0d in %0d", band, k, p);
          end
          v = chk[ret_band * 5 + k][p] - 1;
          checks++;
          if (vn_ret[v] !== cn_out[k][p]) begin
            failures++;
            if (failures < 10) $display("FAIL ret band %0d cnu %0d out %0d", ret_band, k, p);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

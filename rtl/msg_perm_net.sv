// msg_perm_net: message permutation network between the variable node edge registers and
// the check node processors, in both directions.
//
// Forward path (VN -> CN): for every variable node a 3:1 multiplexer picks the edge register
// of the current band `band`; the 20 picked values enter ports 0..19 of a 32-port Benes
// network (ports 20..31 are tied to 0) whose switches are set, per band, so that output
// k*WR+p carries the p-th bit of check band*N_CNU+k, i.e. input p of CNU k.
// Return path (CN -> VN): a second Benes network, set to the inverse permutation of the band
// selected by `ret_band`, brings CNU k's output p back to port v of the variable node it
// belongs to. Every variable node appears exactly once per band, so both directions are
// permutations and never collide.
// Switch settings are constants computed at elaboration (ldpc_pkg::benes_route). The
// network is purely combinational; `band` and `ret_band` are separate so the return of one
// band may overlap the read of another.
// Multiplexers in front of a Benes network follow the published design; the band-wise settings and
// the separate return network are this design's reading of its bidirectional ports.
module msg_perm_net
  import ldpc_pkg::*;
(
  input  logic [1:0]             band,
  input  msg_t [N_VAR-1:0][WC-1:0] vn_edge,   // all edge registers
  output msg_t [N_CNU-1:0][WR-1:0] cn_in,     // to the CNUs
  input  logic [1:0]             ret_band,
  input  msg_t [N_CNU-1:0][WR-1:0] cn_out,    // from the CNUs
  output msg_t [N_VAR-1:0]       vn_ret       // to edge register ret_band of each VN
);
  localparam band_ctl_t FWD_CTL = make_fwd_ctl();
  localparam band_ctl_t RET_CTL = make_ret_ctl();

  logic [BENES_N-1:0][MSG_W-1:0] f_in, f_out, r_in, r_out;
  bctl_t f_ctl, r_ctl;

  // 3:1 multiplexers on the variable node side
  always_comb begin
    f_in = '0;
    for (int v = 0; v < N_VAR; v++) begin
      unique case (band)
        2'd0:    f_in[v] = vn_edge[v][0];
        2'd1:    f_in[v] = vn_edge[v][1];
        default: f_in[v] = vn_edge[v][2];
      endcase
    end
  end

  always_comb begin
    unique case (band)
      2'd0:    f_ctl = FWD_CTL[0];
      2'd1:    f_ctl = FWD_CTL[1];
      default: f_ctl = FWD_CTL[2];
    endcase
    unique case (ret_band)
      2'd0:    r_ctl = RET_CTL[0];
      2'd1:    r_ctl = RET_CTL[1];
      default: r_ctl = RET_CTL[2];
    endcase
  end

  benes_net #(.N(BENES_N), .W(MSG_W)) u_fwd (.ctl(f_ctl), .din(f_in), .dout(f_out));

  always_comb begin
    r_in = '0;
    for (int k = 0; k < N_CNU; k++)
      for (int p = 0; p < WR; p++)
        r_in[k*WR + p] = cn_out[k][p];
  end

  benes_net #(.N(BENES_N), .W(MSG_W)) u_ret (.ctl(r_ctl), .din(r_in), .dout(r_out));

  always_comb begin
    for (int k = 0; k < N_CNU; k++)
      for (int p = 0; p < WR; p++)
        cn_in[k][p] = f_out[k*WR + p];
    for (int v = 0; v < N_VAR; v++)
      vn_ret[v] = r_out[v];
  end
endmodule

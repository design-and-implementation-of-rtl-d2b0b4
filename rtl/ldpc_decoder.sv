// ldpc_decoder: soft-decision LDPC decoder for the regular (20, w_c=3, w_r=4) Gallager code
// using a modified sum-product algorithm with a fixed iteration count.
//
// The received 20-bit word is turned into channel LLRs (+CH_LLR for a 0, -CH_LLR for a 1)
// and decoded by 20 variable node processors (vnu) and 5 check node processors (cnu) that
// exchange messages through a Benes permutation network (msg_perm_net). Variable nodes
// multicast one total LLR per bit; each check node subtracts the message it sent in the
// previous iteration (its local RAM), so only one value per bit crosses the network in the
// VN -> CN direction. The five CNUs serve the three five-check bands of H in turn. After
// ITERS iterations the signs of the totals are the decoded bits, and the syndrome check says
// whether they form a codeword. The VN bank and the CN bank each run on a gated clock that
// only ticks in their own steps.
//
// Interface: start_i (one cycle, while idle) loads message_i and starts; valid_o rises
// 2 + 11*ITERS cycles after the start edge (112 for ITERS = 10) together with message_o and
// codeword_ok_o, and stays high until the next start. message_i[v] / message_o[v] is code
// bit V(v+1). rst is synchronous, active high.
// The port names of clock, reset, start, message and valid, the 20-bit width, the 15x20
// parity-check matrix, the fixed 10 iterations, the multicast/subtract scheme, Benes
// interconnect and clock gating follow the published design; the hard-bit-to-LLR mapping, the
// codeword_ok_o port, word lengths and the band-wise time sharing of five CNUs are this
// design's choices.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int ITERS = N_ITER
) (
  input  logic             clock_c,
  input  logic             rst,
  input  logic             start_i,
  input  logic [N_VAR-1:0] message_i,
  output logic [N_VAR-1:0] message_o,
  output logic             valid_o,
  output logic             codeword_ok_o
);
  logic       load, sub_en, cn_en, wb_en, rd_en, add_en, done, busy;
  logic [1:0] band;
  logic       vn_clk, cn_clk;

  msg_t [N_VAR-1:0][WC-1:0] vn_edge;
  msg_t [N_VAR-1:0]         vn_total;
  msg_t [N_VAR-1:0]         vn_ret;
  logic [N_VAR-1:0]         hard;
  msg_t [N_CNU-1:0][WR-1:0] cn_in, cn_out;
  logic                     synd_ok;
  logic [N_CHK-1:0]         syndrome;

  ldpc_ctrl #(.ITERS(ITERS)) u_ctrl (
    .clk   (clock_c),
    .rst   (rst),
    .start (start_i),
    .load  (load),
    .sub_en(sub_en),
    .cn_en (cn_en),
    .wb_en (wb_en),
    .band  (band),
    .rd_en (rd_en),
    .add_en(add_en),
    .done  (done),
    .busy  (busy)
  );

  // clock gating of the two processor banks
  clk_gate u_cg_vn (.clk(clock_c), .en(load | wb_en | rd_en | add_en), .gclk(vn_clk));
  clk_gate u_cg_cn (.clk(clock_c), .en(load | sub_en | cn_en),         .gclk(cn_clk));

  for (genvar v = 0; v < N_VAR; v++) begin : g_vn
    vnu u_vnu (
      .clk    (vn_clk),
      .load   (load),
      .llr_in (hard_to_llr(message_i[v])),
      .rd_en  (rd_en),
      .add_en (add_en),
      .wb_en  (wb_en),
      .wb_band(band),
      .wb_data(vn_ret[v]),
      .edge_q (vn_edge[v]),
      .total  (vn_total[v]),
      .hard   (hard[v])
    );
  end

  msg_perm_net u_perm (
    .band    (band),
    .vn_edge (vn_edge),
    .cn_in   (cn_in),
    .ret_band(band),
    .cn_out  (cn_out),
    .vn_ret  (vn_ret)
  );

  for (genvar k = 0; k < N_CNU; k++) begin : g_cn
    cnu u_cnu (
      .clk   (cn_clk),
      .clr   (load),
      .sub_en(sub_en),
      .cn_en (cn_en),
      .band  (band),
      .l_in  (cn_in[k]),
      .e_out (cn_out[k])
    );
  end

  syndrome_chk u_synd (.bits(hard), .syndrome(syndrome), .ok(synd_ok));

  always_ff @(posedge clock_c) begin
    if (rst) begin
      message_o     <= '0;
      valid_o       <= 1'b0;
      codeword_ok_o <= 1'b0;
    end else if (load) begin
      valid_o <= 1'b0;
    end else if (done) begin
      message_o     <= hard;
      codeword_ok_o <= synd_ok;
      valid_o       <= 1'b1;
    end
  end
endmodule

// cnu: check node processor of degree WR = 4, serving one check of each band of H.
//
// Operation for the band selected by `band` (three clock-enabled steps, driven by the
// controller):
//   sub_en : the subtractor forms M_p = L_p - E_old[band][p] from the multicast variable
//            node totals L_p (arriving through the permutation network) and this
//            processor's own previous-iteration messages, saturates it and stores it in
//            the buffer;
//   cn_en  : four cn_core units compute E_p from the other three buffered values; the result
//            is latched in e_out and written into the local RAM row of the band.
//   clr    : clears the local RAM (start of a new codeword, when all previous messages are 0).
// The local RAM is WC rows of WR messages, kept in registers. e_out holds its value until
// the next cn_en, so the return path can write it back to the variable nodes a cycle later.
// Subtractor, buffer, local RAM of previous messages and the latched output follow the
// published design; the three-step timing and one check per band per processor are this design's.
module cnu
  import ldpc_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              sub_en,
  input  logic              cn_en,
  input  logic [1:0]        band,
  input  msg_t [WR-1:0]     l_in,    // multicast VN totals of this check's four bits
  output msg_t [WR-1:0]     e_out    // latched new check-to-variable messages
);
  msg_t [WR-1:0] e_old [WC];   // local RAM: previous-iteration messages, per band
  msg_t [WR-1:0] buf_m;        // buffer: L - E_old
  msg_t [WR-1:0] diff;
  msg_t [WR-1:0] e_new;

  // subtractor: L - E_old with a look-ahead adder on (MSG_W+1) bits, then saturation
  for (genvar p = 0; p < WR; p++) begin : g_sub
    logic [MSG_W:0] d;
    cla_adder #(.W(MSG_W + 1)) u_sub (
      .a   ({l_in[p][MSG_W-1], l_in[p]}),
      .b   (~{e_old[band][p][MSG_W-1], e_old[band][p]}),
      .cin (1'b1),
      .sum (d),
      .cout()
    );
    assign diff[p] = sat_msg(int'(signed'(d)));
  end

  // four extrinsic outputs, each from the other three buffered inputs
  for (genvar p = 0; p < WR; p++) begin : g_core
    msg_t [2:0] others;
    for (genvar k = 0; k < 3; k++) begin : g_sel
      assign others[k] = buf_m[(k < p) ? k : k + 1];
    end
    cn_core u_core (.m_in(others), .e_out(e_new[p]));
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int g = 0; g < WC; g++) e_old[g] <= '0;
      buf_m <= '0;
      e_out <= '0;
    end else begin
      if (sub_en) buf_m <= diff;
      if (cn_en) begin
        e_old[band] <= e_new;
        e_out       <= e_new;
      end
    end
  end
endmodule

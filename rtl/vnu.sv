// vnu: variable node processor with its RAM1 (channel LLR) and RAM2 (three edge registers).
//
// Computes the a-posteriori LLR of one code bit, L = r + E_1 + E_2 + E_3 (r the channel LLR,
// E_k the messages of its three checks), and multicasts L: the same total is written back to
// all three edge registers, and each check node subtracts its own old message later.
//   load   : RAM1 <= llr_in and every edge register <= llr_in (no check messages yet);
//   rd_en  : the three input registers Reg_1..Reg_3 take the edge registers' contents;
//   add_en : the carry look-ahead tree adder sums r and Reg_1..Reg_3; the saturated total is
//            latched into all three edge registers, into `total` and its sign into `hard`;
//   wb_en  : edge register `wb_band` takes wb_data, a message returned by a check node.
// Priority: load, then add_en, then wb_en. Edge registers are read combinationally (`edge`).
// Adder tree (two adders, then one), input registers and write-back of the latched sum to
// the edge registers follow the published design; widths and the step enables are this design's.
module vnu
  import ldpc_pkg::*;
(
  input  logic          clk,
  input  logic          load,
  input  msg_t          llr_in,
  input  logic          rd_en,
  input  logic          add_en,
  input  logic          wb_en,
  input  logic [1:0]    wb_band,
  input  msg_t          wb_data,
  output msg_t [WC-1:0] edge_q,
  output msg_t          total,
  output logic          hard
);
  msg_t             ram1;          // channel LLR of this bit
  msg_t [WC-1:0]    in_reg;        // Reg_1..Reg_3
  logic [SUM_W-1:0] s_a, s_b, s_t;
  msg_t             l_sat;

  // tree adder: (r + Reg_1) and (Reg_2 + Reg_3), then their sum
  cla_adder #(.W(SUM_W)) u_add_a (
    .a   (SUM_W'(signed'(ram1))),
    .b   (SUM_W'(signed'(in_reg[0]))),
    .cin (1'b0),
    .sum (s_a),
    .cout()
  );
  cla_adder #(.W(SUM_W)) u_add_b (
    .a   (SUM_W'(signed'(in_reg[1]))),
    .b   (SUM_W'(signed'(in_reg[2]))),
    .cin (1'b0),
    .sum (s_b),
    .cout()
  );
  cla_adder #(.W(SUM_W)) u_add_t (
    .a   (s_a),
    .b   (s_b),
    .cin (1'b0),
    .sum (s_t),
    .cout()
  );

  assign l_sat = sat_msg(int'(signed'(s_t)));

  always_ff @(posedge clk) begin
    if (load) begin
      ram1   <= llr_in;
      edge_q <= {WC{llr_in}};
      in_reg <= '0;
      total  <= llr_in;
      hard   <= llr_in[MSG_W-1];
    end else begin
      if (rd_en) in_reg <= edge_q;
      if (add_en) begin
        edge_q <= {WC{l_sat}};
        total  <= l_sat;
        hard   <= l_sat[MSG_W-1];
      end else if (wb_en) begin
        edge_q[wb_band] <= wb_data;
      end
    end
  end
endmodule

// cn_core: one check-to-variable message of the sum-product algorithm, from three inputs.
//
// Implements E = 2 atanh( prod tanh(M_k / 2) ) over the three other edges of a degree-4
// check in the log domain: each input magnitude goes through a phi lookup table
// (phi(x) = -ln tanh(x/2)), two carry look-ahead adders sum the three phi values, and an
// output phi table turns the sum back into a magnitude. The sign is the XOR of the three
// input sign bits; when it is 1 the output magnitude is negated.
// Purely combinational; inputs and output are ldpc_pkg::msg_t LLRs (2 fractional bits).
// Structure (three input LUTs, two look-ahead adders, output LUT, sign gate, negation)
// follows the published design; the table contents, word lengths and rounding are this design's.
module cn_core
  import ldpc_pkg::*;
(
  input  msg_t [2:0] m_in,
  output msg_t       e_out
);
  logic [MAG_W-1:0] mag [3];
  logic [MAG_W-1:0] phi [3];
  logic [PHS_W-1:0] s01, s012;
  logic [MAG_W-1:0] out_mag;
  logic             neg;

  // magnitude of each input, clamped to MSG_MAX (covers the unused code -2^(MSG_W-1))
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      logic [MSG_W-1:0] a;
      a = m_in[k][MSG_W-1] ? MSG_W'(-m_in[k]) : MSG_W'(m_in[k]);
      mag[k] = a[MSG_W-1] ? MAG_W'(MSG_MAX) : a[MAG_W-1:0];
      phi[k] = PHI_IN_TAB[mag[k]];
    end
  end

  cla_adder #(.W(PHS_W)) u_add0 (
    .a   (PHS_W'(phi[0])),
    .b   (PHS_W'(phi[1])),
    .cin (1'b0),
    .sum (s01),
    .cout()
  );

  cla_adder #(.W(PHS_W)) u_add1 (
    .a   (s01),
    .b   (PHS_W'(phi[2])),
    .cin (1'b0),
    .sum (s012),
    .cout()
  );

  assign out_mag = PHI_OUT_TAB[s012];
  assign neg     = m_in[0][MSG_W-1] ^ m_in[1][MSG_W-1] ^ m_in[2][MSG_W-1];
  assign e_out   = neg ? -msg_t'({1'b0, out_mag}) : msg_t'({1'b0, out_mag});
endmodule

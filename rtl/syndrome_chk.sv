// syndrome_chk: parity-check evaluator, s = H * x^T over GF(2).
// syndrome[j] is the XOR of the bits of check j (H row j, ldpc_pkg::H); ok is 1 when every
// check is satisfied, i.e. the hard decisions form a codeword. Purely combinational.
// bits[v] is code bit V(v+1). The published design checks for a valid codeword once, after the
// fixed number of iterations; this block is that check.
module syndrome_chk
  import ldpc_pkg::*;
(
  input  logic [N_VAR-1:0] bits,
  output logic [N_CHK-1:0] syndrome,
  output logic             ok
);
  always_comb begin
    for (int j = 0; j < N_CHK; j++) begin
      syndrome[j] = 1'b0;
      for (int v = 0; v < N_VAR; v++)
        if (H[j][v]) syndrome[j] ^= bits[v];
    end
  end

  assign ok = ~|syndrome;
endmodule

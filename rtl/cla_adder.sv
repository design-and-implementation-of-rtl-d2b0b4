// cla_adder: W-bit carry look-ahead adder, sum = a + b + cin.
//
// Bits are grouped in blocks of four. Inside a block every carry is formed directly from
// the generate (a & b) and propagate (a ^ b) terms of the lower bits and the block's carry
// in, so no carry ripples through a block; the block carries then chain from block to block.
// Purely combinational. Used by the variable node tree adder, the check node core and the
// check node subtractor (b inverted, cin = 1).
// The published design names the carry look-ahead adder as its adder of choice; the block size of
// four is this design's choice.
module cla_adder #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int BLK = 4;

  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    logic term;
    int   base;
    c    = '0;
    c[0] = cin;
    for (int i = 0; i < W; i++) begin
      base     = (i / BLK) * BLK;
      // c[i+1] = g[i] | p[i]g[i-1] | ... | p[i..base] c[base]
      c[i+1] = g[i];
      for (int k = base; k < i; k++) begin
        term = g[k];
        for (int m = k + 1; m <= i; m++) term = term & p[m];
        c[i+1] = c[i+1] | term;
      end
      term = c[base];
      for (int m = base; m <= i; m++) term = term & p[m];
      c[i+1] = c[i+1] | term;
    end
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];
endmodule

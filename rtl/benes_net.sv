// benes_net: N-port rearrangeably non-blocking Benes network of 2x2 switches.
//
// The network is the usual recursion, unrolled into 2*log2(N)-1 stages of N/2 switches: at
// recursion level l the ports form 2^l sub-networks of size sz = N >> l. Going in, switch i
// of a sub-network (ports b+2i, b+2i+1, b = its first port) sends its out0 to port b+i of the
// upper half and its out1 to port b+sz/2+i of the lower half. The innermost level is a single
// switch per port pair. Coming out, switch i takes port b+i of the upper half (in0) and
// port b+sz/2+i of the lower half (in1) and drives ports b+2i and b+2i+1.
// ctl layout, for each sub-network in recursion order: [sz/2 input switches][sz/2 output
// switches][upper half's bits][lower half's bits]; ldpc_pkg::benes_route computes it for any
// permutation. A switch with ctl = 1 swaps its inputs. Purely combinational.
// The Benes topology and its stage count follow the published design; the port count N = 32 (the
// 20 code bits rounded up to a power of two) is this design's choice.
module benes_net #(
  parameter int N = 32,
  parameter int W = 6,
  parameter int CTL = (2 * $clog2(N) - 1) * N / 2
) (
  input  logic [CTL-1:0]        ctl,
  input  logic [N-1:0][W-1:0]   din,
  output logic [N-1:0][W-1:0]   dout
);
  localparam int LG = $clog2(N);

  // control bits of a Benes network with n ports
  function automatic int ctl_bits(int n);
    return (2 * $clog2(n) - 1) * n / 2;
  endfunction

  // first control bit of sub-network s at recursion level l
  function automatic int sub_off(int l, int s);
    int off = 0;
    int sz  = N;
    for (int d = 0; d < l; d++) begin
      off += sz;
      if (((s >> (l - 1 - d)) & 1) != 0) off += ctl_bits(sz / 2);
      sz = sz / 2;
    end
    return off;
  endfunction

  logic [N-1:0][W-1:0] fw [LG];   // fw[l]: ports entering recursion level l
  logic [N-1:0][W-1:0] bw [LG];   // bw[l]: ports leaving recursion level l

  assign fw[0] = din;
  assign dout  = bw[0];

  for (genvar l = 0; l < LG; l++) begin : g_lvl
    localparam int SZ = N >> l;
    for (genvar s = 0; s < (1 << l); s++) begin : g_sub
      localparam int B   = s * SZ;
      localparam int OFF = sub_off(l, s);
      if (SZ == 2) begin : g_leaf
        benes_switch #(.W(W)) u_sw (
          .swap(ctl[OFF]), .in0(fw[l][B]), .in1(fw[l][B+1]), .out0(bw[l][B]), .out1(bw[l][B+1])
        );
      end else begin : g_col
        for (genvar i = 0; i < SZ / 2; i++) begin : g_sw
          benes_switch #(.W(W)) u_in (
            .swap(ctl[OFF+i]), .in0(fw[l][B+2*i]), .in1(fw[l][B+2*i+1]),
            .out0(fw[l+1][B+i]), .out1(fw[l+1][B+SZ/2+i])
          );
          benes_switch #(.W(W)) u_out (
            .swap(ctl[OFF+SZ/2+i]), .in0(bw[l+1][B+i]), .in1(bw[l+1][B+SZ/2+i]),
            .out0(bw[l][B+2*i]), .out1(bw[l][B+2*i+1])
          );
        end
      end
    end
  end
endmodule

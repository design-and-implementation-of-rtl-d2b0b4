// ldpc_pkg: shared constants, types and elaboration-time tables of the LDPC decoder.
//
// The code is the regular (20, w_c = 3, w_r = 4) Gallager LDPC code: 20 variable nodes
// (code bits V1..V20) and 15 check nodes (C1..C15). Its parity-check matrix H is made of
// three bands of five rows; inside each band every code bit is checked exactly once.
// The decoder exploits that: five check node processors (CNUs) work on one band per step,
// and the three edge registers of each variable node are indexed by band.
//
// Messages are log-likelihood ratios (LLRs) in MSG_W-bit two's complement with two
// fractional bits, saturated symmetrically to +-MSG_MAX. A positive LLR means "bit is 0".
//
// The check-node function phi(x) = -ln(tanh(x/2)) is tabulated here by constant functions
// (real arithmetic at elaboration only); the hardware sees plain constant tables.
//
// The Benes routing (looping algorithm) is also a constant function: the permutation network
// gets, per band, the switch settings that route every variable node to the CNU input that
// the band's checks need.
//
// Sizes of H (15 x 20, w_c = 3, w_r = 4), the iteration count (10) and the data width (20 bits)
// follow the published design; the word lengths, the LLR scale, the band-wise schedule and the
// 32-port Benes network (20 ports used) are this design's own choices.
package ldpc_pkg;

  // ---------------------------------------------------------------- code
  localparam int N_VAR = 20;           // code bits / variable nodes
  localparam int N_CHK = 15;           // parity checks / check nodes
  localparam int WC    = 3;            // checks per bit (column weight)
  localparam int WR    = 4;            // bits per check (row weight)
  localparam int N_CNU = N_CHK / WC;   // check node processors: one band of H at a time
  localparam int N_ITER = 10;          // fixed number of decoding iterations

  // H, one row per check. Leftmost bit is V1, rightmost V20.
  // Rows 1-5: consecutive groups of four bits; rows 6-15: two column permutations of that band.
  localparam logic [0:N_VAR-1] H [N_CHK] = '{
    20'b1111_0000_0000_0000_0000,  // C1
    20'b0000_1111_0000_0000_0000,  // C2
    20'b0000_0000_1111_0000_0000,  // C3
    20'b0000_0000_0000_1111_0000,  // C4
    20'b0000_0000_0000_0000_1111,  // C5
    20'b1000_1000_1000_1000_0000,  // C6
    20'b0100_0100_0100_0000_1000,  // C7
    20'b0010_0010_0000_0100_0100,  // C8
    20'b0001_0000_0010_0010_0010,  // C9
    20'b0000_0001_0001_0001_0001,  // C10
    20'b1000_0100_0001_0000_0100,  // C11
    20'b0100_0010_0010_0001_0000,  // C12
    20'b0010_0001_0000_1000_0010,  // C13
    20'b0001_0000_1000_0100_1000,  // C14
    20'b0000_1000_0100_0010_0001   // C15
  };

  // ---------------------------------------------------------------- messages
  localparam int MSG_W   = 6;                    // LLR word: sign + 5 bits, 2 fractional bits
  localparam int MAG_W   = MSG_W - 1;
  localparam int MSG_MAX = (1 << MAG_W) - 1;     // symmetric saturation limit (31 = 7.75)
  localparam int FRAC    = 2;                    // fractional bits of every LLR and phi value
  localparam int CH_LLR  = 8;                    // channel LLR magnitude of a hard bit (2.0)
  localparam int SUM_W   = MSG_W + 2;            // VN tree-adder width: 4 operands
  localparam int PHS_W   = MAG_W + 2;            // CN phi-sum width: 3 operands

  typedef logic signed [MSG_W-1:0] msg_t;

  // Saturate an integer to the symmetric message range.
  function automatic msg_t sat_msg(int x);
    if (x > MSG_MAX)  return msg_t'(MSG_MAX);
    if (x < -MSG_MAX) return msg_t'(-MSG_MAX);
    return msg_t'(x);
  endfunction

  // Channel LLR of a received hard bit.
  function automatic msg_t hard_to_llr(logic b);
    return b ? msg_t'(-CH_LLR) : msg_t'(CH_LLR);
  endfunction

  // ---------------------------------------------------------------- phi tables
  // phi_q(m) = round(2^FRAC * phi(m / 2^FRAC)), clamped to MSG_MAX; phi(0) is infinite.
  function automatic int phi_q(int m);
    real x, p;
    if (m == 0) return MSG_MAX;
    x = real'(m) / real'(1 << FRAC);
    p = $ln((1.0 + $exp(-x)) / (1.0 - $exp(-x)));
    p = p * real'(1 << FRAC) + 0.5;
    if (p >= real'(MSG_MAX)) return MSG_MAX;
    return int'($floor(p));
  endfunction

  localparam int PHI_IN_N  = 1 << MAG_W;   // input LUT: one entry per magnitude
  localparam int PHI_OUT_N = 1 << PHS_W;   // output LUT: one entry per phi sum

  typedef logic [PHI_IN_N-1:0][MAG_W-1:0]  phi_in_tab_t;
  typedef logic [PHI_OUT_N-1:0][MAG_W-1:0] phi_out_tab_t;

  function automatic phi_in_tab_t make_phi_in();
    phi_in_tab_t t;
    for (int m = 0; m < PHI_IN_N; m++) t[m] = MAG_W'(phi_q(m));
    return t;
  endfunction

  function automatic phi_out_tab_t make_phi_out();
    phi_out_tab_t t;
    for (int m = 0; m < PHI_OUT_N; m++) t[m] = MAG_W'(phi_q(m));
    return t;
  endfunction

  localparam phi_in_tab_t  PHI_IN_TAB  = make_phi_in();
  localparam phi_out_tab_t PHI_OUT_TAB = make_phi_out();

  // ---------------------------------------------------------------- graph helpers
  // Index (0-based) of the p-th variable node of check j, counting from V1.
  function automatic int chk_var(int j, int p);
    int n = 0;
    for (int v = 0; v < N_VAR; v++)
      if (H[j][v]) begin
        if (n == p) return v;
        n++;
      end
    return 0;
  endfunction

  // ---------------------------------------------------------------- Benes network
  localparam int BENES_LG  = 5;
  localparam int BENES_N   = 1 << BENES_LG;                  // 32 ports, 20 used
  localparam int BENES_CTL = (2 * BENES_LG - 1) * BENES_N / 2; // 9 stages x 16 switches

  typedef logic [BENES_N-1:0][BENES_LG-1:0] perm_t;   // perm[input] = output port
  typedef logic [BENES_CTL-1:0]             bctl_t;

  // Control bits of an n-port Benes network (n a power of two).
  function automatic int benes_ctl_bits(int n);
    int lg = $clog2(n);
    return (2 * lg - 1) * n / 2;
  endfunction

  // Offset of sub-network s at recursion level l in the control vector. Each network of
  // size n stores [first stage n/2][last stage n/2][upper sub][lower sub].
  function automatic int benes_sub_off(int l, int s);
    int off = 0;
    int sz  = BENES_N;
    for (int d = 0; d < l; d++) begin
      off += sz;
      if (((s >> (l - 1 - d)) & 1) != 0) off += benes_ctl_bits(sz / 2);
      sz = sz / 2;
    end
    return off;
  endfunction

  // Looping algorithm: switch settings that make the Benes network realise perm.
  // A switch set to 1 crosses its two inputs.
  function automatic bctl_t benes_route(perm_t perm);
    bctl_t ctl = '0;
    int    p  [BENES_N];
    int    np [BENES_N];
    int    q  [BENES_N];
    int    f  [BENES_N/2];
    int    t  [BENES_N/2];
    bit    fs [BENES_N/2];
    for (int i = 0; i < BENES_N; i++) begin
      p[i]  = int'(perm[i]);
      np[i] = 0;
    end
    for (int l = 0; l < BENES_LG; l++) begin
      int sz   = BENES_N >> l;
      int nsub = 1 << l;
      for (int s = 0; s < nsub; s++) begin
        int b   = s * sz;
        int off = benes_sub_off(l, s);
        if (sz == 2) begin
          ctl[off] = (p[b] == 1);
        end else begin
          for (int i = 0; i < sz; i++) q[p[b+i]] = i;
          for (int i = 0; i < sz / 2; i++) begin
            f[i] = 0; t[i] = 0; fs[i] = 1'b0;
          end
          for (int i0 = 0; i0 < sz / 2; i0++) begin
            if (!fs[i0]) begin
              int  cur, o, inp;
              bit  closed;
              fs[i0] = 1'b1;
              f[i0]  = 0;
              cur    = 2 * i0;            // this input goes to the upper sub-network
              closed = 1'b0;
              for (int guard = 0; guard < sz && !closed; guard++) begin
                o      = p[b+cur];
                t[o/2] = o % 2;           // the upper sub-network feeds output o
                inp    = q[o ^ 1];        // the switch's other output comes from below
                if (fs[inp/2]) begin
                  closed = 1'b1;
                end else begin
                  fs[inp/2] = 1'b1;
                  f[inp/2]  = 1 - (inp % 2);  // send inp to the lower sub-network
                  cur       = inp ^ 1;        // its partner goes up
                end
              end
            end
          end
          for (int i = 0; i < sz / 2; i++) begin
            ctl[off + i]          = f[i][0];
            ctl[off + sz / 2 + i] = t[i][0];
          end
          for (int j = 0; j < sz; j++) begin
            if ((j % 2) == f[j/2]) np[b + j/2]          = p[b+j] / 2;
            else                   np[b + sz/2 + j/2]   = p[b+j] / 2;
          end
        end
      end
      for (int i = 0; i < BENES_N; i++) p[i] = np[i];
    end
    return ctl;
  endfunction

  // Forward permutation of band g: variable node v goes to CNU input k*WR+p, where check
  // g*N_CNU+k has v as its p-th bit. Unused ports 20..31 pass straight through.
  function automatic perm_t band_perm(int g);
    perm_t r;
    for (int i = 0; i < BENES_N; i++) r[i] = BENES_LG'(i);
    for (int k = 0; k < N_CNU; k++)
      for (int pp = 0; pp < WR; pp++)
        r[chk_var(g * N_CNU + k, pp)] = BENES_LG'(k * WR + pp);
    return r;
  endfunction

  function automatic perm_t perm_inverse(perm_t a);
    perm_t r;
    for (int i = 0; i < BENES_N; i++) r[a[i]] = BENES_LG'(i);
    return r;
  endfunction

  typedef bctl_t band_ctl_t [WC];

  function automatic band_ctl_t make_fwd_ctl();
    band_ctl_t r;
    for (int g = 0; g < WC; g++) r[g] = benes_route(band_perm(g));
    return r;
  endfunction

  function automatic band_ctl_t make_ret_ctl();
    band_ctl_t r;
    for (int g = 0; g < WC; g++) r[g] = benes_route(perm_inverse(band_perm(g)));
    return r;
  endfunction

endpackage

// ldpc_ctrl: sequencer of the decoder, a fixed number of flooding iterations per codeword.
//
// One iteration is a check node half followed by a variable node half:
//   for band = 0, 1, 2:  SUB (subtract, fill CNU buffers), CNC (CNU compute, latch),
//                        WB  (return path writes the band's edge registers);
//   VRD (VN input registers), VADD (VN tree add, multicast of the totals).
// That is 3*WC + 2 = 11 cycles; after N_ITER iterations a CHK cycle samples the hard
// decisions and the syndrome. A start pulse in IDLE asserts `load` in that same cycle; all
// other starts are ignored until the decoder is idle again.
// Latency from the start edge to `done` (high for the CHK cycle): 1 + N_ITER*11 cycles,
// the decoded word appears one edge later.
// Reset is synchronous and active high.
// The fixed iteration count (10, no early stop) and the CN-then-VN order follow the
// published design; the step encoding and timing are this design's.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int ITERS = N_ITER
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  output logic       load,
  output logic       sub_en,
  output logic       cn_en,
  output logic       wb_en,
  output logic [1:0] band,
  output logic       rd_en,
  output logic       add_en,
  output logic       done,
  output logic       busy
);
  typedef enum logic [2:0] { S_IDLE, S_SUB, S_CNC, S_WB, S_VRD, S_VADD, S_CHK } state_t;

  state_t state;
  logic [1:0] band_q;
  logic [$clog2(ITERS+1)-1:0] iter;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      band_q <= '0;
      iter   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_SUB;
          band_q <= '0;
          iter   <= '0;
        end
        S_SUB: state <= S_CNC;
        S_CNC: state <= S_WB;
        S_WB: begin
          if (band_q == 2'(WC - 1)) begin
            band_q <= '0;
            state  <= S_VRD;
          end else begin
            band_q <= band_q + 2'd1;
            state  <= S_SUB;
          end
        end
        S_VRD: state <= S_VADD;
        S_VADD: begin
          if (iter == ($bits(iter))'(ITERS - 1)) begin
            state <= S_CHK;
          end else begin
            iter  <= iter + 1'b1;
            state <= S_SUB;
          end
        end
        S_CHK: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign load   = (state == S_IDLE) && start && !rst;
  assign sub_en = (state == S_SUB);
  assign cn_en  = (state == S_CNC);
  assign wb_en  = (state == S_WB);
  assign rd_en  = (state == S_VRD);
  assign add_en = (state == S_VADD);
  assign done   = (state == S_CHK);
  assign busy   = (state != S_IDLE);
  assign band   = band_q;
endmodule

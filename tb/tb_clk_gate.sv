// tb_clk_gate: drives a random enable that changes just after rising edges (as a register
// output would) and also glitches it while the clock is high. Checks: a counter on gclk
// advances exactly in the cycles whose enable was 1 at the rising edge, and gclk is never
// high while clk is low or while the latched enable is 0 (no glitch passes).
module tb_clk_gate;
  int checks = 0, failures = 0;
  logic clk = 1'b0, en = 1'b0, gclk;
  int gated_cnt = 0, exp_cnt = 0, n_off = 0, n_on = 0;

  clk_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always @(posedge gclk) gated_cnt++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2000; c++) begin
      #5 clk = 1'b1;                        // rising edge: en is stable here
      if (en) begin exp_cnt++; n_on++; end else n_off++;
      #1 en = 1'($urandom);                 // new enable after the edge
      #1 if ($urandom_range(3) == 0) begin  // glitch while clk is high
        en = ~en; #1 en = ~en;
      end
      #1;
      checks++;
      if (gated_cnt != exp_cnt) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d count %0d exp %0d", c, gated_cnt, exp_cnt);
      end
      #1 clk = 1'b0;
      #1;
      checks++;
      if (gclk !== 1'b0) failures++;
    end
    checks++;
    if (n_on == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

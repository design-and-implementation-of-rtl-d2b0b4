// tb_vnu: loads a channel LLR, writes random check messages into the three edge registers
// through the write-back port, then runs the read and add steps, and checks the total
// (saturated r + E1 + E2 + E3), the hard decision (its sign) and that the total was
// multicast to all three edge registers. Also checks that load fills all edge registers
// with the channel LLR and that registers hold when no step is enabled.
module tb_vnu;
  int checks = 0, failures = 0;
  logic clk = 1'b0, load, rd_en, add_en, wb_en, hard;
  logic [1:0] wb_band;
  logic signed [5:0] llr_in, wb_data, total;
  logic [2:0][5:0] edge_q;

  vnu dut (.clk(clk), .load(load), .llr_in(llr_in), .rd_en(rd_en), .add_en(add_en),
           .wb_en(wb_en), .wb_band(wb_band), .wb_data(wb_data), .edge_q(edge_q),
           .total(total), .hard(hard));

  always #5 clk = ~clk;

  function automatic int sat(int x);
    return (x > 31) ? 31 : (x < -31) ? -31 : x;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; rd_en = 0; add_en = 0; wb_en = 0; wb_band = 0; wb_data = 0; llr_in = 0;
    for (int n = 0; n < 500; n++) begin
      int r, e [3], ex;
      r = $urandom_range(62) - 31;
      @(negedge clk);
      llr_in = 6'(r); load = 1;
      @(negedge clk);
      load = 0; llr_in = 6'($urandom);
      checks++;
      if (edge_q != {3{6'(r)}}) failures++;
      for (int rep = 0; rep < 3; rep++) begin
        for (int g = 0; g < 3; g++) begin
          e[g] = $urandom_range(62) - 31;
          wb_en = 1; wb_band = 2'(g); wb_data = 6'(e[g]);
          @(negedge clk);
          wb_en = 0;
          wb_data = 6'($urandom);
          repeat ($urandom_range(1)) @(negedge clk);
        end
        checks++;
        if (edge_q != {6'(e[2]), 6'(e[1]), 6'(e[0])}) failures++;
        rd_en = 1;
        @(negedge clk);
        rd_en = 0;
        add_en = 1;
        @(negedge clk);
        add_en = 0;
        ex = sat(r + e[0] + e[1] + e[2]);
        checks++;
        if (int'(total) != ex || hard != (ex < 0) || edge_q != {3{6'(ex)}}) begin
          failures++;
          if (failures < 10) $display("FAIL r=%0d e=%0d,%0d,%0d total=%0d exp=%0d", r, e[0], e[1], e[2], total, ex);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ldpc_ctrl: follows the controller cycle by cycle against the expected schedule: after
// a start, ITERS iterations of (SUB, CNC, WB) for bands 0, 1, 2 then VRD, VADD, then one
// done cycle; exactly one step strobe at a time; load only in the start cycle; starts while
// busy ignored; reset mid-run returns to idle. Runs at the default ITERS = 10.
module tb_ldpc_ctrl;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst, start;
  logic load, sub_en, cn_en, wb_en, rd_en, add_en, done, busy;
  logic [1:0] band;

  ldpc_ctrl dut (.clk(clk), .rst(rst), .start(start), .load(load), .sub_en(sub_en),
                 .cn_en(cn_en), .wb_en(wb_en), .band(band), .rd_en(rd_en), .add_en(add_en),
                 .done(done), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected strobe vector {sub, cn, wb, rd, add, done} and band at step s after start
  task automatic expect_step(string name, logic [5:0] strobes, int b);
    checks++;
    if ({sub_en, cn_en, wb_en, rd_en, add_en, done} !== strobes ||
        (strobes[5:3] != 0 && band !== 2'(b)) || busy !== 1'b1 || load !== 1'b0) begin
      failures++;
      if (failures < 10) $display("FAIL at %s band %0d: strobes %b band %0d", name, b,
                                  {sub_en, cn_en, wb_en, rd_en, add_en, done}, band);
    end
  endtask

  task automatic run_decode(bit poke_start);
    @(negedge clk);
    start = 1'b1;
    #1;
    checks++;
    if (load !== 1'b1) failures++;
    @(negedge clk);
    start = poke_start;          // optionally hold start high: must be ignored
    for (int it = 0; it < 10; it++) begin
      for (int b = 0; b < 3; b++) begin
        expect_step("SUB", 6'b100000, b); @(negedge clk);
        expect_step("CNC", 6'b010000, b); @(negedge clk);
        expect_step("WB",  6'b001000, b); @(negedge clk);
      end
      expect_step("VRD",  6'b000100, 0); @(negedge clk);
      expect_step("VADD", 6'b000010, 0); @(negedge clk);
    end
    expect_step("DONE", 6'b000001, 0);
    start = 1'b0;
    @(negedge clk);
    checks++;
    if (busy !== 1'b0) failures++;
  endtask

  initial begin
    rst = 1'b1; start = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run_decode(1'b0);
    run_decode(1'b1);
    // reset in the middle
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (17) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    checks++;
    if (busy !== 1'b0) failures++;
    run_decode(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cla_adder: exhaustive test of the 7-bit carry look-ahead adder (all a, b, cin) and a
// random test at 13 bits (more than three look-ahead blocks), against integer addition.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [6:0]  a7, b7, s7;
  logic        c7i, c7o;
  logic [12:0] a13, b13, s13;
  logic        c13i, c13o;

  cla_adder #(.W(7))  dut7  (.a(a7),  .b(b7),  .cin(c7i),  .sum(s7),  .cout(c7o));
  cla_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(c13i), .sum(s13), .cout(c13o));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 128; x++)
      for (int y = 0; y < 128; y++)
        for (int c = 0; c < 2; c++) begin
          a7 = 7'(x); b7 = 7'(y); c7i = 1'(c);
          #1;
          checks++;
          if ({c7o, s7} != 8'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 7b %0d+%0d+%0d = %0d", x, y, c, {c7o, s7});
          end
        end
    for (int n = 0; n < 20000; n++) begin
      a13 = 13'($urandom); b13 = 13'($urandom); c13i = 1'($urandom);
      #1;
      checks++;
      if ({c13o, s13} != 14'(a13) + 14'(b13) + 14'(c13i)) begin
        failures++;
        if (failures < 10) $display("FAIL 13b %0d+%0d+%0d", a13, b13, c13i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// benes_switch: 2x2 switching element of the Benes network.
// swap = 0 passes in0 -> out0 and in1 -> out1; swap = 1 swaps them. Combinational.
module benes_switch #(
  parameter int W = 6
) (
  input  logic         swap,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] out0,
  output logic [W-1:0] out1
);
  assign out0 = swap ? in1 : in0;
  assign out1 = swap ? in0 : in1;
endmodule

// benes_switch: the 2x2 base element of the Benes network.  With sel = 0 the
// two words pass straight (in0 -> out0, in1 -> out1); with sel = 1 they are
// exchanged.  Purely combinational.
module benes_switch #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] out0,
  output logic [W-1:0] out1
);
  assign out0 = sel ? in1 : in0;
  assign out1 = sel ? in0 : in1;
endmodule

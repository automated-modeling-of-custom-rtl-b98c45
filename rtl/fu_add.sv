// fu_add: functional unit FU2 of the DCT datapath, an adder.
//
// Computes y = a + b (W bits, wrap-around) combinationally within a state.
// Besides the additions of the schedule, the program uses it with a zero
// immediate to copy a value from one register unit to another
// (e.g. sum = T10); that use is this design's choice.
module fu_add #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  assign y = a + b;

endmodule

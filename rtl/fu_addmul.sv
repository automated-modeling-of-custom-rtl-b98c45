// fu_addmul: functional unit FU1 of the DCT datapath, the combined
// adder/multiplier.
//
// The datapath needs two additions and one multiplication in some states but
// never all three at once, so one adder and the multiplier share this unit.
// It computes a + b (op = 0) or the low W bits of a * b (op = 1) in one
// combinational step; the result is written to a register unit at the end of
// the same state. Two's-complement wrap-around; operands are W-bit.
module fu_addmul #(
  parameter int unsigned W = 32
) (
  input  logic         op,   // 0: add, 1: multiply (dct_pkg::fu1_op_e)
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  always_comb begin
    if (op) y = W'(a * b);
    else    y = a + b;
  end

endmodule

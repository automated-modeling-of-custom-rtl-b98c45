// fu_comp: functional unit FU3 of the DCT datapath, the comparator.
//
// Evaluates the loop conditions (i < 8, j < 8, k < 8) of the branch blocks.
// lt = 1 when a < b as signed W-bit integers (the loop variables are C ints).
// The flag goes to the controller, which branches on it in the same state,
// and, zero-extended to W bits as y, to a register unit (temporary T2).
// Only the less-than relation is built, since the code needs no other.
module fu_comp #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         lt,
  output logic [W-1:0] y
);

  always_comb begin
    lt = $signed(a) < $signed(b);
    y  = W'(lt);
  end

endmodule

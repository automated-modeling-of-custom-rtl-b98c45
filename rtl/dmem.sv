// dmem: the single-port data memory of the DCT processor.
//
// Holds the matrices A, B and C of the matrix product. It has one port, so in
// any state the processor makes at most one access: a read whose data is
// available combinationally in the same state (the schedule loads a value
// into a register unit in the state that issues the address, as a
// distributed-RAM block does), or a write taken on the rising clock edge.
// The port limit is the design's; the read timing, the word width and the
// depth (just enough for three 8x8 matrices) are this design's choice.
// Addresses at or above DEPTH read as 0 and ignore writes.
module dmem #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 192,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (int'(addr) < int'(DEPTH))) mem[addr] <= wdata;
  end

  always_comb begin
    rdata = '0;
    if (int'(addr) < int'(DEPTH)) rdata = mem[addr];
  end

endmodule

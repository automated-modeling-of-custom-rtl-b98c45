// reg_bank: one register unit of the DCT datapath (Reg1..Reg4).
//
// Each register unit holds the set of program variables and constants that
// register binding assigned to it; variables that are read in the same state
// live in different units. A unit therefore needs one read port and one write
// port: it is a small register file of DEPTH words, read combinationally
// (the value is available in the same state) and written on the rising clock
// edge at the end of the state. Because the read is combinational and the
// write takes effect at the clock edge, a state may read a slot and overwrite
// it in the same cycle.
//
// Reset loads INIT (word s in bits [s*W +: W]); this is how the constant 8
// and the base addresses of the matrices A, B and C are placed in their
// units. The per-unit word count comes from the binding table; the word
// width, the read timing and the reset values are this design's choice.
//
// Ports: ra/rdata read port; we/wa/wdata write port; active-low async reset.
module reg_bank #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 6,
  parameter int unsigned AW    = 3,
  parameter logic [DEPTH*W-1:0] INIT = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(DEPTH); s++) mem[s] <= INIT[s*W +: W];
    end else if (we && (int'(wa) < int'(DEPTH))) begin
      mem[wa] <= wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (int'(ra) < int'(DEPTH)) rdata = mem[ra];
  end

  // A program word never writes a slot the unit does not have.
  a_wa_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  we |-> (int'(wa) < int'(DEPTH)));

endmodule

// dct_datapath: the custom datapath generated for the DCT code with a
// 1-port data memory.
//
// Four register units (Reg1..Reg4, reg_bank) and three functional units:
// FU1 combined adder/multiplier (fu_addmul), FU2 adder (fu_add) and FU3
// comparator (fu_comp). In one state every unit reads at most one slot;
// each FU operand picks one of the four read ports or the immediate of the
// control word; each unit's write port takes FU1, FU2, FU3, the data-memory
// read data or the immediate. The data memory's address and write data are
// picked from the read ports in the same way. Everything is combinational
// from the register read to the register write at the end of the state, so
// one control word is one clock cycle.
//
// Slot contents (dct_pkg): Reg1 = A, 8, Addr26, Addr27, T10, T11;
// Reg2 = B, i, T3, T6, T8, T9; Reg3 = sum, j, k, T5, T12;
// Reg4 = C, Addr28, T2, T4, T7. Reset places the matrix base addresses
// A_BASE, B_BASE, C_BASE and the constant N (= 8, the matrix size) in
// their slots.
//
// The units, their kinds and the binding are the design's; the operand and
// write-source multiplexers are built as full selections among all read
// ports, a superset of the connections the program uses.
module dct_datapath
  import dct_pkg::*;
#(
  parameter int unsigned W      = 32,
  parameter int unsigned N      = 8,
  parameter int unsigned A_BASE = 0,
  parameter int unsigned B_BASE = 64,
  parameter int unsigned C_BASE = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cword_t       cw,
  input  logic [W-1:0] mem_rdata,
  output logic [W-1:0] mem_addr,
  output logic [W-1:0] mem_wdata,
  output logic         mem_we,
  output logic         flag
);

  localparam int unsigned D1 = 6;
  localparam int unsigned D2 = 6;
  localparam int unsigned D3 = 5;
  localparam int unsigned D4 = 5;

  localparam logic [D1*W-1:0] INIT1 = {{(D1-2)*W{1'b0}}, W'(N), W'(A_BASE)};
  localparam logic [D2*W-1:0] INIT2 = {{(D2-1)*W{1'b0}}, W'(B_BASE)};
  localparam logic [D3*W-1:0] INIT3 = '0;
  localparam logic [D4*W-1:0] INIT4 = {{(D4-1)*W{1'b0}}, W'(C_BASE)};

  logic [NBANK-1:0][W-1:0] rd;     // read ports of Reg1..Reg4
  logic [NBANK-1:0][W-1:0] wd;     // write data of Reg1..Reg4
  logic [W-1:0]            imm;
  logic [W-1:0]            fu1_a, fu1_b, fu1_y;
  logic [W-1:0]            fu2_a, fu2_b, fu2_y;
  logic [W-1:0]            fu3_a, fu3_b, fu3_y;

  assign imm = W'(cw.imm);

  function automatic logic [W-1:0] pick(src_e s, logic [NBANK-1:0][W-1:0] r,
                                        logic [W-1:0] im);
    unique case (s)
      SRC_R1:  return r[0];
      SRC_R2:  return r[1];
      SRC_R3:  return r[2];
      SRC_R4:  return r[3];
      default: return im;
    endcase
  endfunction

  always_comb begin
    fu1_a     = pick(cw.fu1_a, rd, imm);
    fu1_b     = pick(cw.fu1_b, rd, imm);
    fu2_a     = pick(cw.fu2_a, rd, imm);
    fu2_b     = pick(cw.fu2_b, rd, imm);
    fu3_a     = pick(cw.fu3_a, rd, imm);
    fu3_b     = pick(cw.fu3_b, rd, imm);
    mem_addr  = pick(cw.mem_addr, rd, imm);
    mem_wdata = pick(cw.mem_wdata, rd, imm);
    mem_we    = cw.mem_we;
  end

  always_comb begin
    for (int b = 0; b < int'(NBANK); b++) begin
      unique case (wsrc_e'(cw.wsrc[b]))
        WR_FU1:  wd[b] = fu1_y;
        WR_FU2:  wd[b] = fu2_y;
        WR_FU3:  wd[b] = fu3_y;
        WR_MEM:  wd[b] = mem_rdata;
        default: wd[b] = imm;
      endcase
    end
  end

  reg_bank #(.W(W), .DEPTH(D1), .AW(RA_W), .INIT(INIT1)) u_reg1 (
    .clk, .rst_n, .ra(cw.ra[0]), .rdata(rd[0]),
    .we(cw.we[0]), .wa(cw.wa[0]), .wdata(wd[0]));
  reg_bank #(.W(W), .DEPTH(D2), .AW(RA_W), .INIT(INIT2)) u_reg2 (
    .clk, .rst_n, .ra(cw.ra[1]), .rdata(rd[1]),
    .we(cw.we[1]), .wa(cw.wa[1]), .wdata(wd[1]));
  reg_bank #(.W(W), .DEPTH(D3), .AW(RA_W), .INIT(INIT3)) u_reg3 (
    .clk, .rst_n, .ra(cw.ra[2]), .rdata(rd[2]),
    .we(cw.we[2]), .wa(cw.wa[2]), .wdata(wd[2]));
  reg_bank #(.W(W), .DEPTH(D4), .AW(RA_W), .INIT(INIT4)) u_reg4 (
    .clk, .rst_n, .ra(cw.ra[3]), .rdata(rd[3]),
    .we(cw.we[3]), .wa(cw.wa[3]), .wdata(wd[3]));

  fu_addmul #(.W(W)) u_fu1 (.op(cw.fu1_op), .a(fu1_a), .b(fu1_b), .y(fu1_y));
  fu_add    #(.W(W)) u_fu2 (.a(fu2_a), .b(fu2_b), .y(fu2_y));
  fu_comp   #(.W(W)) u_fu3 (.a(fu3_a), .b(fu3_b), .lt(flag), .y(fu3_y));

endmodule

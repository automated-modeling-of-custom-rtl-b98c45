// dct_processor: custom processor for the DCT matrix product, top level.
//
// Runs the DCT kernel C = A x B on 8x8 matrices of W-bit integers held in the
// single-port data memory (A at A_BASE, B at B_BASE, result C at C_BASE, row
// major, one element per word). A two-dimensional DCT of a block X is two
// runs: Y = T x X, then Z = Y x T', where T is the (scaled) cosine matrix.
//
// Structure: ctrl_unit (program counter and program words) drives
// dct_datapath (register units Reg1..Reg4, FU1 add/mul, FU2 add, FU3 compare)
// every cycle; the datapath reaches dmem through its one port. There is no
// instruction decoding.
//
// Interface: pulse start for one cycle while busy is low; busy is then high
// for exactly 6314 cycles with the default sizes, and done pulses once in the
// cycle after. While busy is low the memory port belongs to the host port
// (host_addr/host_we/host_wdata, host_rdata read combinationally), which is
// how matrices are loaded and results read; host accesses while busy are
// ignored. The host port is this design's addition; the datapath, its
// binding and the cycle count follow the design.
module dct_processor
  import dct_pkg::*;
#(
  parameter int unsigned W          = 32,
  parameter int unsigned N          = 8,
  parameter int unsigned DMEM_DEPTH = 192,
  parameter int unsigned A_BASE     = 0,
  parameter int unsigned B_BASE     = 64,
  parameter int unsigned C_BASE     = 128,
  parameter int unsigned DMEM_AW    = $clog2(DMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  input  logic               host_we,
  input  logic [DMEM_AW-1:0] host_addr,
  input  logic [W-1:0]       host_wdata,
  output logic [W-1:0]       host_rdata
);

  cword_t            cw;
  logic [PC_W-1:0]   pc;
  logic              flag;
  logic [W-1:0]      dp_addr, dp_wdata, mem_rdata, mem_wdata;
  logic              dp_we, mem_we;
  logic [DMEM_AW-1:0] mem_addr;

  ctrl_unit u_ctrl (
    .clk, .rst_n, .start, .flag, .cw, .pc, .busy, .done);

  dct_datapath #(
    .W(W), .N(N), .A_BASE(A_BASE), .B_BASE(B_BASE), .C_BASE(C_BASE)
  ) u_dp (
    .clk, .rst_n, .cw, .mem_rdata,
    .mem_addr(dp_addr), .mem_wdata(dp_wdata), .mem_we(dp_we), .flag);

  // The single memory port: the datapath while running, the host otherwise.
  always_comb begin
    if (busy) begin
      mem_addr  = DMEM_AW'(dp_addr);
      mem_wdata = dp_wdata;
      mem_we    = dp_we;
    end else begin
      mem_addr  = host_addr;
      mem_wdata = host_wdata;
      mem_we    = host_we;
    end
  end

  assign host_rdata = mem_rdata;

  dmem #(.W(W), .DEPTH(DMEM_DEPTH), .AW(DMEM_AW)) u_dmem (
    .clk, .addr(mem_addr), .we(mem_we), .wdata(mem_wdata), .rdata(mem_rdata));

  // Every datapath memory access is inside the memory.
  logic dp_rd;
  always_comb begin
    dp_rd = 1'b0;
    for (int b = 0; b < int'(NBANK); b++)
      if (cw.we[b] && wsrc_e'(cw.wsrc[b]) == WR_MEM) dp_rd = 1'b1;
  end

  a_dp_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (busy && (dp_we || dp_rd)) |-> (dp_addr < W'(DMEM_DEPTH)));

endmodule

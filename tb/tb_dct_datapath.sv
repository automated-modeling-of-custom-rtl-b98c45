// tb_dct_datapath: the datapath driven directly with program words, without
// the controller. A memory model here answers reads combinationally and
// records writes. The test sets i, j, k, sum with immediate writes, runs the
// eight states of the inner-loop body and checks every temporary the
// schedule defines (T6, T3, T7, T4, Addr27, Addr26, T8, T5, T9, T10, sum)
// against values computed here, then the four states of the store block
// (address and data of the write), and the comparator flag of the k-loop
// test for k = 7 and k = 8. Repeated for random indices and data.
module tb_dct_datapath;
  import dct_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  cword_t cw;
  logic [31:0] mem_rdata, mem_addr, mem_wdata;
  logic mem_we, flag;
  logic [31:0] mem [256];
  int checks = 0, failures = 0;

  dct_datapath dut (.*);

  always #5 clk = ~clk;
  assign mem_rdata = mem[mem_addr[7:0]];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Write an immediate into one slot.
  task automatic set(input int unsigned bank, input logic [2:0] slot, input logic [7:0] v);
    @(negedge clk);
    cw = nop_word();
    cw = wr(cw, bank, slot, WR_IMM);
    cw.imm = v;
    @(posedge clk);
  endtask

  task automatic exec(input logic [PC_W-1:0] p);
    @(negedge clk);
    cw = program_word(p);
    @(posedge clk);
  endtask

  function automatic logic [31:0] peek(input int unsigned bank, input logic [RA_W-1:0] slot);
    case (bank)
      0: return dut.u_reg1.mem[slot];
      1: return dut.u_reg2.mem[slot];
      2: return dut.u_reg3.mem[slot];
      default: return dut.u_reg4.mem[slot];
    endcase
  endfunction

  initial begin
    int i, j, k, sum0;
    int ea, eb, prod;
    bit wrote;
    logic [31:0] waddr, wdat;
    cw = nop_word();
    foreach (mem[a]) mem[a] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(peek(0, R1_EIGHT) == 8 && peek(0, R1_A) == 0 && peek(1, R2_B) == 64 && peek(3, R4_C) == 128,
          "reset constants");
    for (int n = 0; n < 40; n++) begin
      i = $urandom_range(7); j = $urandom_range(7); k = $urandom_range(7);
      sum0 = $urandom_range(200);
      set(1, R2_I, 8'(i));
      set(2, R3_J, 8'(j));
      set(2, R3_K, 8'(k));
      set(2, R3_SUM, 8'(sum0));
      // inner-loop body
      for (int s = 0; s < 8; s++) begin
        exec(PC_BB7 + 5'(s));
        #1;
        case (s)
          0: check(peek(1, R2_T6) == 32'(i*8), "T6 = i*8");
          1: check(peek(1, R2_T3) == 32'(k*8) && peek(3, R4_T7) == 32'(i*8 + k), "T3, T7");
          2: check(peek(3, R4_T4) == 32'(k*8 + j) && peek(0, R1_ADDR27) == 32'(i*8 + k), "T4, Addr27");
          3: check(peek(0, R1_ADDR26) == 32'(64 + k*8 + j) && peek(1, R2_T8) == mem[i*8 + k], "Addr26, T8");
          4: check(peek(2, R3_T5) == mem[64 + k*8 + j], "T5");
          5: check(peek(1, R2_T9) == 32'(mem[i*8 + k] * mem[64 + k*8 + j]), "T9");
          6: check(peek(0, R1_T10) == 32'(sum0) + 32'(mem[i*8 + k] * mem[64 + k*8 + j]), "T10");
          default: check(peek(2, R3_SUM) == 32'(sum0) + 32'(mem[i*8 + k] * mem[64 + k*8 + j]), "sum");
        endcase
      end
      // store block: the fourth state writes memory
      wrote = 1'b0;
      for (int s = 0; s < 4; s++) begin
        @(negedge clk);
        cw = program_word(PC_BB10 + 5'(s));
        #1;
        if (mem_we) begin wrote = 1'b1; waddr = mem_addr; wdat = mem_wdata; end
        @(posedge clk);
      end
      check(wrote && waddr == 32'(128 + i*8 + j) &&
            wdat == 32'(sum0) + 32'(mem[i*8 + k] * mem[64 + k*8 + j]), "C[i][j] store");
      // k-loop test
      set(2, R3_K, 8'd7);
      @(negedge clk); cw = program_word(PC_BB6); #1;
      check(flag == 1'b1, "7 < 8");
      @(posedge clk);
      set(2, R3_K, 8'd8);
      @(negedge clk); cw = program_word(PC_BB6); #1;
      check(flag == 1'b0, "8 < 8 false");
      @(posedge clk); #1;
      check(peek(3, R4_T2) == 0, "T2 holds the compare result");
      // two-state increment
      exec(PC_BB8); exec(PC_BB8 + 5'd1); #1;
      check(peek(2, R3_K) == 9, "k incremented through T2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

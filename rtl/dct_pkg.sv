// dct_pkg: shared types, constants and the program of the custom DCT processor.
//
// The processor is a no-instruction-set machine: there is no instruction
// decoding, each program word is a wide control word that drives every
// multiplexer select, register write enable, functional-unit opcode and the
// data-memory strobe directly, plus a next-address field for the controller.
//
// Storage follows the register binding of the design: four register units
// (Reg1..Reg4), each a small bank with one read and one write port, holding the
// variables and constants bound to it:
//   Reg1: A, 8, Addr26, Addr27, T10, T11
//   Reg2: B, i, T3, T6, T8, T9
//   Reg3: sum, j, k, T5, T12
//   Reg4: C, Addr28, T2, T4, T7
// The slot numbers inside each bank below are this design's own choice.
//
// The program implements the matrix product C = A x B of the DCT kernel
// (three nested loops over i, j, k, each to 8) with the state schedules of
// the loop bodies: the inner body (sum += A[i][k]*B[k][j]) in 8 states for a
// 1-port data memory and the store C[i][j] = sum in 4 states. All other basic
// blocks take one state, except the k increment, which takes two (T2 = k + 1,
// then k = T2); this makes the run take 6314 cycles, the figure reported for
// this datapath. Word 0 is the entry block (i = 0); it executes in the cycle
// that accepts start, so busy stays high for 6314 cycles.
package dct_pkg;

  // Operand source of a functional unit, memory address or memory write data:
  // the read port of one of the four register units, or the immediate field.
  typedef enum logic [2:0] {
    SRC_R1  = 3'd0,
    SRC_R2  = 3'd1,
    SRC_R3  = 3'd2,
    SRC_R4  = 3'd3,
    SRC_IMM = 3'd4
  } src_e;

  // Value written into a register unit.
  typedef enum logic [2:0] {
    WR_FU1 = 3'd0,
    WR_FU2 = 3'd1,
    WR_FU3 = 3'd2,
    WR_MEM = 3'd3,
    WR_IMM = 3'd4
  } wsrc_e;

  // FU1 operation (FU1 is the combined adder/multiplier).
  typedef enum logic {
    FU1_ADD = 1'b0,
    FU1_MUL = 1'b1
  } fu1_op_e;

  // Next-address behaviour of a program word.
  typedef enum logic [1:0] {
    NXT_SEQ = 2'd0,  // pc + 1
    NXT_JMP = 2'd1,  // unconditional jump to target
    NXT_BRF = 2'd2,  // jump to target when the comparator result is false
    NXT_RET = 2'd3   // end of program: back to word 0, signal done
  } nxt_e;

  localparam int unsigned NBANK   = 4;
  localparam int unsigned RA_W    = 3;   // slot address width of a register unit
  localparam int unsigned IMM_W   = 8;
  localparam int unsigned PC_W    = 5;
  localparam int unsigned PROG_LEN = 26;

  // Slots of the register units.
  localparam logic [RA_W-1:0] R1_A      = 3'd0;
  localparam logic [RA_W-1:0] R1_EIGHT  = 3'd1;
  localparam logic [RA_W-1:0] R1_ADDR26 = 3'd2;
  localparam logic [RA_W-1:0] R1_ADDR27 = 3'd3;
  localparam logic [RA_W-1:0] R1_T10    = 3'd4;
  localparam logic [RA_W-1:0] R1_T11    = 3'd5;

  localparam logic [RA_W-1:0] R2_B      = 3'd0;
  localparam logic [RA_W-1:0] R2_I      = 3'd1;
  localparam logic [RA_W-1:0] R2_T3     = 3'd2;
  localparam logic [RA_W-1:0] R2_T6     = 3'd3;
  localparam logic [RA_W-1:0] R2_T8     = 3'd4;
  localparam logic [RA_W-1:0] R2_T9     = 3'd5;

  localparam logic [RA_W-1:0] R3_SUM    = 3'd0;
  localparam logic [RA_W-1:0] R3_J      = 3'd1;
  localparam logic [RA_W-1:0] R3_K      = 3'd2;
  localparam logic [RA_W-1:0] R3_T5     = 3'd3;
  localparam logic [RA_W-1:0] R3_T12    = 3'd4;

  localparam logic [RA_W-1:0] R4_C      = 3'd0;
  localparam logic [RA_W-1:0] R4_ADDR28 = 3'd1;
  localparam logic [RA_W-1:0] R4_T2     = 3'd2;
  localparam logic [RA_W-1:0] R4_T4     = 3'd3;
  localparam logic [RA_W-1:0] R4_T7     = 3'd4;

  // One program word.
  typedef struct packed {
    logic    [NBANK-1:0][RA_W-1:0] ra;     // read slot of each register unit
    src_e                          fu1_a;
    src_e                          fu1_b;
    fu1_op_e                       fu1_op;
    src_e                          fu2_a;
    src_e                          fu2_b;
    src_e                          fu3_a;
    src_e                          fu3_b;
    logic    [NBANK-1:0]           we;     // write enable of each register unit
    logic    [NBANK-1:0][RA_W-1:0] wa;     // write slot of each register unit
    logic    [NBANK-1:0][2:0]      wsrc;   // wsrc_e of each register unit
    src_e                          mem_addr;
    src_e                          mem_wdata;
    logic                          mem_we;
    logic    [IMM_W-1:0]           imm;
    nxt_e                          nxt;
    logic    [PC_W-1:0]            target;
  } cword_t;

  // Addresses of the basic blocks in the program (block numbers follow the
  // control-flow graph of the three-loop code).
  localparam logic [PC_W-1:0] PC_BB0  = 5'd0;   // i = 0
  localparam logic [PC_W-1:0] PC_BB1  = 5'd1;   // i < 8 ?
  localparam logic [PC_W-1:0] PC_BB2  = 5'd2;   // j = 0
  localparam logic [PC_W-1:0] PC_BB3  = 5'd3;   // j < 8 ?
  localparam logic [PC_W-1:0] PC_BB4  = 5'd4;   // sum = 0
  localparam logic [PC_W-1:0] PC_BB5  = 5'd5;   // k = 0
  localparam logic [PC_W-1:0] PC_BB6  = 5'd6;   // k < 8 ?
  localparam logic [PC_W-1:0] PC_BB7  = 5'd7;   // 8 states: sum += A[i][k]*B[k][j]
  localparam logic [PC_W-1:0] PC_BB8  = 5'd15;  // 2 states: k++
  localparam logic [PC_W-1:0] PC_BB9  = 5'd17;  // k loop end
  localparam logic [PC_W-1:0] PC_BB10 = 5'd18;  // 4 states: C[i][j] = sum
  localparam logic [PC_W-1:0] PC_BB11 = 5'd22;  // j++
  localparam logic [PC_W-1:0] PC_BB12 = 5'd23;  // j loop end
  localparam logic [PC_W-1:0] PC_BB13 = 5'd24;  // i++
  localparam logic [PC_W-1:0] PC_BB14 = 5'd25;  // i loop end, return

  // A word that does nothing and falls through.
  function automatic cword_t nop_word();
    cword_t w;
    w = '0;
    w.fu1_a = SRC_R1;  w.fu1_b = SRC_R1;  w.fu1_op = FU1_ADD;
    w.fu2_a = SRC_R1;  w.fu2_b = SRC_R1;
    w.fu3_a = SRC_R1;  w.fu3_b = SRC_R1;
    w.mem_addr = SRC_R1;  w.mem_wdata = SRC_R1;
    w.nxt = NXT_SEQ;
    return w;
  endfunction

  // Write of one register unit (bank 0..3 = Reg1..Reg4).
  function automatic cword_t wr(cword_t w, int unsigned bank, logic [RA_W-1:0] slot,
                                wsrc_e src);
    cword_t r;
    r = w;
    r.we[bank]   = 1'b1;
    r.wa[bank]   = slot;
    r.wsrc[bank] = src;
    return r;
  endfunction

  // The program memory: one control word per address.
  function automatic cword_t program_word(logic [PC_W-1:0] pc);
    cword_t w;
    w = nop_word();
    unique case (pc)
      // BB0: i = 0
      PC_BB0: begin
        w = wr(w, 1, R2_I, WR_IMM);  w.imm = 8'd0;
      end
      // BB1: T2 = i < 8; leave the i loop when false
      PC_BB1: begin
        w.ra[1] = R2_I;  w.ra[0] = R1_EIGHT;
        w.fu3_a = SRC_R2;  w.fu3_b = SRC_R1;
        w = wr(w, 3, R4_T2, WR_FU3);
        w.nxt = NXT_BRF;  w.target = PC_BB14;
      end
      // BB2: j = 0
      PC_BB2: begin
        w = wr(w, 2, R3_J, WR_IMM);  w.imm = 8'd0;
      end
      // BB3: T2 = j < 8; leave the j loop when false
      PC_BB3: begin
        w.ra[2] = R3_J;  w.ra[0] = R1_EIGHT;
        w.fu3_a = SRC_R3;  w.fu3_b = SRC_R1;
        w = wr(w, 3, R4_T2, WR_FU3);
        w.nxt = NXT_BRF;  w.target = PC_BB12;
      end
      // BB4: sum = 0
      PC_BB4: begin
        w = wr(w, 2, R3_SUM, WR_IMM);  w.imm = 8'd0;
      end
      // BB5: k = 0
      PC_BB5: begin
        w = wr(w, 2, R3_K, WR_IMM);  w.imm = 8'd0;
      end
      // BB6: T2 = k < 8; leave the k loop when false
      PC_BB6: begin
        w.ra[2] = R3_K;  w.ra[0] = R1_EIGHT;
        w.fu3_a = SRC_R3;  w.fu3_b = SRC_R1;
        w = wr(w, 3, R4_T2, WR_FU3);
        w.nxt = NXT_BRF;  w.target = PC_BB9;
      end
      // BB7 S1: T6 = i * 8                                   (FU1)
      PC_BB7: begin
        w.ra[1] = R2_I;  w.ra[0] = R1_EIGHT;
        w.fu1_a = SRC_R2;  w.fu1_b = SRC_R1;  w.fu1_op = FU1_MUL;
        w = wr(w, 1, R2_T6, WR_FU1);
      end
      // BB7 S2: T3 = k * 8 (FU1);  T7 = T6 + k (FU2)
      5'd8: begin
        w.ra[2] = R3_K;  w.ra[0] = R1_EIGHT;  w.ra[1] = R2_T6;
        w.fu1_a = SRC_R3;  w.fu1_b = SRC_R1;  w.fu1_op = FU1_MUL;
        w.fu2_a = SRC_R2;  w.fu2_b = SRC_R3;
        w = wr(w, 1, R2_T3, WR_FU1);
        w = wr(w, 3, R4_T7, WR_FU2);
      end
      // BB7 S3: T4 = T3 + j (FU2);  Addr27 = A + T7 (FU1)
      5'd9: begin
        w.ra[0] = R1_A;  w.ra[1] = R2_T3;  w.ra[2] = R3_J;  w.ra[3] = R4_T7;
        w.fu2_a = SRC_R2;  w.fu2_b = SRC_R3;
        w.fu1_a = SRC_R1;  w.fu1_b = SRC_R4;  w.fu1_op = FU1_ADD;
        w = wr(w, 3, R4_T4, WR_FU2);
        w = wr(w, 0, R1_ADDR27, WR_FU1);
      end
      // BB7 S4: Addr26 = B + T4 (FU2);  T8 = DMEM[Addr27]
      5'd10: begin
        w.ra[1] = R2_B;  w.ra[3] = R4_T4;  w.ra[0] = R1_ADDR27;
        w.fu2_a = SRC_R2;  w.fu2_b = SRC_R4;
        w.mem_addr = SRC_R1;
        w = wr(w, 0, R1_ADDR26, WR_FU2);
        w = wr(w, 1, R2_T8, WR_MEM);
      end
      // BB7 S5: T5 = DMEM[Addr26]
      5'd11: begin
        w.ra[0] = R1_ADDR26;
        w.mem_addr = SRC_R1;
        w = wr(w, 2, R3_T5, WR_MEM);
      end
      // BB7 S6: T9 = T8 * T5                                 (FU1)
      5'd12: begin
        w.ra[1] = R2_T8;  w.ra[2] = R3_T5;
        w.fu1_a = SRC_R2;  w.fu1_b = SRC_R3;  w.fu1_op = FU1_MUL;
        w = wr(w, 1, R2_T9, WR_FU1);
      end
      // BB7 S7: T10 = sum + T9                               (FU2)
      5'd13: begin
        w.ra[2] = R3_SUM;  w.ra[1] = R2_T9;
        w.fu2_a = SRC_R3;  w.fu2_b = SRC_R2;
        w = wr(w, 0, R1_T10, WR_FU2);
      end
      // BB7 S8: sum = T10 (copy through FU2, adding 0)
      5'd14: begin
        w.ra[0] = R1_T10;
        w.fu2_a = SRC_R1;  w.fu2_b = SRC_IMM;  w.imm = 8'd0;
        w = wr(w, 2, R3_SUM, WR_FU2);
      end
      // BB8 a: T2 = k + 1                                    (FU2)
      PC_BB8: begin
        w.ra[2] = R3_K;
        w.fu2_a = SRC_R3;  w.fu2_b = SRC_IMM;  w.imm = 8'd1;
        w = wr(w, 3, R4_T2, WR_FU2);
      end
      // BB8 b: k = T2, back to the k loop condition
      5'd16: begin
        w.ra[3] = R4_T2;
        w.fu2_a = SRC_R4;  w.fu2_b = SRC_IMM;  w.imm = 8'd0;
        w = wr(w, 2, R3_K, WR_FU2);
        w.nxt = NXT_JMP;  w.target = PC_BB6;
      end
      // BB9: end of the k loop
      PC_BB9: ;
      // BB10 S1: T11 = i * 8                                 (FU1)
      PC_BB10: begin
        w.ra[1] = R2_I;  w.ra[0] = R1_EIGHT;
        w.fu1_a = SRC_R2;  w.fu1_b = SRC_R1;  w.fu1_op = FU1_MUL;
        w = wr(w, 0, R1_T11, WR_FU1);
      end
      // BB10 S2: T12 = T11 + j                               (FU2)
      5'd19: begin
        w.ra[0] = R1_T11;  w.ra[2] = R3_J;
        w.fu2_a = SRC_R1;  w.fu2_b = SRC_R3;
        w = wr(w, 2, R3_T12, WR_FU2);
      end
      // BB10 S3: Addr28 = C + T12                            (FU2)
      5'd20: begin
        w.ra[3] = R4_C;  w.ra[2] = R3_T12;
        w.fu2_a = SRC_R4;  w.fu2_b = SRC_R3;
        w = wr(w, 3, R4_ADDR28, WR_FU2);
      end
      // BB10 S4: DMEM[Addr28] = sum
      5'd21: begin
        w.ra[3] = R4_ADDR28;  w.ra[2] = R3_SUM;
        w.mem_addr = SRC_R4;  w.mem_wdata = SRC_R3;  w.mem_we = 1'b1;
      end
      // BB11: j = j + 1, back to the j loop condition         (FU2)
      PC_BB11: begin
        w.ra[2] = R3_J;
        w.fu2_a = SRC_R3;  w.fu2_b = SRC_IMM;  w.imm = 8'd1;
        w = wr(w, 2, R3_J, WR_FU2);
        w.nxt = NXT_JMP;  w.target = PC_BB3;
      end
      // BB12: end of the j loop
      PC_BB12: ;
      // BB13: i = i + 1, back to the i loop condition         (FU2)
      PC_BB13: begin
        w.ra[1] = R2_I;
        w.fu2_a = SRC_R2;  w.fu2_b = SRC_IMM;  w.imm = 8'd1;
        w = wr(w, 1, R2_I, WR_FU2);
        w.nxt = NXT_JMP;  w.target = PC_BB1;
      end
      // BB14: end of the i loop; return
      PC_BB14: begin
        w.nxt = NXT_RET;
      end
      default: begin
        w.nxt = NXT_RET;
      end
    endcase
    return w;
  endfunction

endpackage

// ctrl_unit: the control unit of the DCT processor.
//
// A no-instruction-set controller: a program counter addresses the program
// memory (dct_pkg::program_word, one wide control word per state of the
// scheduled code) and the word drives the datapath directly. The word's next
// field chooses the following address: pc + 1, an unconditional jump, a
// branch taken when the comparator flag of the same state is false (leaving
// a loop), or return.
//
// Protocol: while idle the counter rests on word 0, the entry block (i = 0),
// and the word's writes are suppressed. A one-cycle start executes word 0 and
// raises busy; busy stays high while words 1.. run, and the return word
// drops it and sends the counter back to 0. done pulses for one cycle in the
// cycle after the return word. start is ignored while busy.
//
// Ports: cw is the control word of the current state with its write enables
// already gated; flag is the comparator result; pc is exposed for
// observation. The program and the split of the work into states follow the
// design's schedules; the start/busy/done handshake is this design's choice.
module ctrl_unit
  import dct_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            flag,
  output cword_t          cw,
  output logic [PC_W-1:0] pc,
  output logic            busy,
  output logic            done
);

  cword_t          word;
  logic            active;
  logic [PC_W-1:0] pc_next;

  always_comb begin
    word   = program_word(pc);
    active = busy || start;
    cw     = word;
    if (!active) begin
      cw.we     = '0;
      cw.mem_we = 1'b0;
    end
  end

  always_comb begin
    pc_next = pc + 1'b1;
    unique case (word.nxt)
      NXT_SEQ: pc_next = pc + 1'b1;
      NXT_JMP: pc_next = word.target;
      NXT_BRF: pc_next = flag ? pc + 1'b1 : word.target;
      NXT_RET: pc_next = '0;
      default: pc_next = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc   <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        pc <= pc_next;
        if (word.nxt == NXT_RET) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        pc   <= pc_next;
        busy <= 1'b1;
      end
    end
  end

  // The counter never leaves the program while running.
  a_pc_in_program: assert property (@(posedge clk) disable iff (!rst_n)
                                    busy |-> (int'(pc) < int'(PROG_LEN)));
  // Idle means resting on the entry word.
  a_idle_at_entry: assert property (@(posedge clk) disable iff (!rst_n)
                                    !busy |-> (pc == '0));

endmodule

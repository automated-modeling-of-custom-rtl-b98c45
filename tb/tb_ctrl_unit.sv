// tb_ctrl_unit: the control unit on its own. The comparator flag is supplied
// by a model of the three loop counters kept here: it watches which block
// the controller is in (init, compare, increment words) and answers each
// compare with counter < 8. Checks: 6314 busy cycles, the number of visits
// of every block (BB1 9, BB3 72, BB6 576, BB7 512, BB8 512, BB10 64, ...),
// no register or memory write enable while idle, a single done pulse, the
// counter back at 0, and a second start giving the same count.
module tb_ctrl_unit;
  import dct_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, flag;
  cword_t cw;
  logic [PC_W-1:0] pc;
  logic busy, done;
  int checks = 0, failures = 0;
  int i_c, j_c, k_c;
  int unsigned visits [PROG_LEN];
  int unsigned nbusy, ndone;

  ctrl_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Loop-counter model answering the compares.
  always_comb begin
    unique case (pc)
      PC_BB1:  flag = i_c < 8;
      PC_BB3:  flag = j_c < 8;
      PC_BB6:  flag = k_c < 8;
      default: flag = 1'b0;
    endcase
  end

  always @(posedge clk) begin
    if (busy || start) begin
      visits[pc]++;
      case (pc)
        PC_BB0:  i_c <= 0;
        PC_BB2:  j_c <= 0;
        PC_BB5:  k_c <= 0;
        PC_BB8 + 5'd1: k_c <= k_c + 1;
        PC_BB11: j_c <= j_c + 1;
        PC_BB13: i_c <= i_c + 1;
        default: ;
      endcase
    end
    if (busy) nbusy++;
    if (done) ndone++;
    if (rst_n && !busy && !start)
      if (cw.we != '0 || cw.mem_we) begin
        failures++;
        $display("FAIL: write enable while idle");
      end
  end

  task automatic one_run();
    nbusy = 0; ndone = 0;
    foreach (visits[p]) visits[p] = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (!busy);
    repeat (3) @(negedge clk);
    check(nbusy == 6314, $sformatf("busy for %0d cycles", nbusy));
    check(ndone == 1, $sformatf("done pulsed %0d times", ndone));
    check(pc == '0, "counter back at entry");
    check(visits[PC_BB0] == 1,   "BB0 visits");
    check(visits[PC_BB1] == 9,   "BB1 visits");
    check(visits[PC_BB2] == 8,   "BB2 visits");
    check(visits[PC_BB3] == 72,  "BB3 visits");
    check(visits[PC_BB4] == 64,  "BB4 visits");
    check(visits[PC_BB6] == 576, "BB6 visits");
    for (int s = 0; s < 8; s++)
      check(visits[PC_BB7 + 5'(s)] == 512, $sformatf("BB7 state %0d visits %0d", s, visits[PC_BB7 + 5'(s)]));
    check(visits[PC_BB8] == 512 && visits[PC_BB8 + 5'd1] == 512, "BB8 visits");
    check(visits[PC_BB9] == 64, "BB9 visits");
    for (int s = 0; s < 4; s++)
      check(visits[PC_BB10 + 5'(s)] == 64, "BB10 visits");
    check(visits[PC_BB11] == 64 && visits[PC_BB12] == 8 && visits[PC_BB13] == 8
          && visits[PC_BB14] == 1, "BB11..BB14 visits");
  endtask

  initial begin
    i_c = 0; j_c = 0; k_c = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!busy && pc == '0, "idle after reset");
    one_run();
    one_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

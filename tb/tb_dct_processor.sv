// tb_dct_processor: end-to-end test of the DCT processor at its default sizes.
//
// Loads matrices through the host port, pulses start, measures how long busy
// stays high (must be 6314 cycles) and reads C back. Three runs:
//   1. C = A x B with random signed operands, compared with a product
//      computed here;
//   2./3. a two-dimensional 8x8 DCT of a random pixel block X done as two
//      passes, Y = T x X and then Z = Y x T', with T the cosine matrix scaled
//      by 64 and rounded, T[u][x] = round(64 c(u) cos((2x+1) u pi / 16)),
//      c(0) = sqrt(1/8), c(u>0) = 1/2; Z is compared with the same product
//      computed here in 64-bit integers.
// Also checks that start and host writes are ignored while busy and that
// done pulses once per run, and counts the mechanisms of the run (loop
// exits of each loop, FU1 used as adder and as multiplier, memory reads and
// writes, the two-state k increment); each must occur.
module tb_dct_processor;
  import dct_pkg::*;

  localparam int unsigned CYCLES = 6314;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        busy, done;
  logic        host_we = 1'b0;
  logic [7:0]  host_addr = '0;
  logic [31:0] host_wdata = '0;
  logic [31:0] host_rdata;

  int checks = 0;
  int failures = 0;

  int unsigned n_exit_i = 0, n_exit_j = 0, n_exit_k = 0;
  int unsigned n_fu1_add = 0, n_fu1_mul = 0, n_mem_rd = 0, n_mem_wr = 0;
  int unsigned n_kinc = 0, n_done = 0, n_start_ignored = 0;

  dct_processor dut (
    .clk, .rst_n, .start, .busy, .done,
    .host_we, .host_addr, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled on the executing control word.
  always @(posedge clk) begin
    if (rst_n && busy) begin
      if (dut.u_ctrl.pc == PC_BB1 && !dut.flag) n_exit_i++;
      if (dut.u_ctrl.pc == PC_BB3 && !dut.flag) n_exit_j++;
      if (dut.u_ctrl.pc == PC_BB6 && !dut.flag) n_exit_k++;
      if (dut.cw.we != '0) begin
        for (int b = 0; b < 4; b++)
          if (dut.cw.we[b] && dut.cw.wsrc[b] == 3'(WR_FU1)) begin
            if (dut.cw.fu1_op == FU1_MUL) n_fu1_mul++; else n_fu1_add++;
          end
        for (int b = 0; b < 4; b++)
          if (dut.cw.we[b] && dut.cw.wsrc[b] == 3'(WR_MEM)) n_mem_rd++;
      end
      if (dut.cw.mem_we) n_mem_wr++;
      if (dut.u_ctrl.pc == PC_BB8) n_kinc++;
    end
    if (rst_n && done) n_done++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic host_write(input int unsigned a, input int d);
    @(negedge clk);
    host_addr = 8'(a); host_wdata = d; host_we = 1'b1;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic host_read(input int unsigned a, output int d);
    @(negedge clk);
    host_addr = 8'(a);
    #1 d = host_rdata;
  endtask

  // Run the processor once; returns the number of busy cycles.
  task automatic run(output int unsigned n, input bit poke_while_busy);
    int unsigned guard;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 0;
    guard = 0;
    while (busy && guard < 20000) begin
      n++;
      guard++;
      if (poke_while_busy && n == 100) begin
        // start while busy: must be ignored
        start = 1'b1;
        n_start_ignored++;
      end else if (poke_while_busy && n == 101) begin
        start = 1'b0;
        // host write to the result area while busy: must be ignored
        host_addr = 8'd128; host_wdata = 32'h5a5a5a5a; host_we = 1'b1;
      end else begin
        start = 1'b0;
        host_we = 1'b0;
      end
      @(negedge clk);
    end
    host_we = 1'b0;
  endtask

  int a_m [8][8];
  int b_m [8][8];
  int t_m [8][8];
  int x_m [8][8];
  longint ref_y [8][8];
  longint ref_z [8][8];
  int unsigned cyc;
  int d;
  bit ok;
  real cu, v;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // ---- run 1: random product --------------------------------------
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        a_m[r][c] = int'($urandom_range(4095)) - 2048;
        b_m[r][c] = int'($urandom_range(4095)) - 2048;
        host_write(0 + r*8 + c, a_m[r][c]);
        host_write(64 + r*8 + c, b_m[r][c]);
      end
    run(cyc, 1'b1);
    check(cyc == CYCLES, $sformatf("run 1 took %0d cycles, expected %0d", cyc, CYCLES));
    ok = 1'b1;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        longint s;
        s = 0;
        for (int k = 0; k < 8; k++) s += longint'(a_m[r][k]) * longint'(b_m[k][c]);
        host_read(128 + r*8 + c, d);
        check(d == int'(s), $sformatf("run 1 C[%0d][%0d] = %0d, expected %0d", r, c, d, s));
      end
    check(n_done == 1, "done pulsed once after run 1");

    // ---- runs 2 and 3: two-dimensional DCT -------------------------
    for (int u = 0; u < 8; u++) begin
      cu = (u == 0) ? $sqrt(1.0/8.0) : 0.5;
      for (int x = 0; x < 8; x++) begin
        v = 64.0 * cu * $cos(real'((2*x + 1) * u) * 3.14159265358979 / 16.0);
        t_m[u][x] = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
      end
    end
    check(t_m[0][0] == 23 && t_m[1][0] == 31 && t_m[4][1] == -23,
          "cosine matrix entries");
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) x_m[r][c] = int'($urandom_range(255));
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        ref_y[r][c] = 0;
        for (int k = 0; k < 8; k++) ref_y[r][c] += longint'(t_m[r][k]) * longint'(x_m[k][c]);
      end
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        ref_z[r][c] = 0;
        for (int k = 0; k < 8; k++) ref_z[r][c] += ref_y[r][k] * longint'(t_m[c][k]);
      end

    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        host_write(0 + r*8 + c, t_m[r][c]);
        host_write(64 + r*8 + c, x_m[r][c]);
      end
    run(cyc, 1'b0);
    check(cyc == CYCLES, $sformatf("run 2 took %0d cycles", cyc));
    // Move Y into A and T' into B for the second pass.
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        host_read(128 + r*8 + c, d);
        check(longint'(d) == ref_y[r][c], $sformatf("Y[%0d][%0d] = %0d, expected %0d", r, c, d, ref_y[r][c]));
        host_write(0 + r*8 + c, d);
        host_write(64 + r*8 + c, t_m[c][r]);
      end
    run(cyc, 1'b0);
    check(cyc == CYCLES, $sformatf("run 3 took %0d cycles", cyc));
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        host_read(128 + r*8 + c, d);
        check(longint'(d) == ref_z[r][c], $sformatf("Z[%0d][%0d] = %0d, expected %0d", r, c, d, ref_z[r][c]));
      end
    check(n_done == 3, $sformatf("done pulsed %0d times over three runs", n_done));

    // ---- mechanisms ---------------------------------------------------
    $display("mechanisms: i-exits=%0d j-exits=%0d k-exits=%0d fu1-add=%0d fu1-mul=%0d mem-rd=%0d mem-wr=%0d k-inc=%0d start-ignored=%0d",
             n_exit_i, n_exit_j, n_exit_k, n_fu1_add, n_fu1_mul, n_mem_rd, n_mem_wr, n_kinc, n_start_ignored);
    check(n_exit_i == 3, "i loop left once per run");
    check(n_exit_j == 3*8, "j loop left 8 times per run");
    check(n_exit_k == 3*64, "k loop left 64 times per run");
    check(n_fu1_add == 3*512, "FU1 used as adder once per inner iteration");
    check(n_fu1_mul == 3*(3*512 + 64), "FU1 used as multiplier");
    check(n_mem_rd == 3*2*512, "two memory reads per inner iteration");
    check(n_mem_wr == 3*64, "one memory write per result");
    check(n_kinc == 3*512, "two-state k increment");
    check(n_start_ignored == 1, "start while busy exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

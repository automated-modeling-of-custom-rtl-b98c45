// tb_reg_bank: checks one register unit (reg_bank) against a model array.
// Reset values come from INIT; then random reads and writes, including a
// read of the slot being written in the same cycle (old value must be seen),
// and writes to out-of-range slots are not issued (the unit asserts on them).
module tb_reg_bank;
  localparam int unsigned W = 32, DEPTH = 6, AW = 3;
  localparam logic [DEPTH*W-1:0] INIT = {32'd0, 32'd0, 32'd0, 32'd0, 32'd8, 32'd64};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] ra = '0, wa = '0;
  logic [W-1:0] rdata, wdata = '0;
  logic we = 1'b0;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  reg_bank #(.W(W), .DEPTH(DEPTH), .AW(AW), .INIT(INIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < int'(DEPTH); s++) model[s] = INIT[s*W +: W];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < int'(DEPTH); s++) begin
      ra = AW'(s); #1;
      checks++;
      if (rdata !== model[s]) begin failures++; $display("FAIL reset slot %0d: %0d", s, rdata); end
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = 1'($urandom_range(1));
      wa = AW'($urandom_range(DEPTH-1));
      wdata = $urandom;
      ra = (n % 5 == 0) ? wa : AW'($urandom_range(DEPTH-1));
      #1;
      checks++;
      if (rdata !== model[ra]) begin failures++; $display("FAIL read slot %0d: %h vs %h", ra, rdata, model[ra]); end
      @(posedge clk);
      if (we) model[wa] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int s = 0; s < int'(DEPTH); s++) begin
      ra = AW'(s); #1;
      checks++;
      if (rdata !== model[s]) begin failures++; $display("FAIL final slot %0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dmem: the single-port data memory against a model array: writes on the
// clock edge, combinational reads, reads of the address written in the same
// cycle (old data), and out-of-range addresses read as 0.
module tb_dmem;
  localparam int unsigned DEPTH = 192, AW = 8;
  logic clk = 1'b0;
  logic [AW-1:0] addr = '0;
  logic we = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  dmem #(.W(32), .DEPTH(DEPTH), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < int'(DEPTH); a++) begin
      @(negedge clk);
      addr = AW'(a); wdata = $urandom; we = 1'b1;
      model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      addr = AW'($urandom_range(255));
      we = 1'($urandom_range(1));
      wdata = $urandom;
      #1;
      checks++;
      if (int'(addr) < int'(DEPTH)) begin
        if (rdata !== model[addr]) begin failures++; $display("FAIL rd %0d", addr); end
        if (we) model[addr] = wdata;
      end else if (rdata !== 32'd0) begin
        failures++; $display("FAIL out-of-range read %0d", addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fu_add: FU2 against a + b (modulo 2^32), directed and random operands.
module tb_fu_add;
  logic [31:0] a, b, y, e;
  int checks = 0, failures = 0;

  fu_add #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      if (n == 0) begin a = 32'hffff_ffff; b = 32'd1; end
      else begin a = $urandom; b = (n % 3 == 0) ? 32'd0 : $urandom; end
      #1;
      e = 32'(longint'(a) + longint'(b));
      checks++;
      if (y !== e) begin failures++; $display("FAIL %h + %h -> %h", a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

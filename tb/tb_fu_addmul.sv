// tb_fu_addmul: FU1 against a + b and a * b (low 32 bits) for directed and
// random operands, both opcodes.
module tb_fu_addmul;
  logic op;
  logic [31:0] a, b, y, e;
  int checks = 0, failures = 0;

  fu_addmul #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      op = 1'(n % 2);
      if (n < 8) begin
        a = (n < 4) ? 32'd7 : 32'hffff_fffd;  // 7 or -3
        b = 32'd8;
      end else begin
        a = $urandom; b = $urandom;
      end
      #1;
      e = op ? 32'(longint'(a) * longint'(b)) : 32'(longint'(a) + longint'(b));
      checks++;
      if (y !== e) begin failures++; $display("FAIL op=%0d %h %h -> %h exp %h", op, a, b, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

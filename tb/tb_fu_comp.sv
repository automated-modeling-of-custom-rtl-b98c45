// tb_fu_comp: FU3 signed less-than, flag and zero-extended word, with the
// loop-bound cases (7 < 8, 8 < 8), negative operands and random ones.
module tb_fu_comp;
  logic [31:0] a, b, y;
  logic lt, e;
  int checks = 0, failures = 0;

  fu_comp #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      case (n)
        0: begin a = 32'd7; b = 32'd8; end
        1: begin a = 32'd8; b = 32'd8; end
        2: begin a = 32'hffff_ffff; b = 32'd0; end
        3: begin a = 32'd0; b = 32'hffff_ffff; end
        default: begin a = $urandom; b = (n % 10 == 0) ? a : $urandom; end
      endcase
      #1;
      e = (int'(a) < int'(b));
      checks++;
      if (lt !== e || y !== {31'd0, e}) begin failures++; $display("FAIL %h < %h -> %b", a, b, lt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

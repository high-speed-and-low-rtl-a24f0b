// tb_vedic_4x4: exhaustive self-check of the 4x4 Vedic multiplier.
// All 256 operand pairs; p must equal a * b. The worked example
// 4'b1111 * 4'b1010 = 8'b10010110 is checked on its own first.
module tb_vedic_4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int         checks = 0, failures = 0;

  vedic_4x4 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 4'b1111;
    b = 4'b1010;
    #1;
    checks++;
    if (p !== 8'b1001_0110) begin
      failures++;
      $display("FAIL worked example: got %b", p);
    end
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if (int'(p) != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rca_adder: self-check of rca_adder at its default 4-bit width.
// All 512 combinations of a, b and ci are applied; {co, s} must equal
// a + b + ci. The count of results whose carry rippled through all four
// stages (a + b = 15 with ci = 1) is reported and must be non-zero.
module tb_rca_adder;
  localparam int W = 4;
  logic [W-1:0] a, b, s;
  logic         ci, co;
  int           checks = 0, failures = 0, full_ripples = 0;

  rca_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2*W+1)); i++) begin
      {a, b, ci} = (2*W+1)'(i);
      #1;
      checks++;
      if ({co, s} !== (W+1)'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%h b=%h ci=%0d -> co=%0d s=%h", a, b, ci, co, s);
      end
      if (ci && (int'(a) + int'(b) == (1 << W) - 1)) full_ripples++;
    end
    $display("full-length ripples: %0d", full_ripples);
    checks++;
    if (full_ripples == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

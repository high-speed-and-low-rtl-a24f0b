// tb_mux2: self-check of mux2 at the default 1-bit width (exhaustive) and at
// 8 bits (random words): y must equal d1 when sel is 1 and d0 otherwise.
module tb_mux2;
  logic       d0, d1, sel, y;
  logic [7:0] w0, w1, wy;
  logic       wsel;
  int         checks = 0, failures = 0;

  mux2 dut (.d0(d0), .d1(d1), .sel(sel), .y(y));
  mux2 #(.WIDTH(8)) dut8 (.d0(w0), .d1(w1), .sel(wsel), .y(wy));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {d0, d1, sel} = 3'(i);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL d0=%0d d1=%0d sel=%0d -> y=%0d", d0, d1, sel, y);
      end
    end
    for (int i = 0; i < 200; i++) begin
      w0   = 8'($urandom);
      w1   = 8'($urandom);
      wsel = 1'($urandom);
      #1;
      checks++;
      if (wy !== (wsel ? w1 : w0)) begin
        failures++;
        $display("FAIL w0=%h w1=%h sel=%0d -> y=%h", w0, w1, wsel, wy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

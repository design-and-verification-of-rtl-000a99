// vedic_4x4_tb: exhaustive self-checking test of the 4x4 Vedic
// multiplier. Every operand pair is applied and p is compared with integer
// a*b. A watchdog ends the run with a failure if it hangs.
module vedic_4x4_tb;
  localparam int W = 4;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  vedic_4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * W)); i++) begin
      {a, b} = (2*W)'(i);
      #1;
      checks++;
      if (p != (2*W)'(int'(a) * int'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d -> %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// vedic_16x16_tb: self-checking test of the 16x16 Vedic multiplier.
// Corner operands (0, 1, all ones, single high bits) and 20000 random pairs
// are applied and p is compared with integer a*b. A watchdog ends the run
// with a failure if it hangs.
module vedic_16x16_tb;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  localparam logic [15:0] CORNER [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h00FF, 16'hFF00};

  vedic_16x16 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] want;
    a = x; b = y;
    #1;
    want = 32'(x) * 32'(y);
    checks++;
    if (p != want) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h -> %h, want %h", x, y, p, want);
    end
  endtask

  initial begin
    foreach (CORNER[i]) foreach (CORNER[j]) check(CORNER[i], CORNER[j]);
    for (int i = 0; i < 20000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

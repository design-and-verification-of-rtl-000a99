// csa_tb: self-checking test of the three-operand carry-save adder.
// The default 4-bit adder is tested exhaustively (all 4096 operand triples,
// the largest total 45 exercising the carry out), and a 32-bit instance, the
// size used by the 32x32 multiplier, with random and all-ones operands.
// Results are compared with integer addition. A watchdog ends the run with a
// failure if it hangs.
module csa_tb;
  logic [3:0]  a4, b4, c4;
  logic [5:0]  s4;
  logic [31:0] a32, b32, c32;
  logic [33:0] s32;
  int checks = 0, failures = 0;

  csa           dut4  (.a(a4),  .b(b4),  .c(c4),  .s(s4));
  csa #(.N(32)) dut32 (.a(a32), .b(b32), .c(c32), .s(s32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] a, input logic [31:0] b, input logic [31:0] c);
    logic [33:0] want;
    a32 = a; b32 = b; c32 = c;
    #1;
    want = 34'(a) + 34'(b) + 34'(c);
    checks++;
    if (s32 != want) begin
      failures++;
      $display("FAIL N=32 %h + %h + %h -> %h, want %h", a, b, c, s32, want);
    end
  endtask

  initial begin
    a32 = '0; b32 = '0; c32 = '0;
    for (int i = 0; i < 4096; i++) begin
      {a4, b4, c4} = 12'(i);
      #1;
      checks++;
      if (s4 != 6'(int'(a4) + int'(b4) + int'(c4))) begin
        failures++;
        $display("FAIL N=4 %h + %h + %h -> %h", a4, b4, c4, s4);
      end
    end
    check32('1, '1, '1);
    check32('1, 32'd1, 32'd0);
    for (int i = 0; i < 2000; i++)
      check32($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

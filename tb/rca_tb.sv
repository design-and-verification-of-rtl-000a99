// rca_tb: self-checking test of the ripple-carry adder.
// Two instances are tested: the default 4-bit adder exhaustively (all x, y
// and cin), and a 16-bit one with random operands plus the full-length carry
// ripple 0xFFFF + 0 + 1. Results are compared with integer addition. A
// watchdog ends the run with a failure if it hangs.
module rca_tb;
  logic [3:0]  x4, y4, s4;
  logic        cin4, cout4;
  logic [15:0] x16, y16, s16;
  logic        cin16, cout16;
  int checks = 0, failures = 0;

  rca          dut4  (.x(x4),  .y(y4),  .cin(cin4),  .s(s4),  .cout(cout4));
  rca #(.N(16)) dut16 (.x(x16), .y(y16), .cin(cin16), .s(s16), .cout(cout16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] want;
    x16 = x; y16 = y; cin16 = c;
    #1;
    want = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({cout16, s16} != want) begin
      failures++;
      $display("FAIL N=16 %h + %h + %0b -> %h, want %h", x, y, c, {cout16, s16}, want);
    end
  endtask

  initial begin
    x16 = '0; y16 = '0; cin16 = 1'b0;
    for (int i = 0; i < 512; i++) begin
      {x4, y4, cin4} = 9'(i);
      #1;
      checks++;
      if ({cout4, s4} != 5'(int'(x4) + int'(y4) + int'(cin4))) begin
        failures++;
        $display("FAIL N=4 %h + %h + %0b -> %h", x4, y4, cin4, {cout4, s4});
      end
    end
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    for (int i = 0; i < 2000; i++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

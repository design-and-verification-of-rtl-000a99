// vedic_merge_tb: self-checking test of the carry-save partial-product merge.
// Two instances are driven with the four partial products of real operand
// halves: the default H = 16 (as in the 32x32 top) and H = 4 (as in the 8x8
// unit, exhaustively over all 8-bit operand pairs). The output is compared
// with the integer product of the full operands. A watchdog ends the run
// with a failure if it hangs.
module vedic_merge_tb;
  logic [31:0] q0, q1, q2, q3;
  logic [63:0] p;
  logic [7:0]  r0, r1, r2, r3;
  logic [15:0] p8;
  int checks = 0, failures = 0;

  vedic_merge          dut16 (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
  vedic_merge #(.H(4)) dut4  (.q0(r0), .q1(r1), .q2(r2), .q3(r3), .p(p8));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [31:0] a, input logic [31:0] b);
    logic [63:0] want;
    q0 = 32'(a[15:0])  * 32'(b[15:0]);
    q1 = 32'(a[31:16]) * 32'(b[15:0]);
    q2 = 32'(a[15:0])  * 32'(b[31:16]);
    q3 = 32'(a[31:16]) * 32'(b[31:16]);
    #1;
    want = 64'(a) * 64'(b);
    checks++;
    if (p != want) begin
      failures++;
      if (failures < 10) $display("FAIL H=16 %h * %h -> %h, want %h", a, b, p, want);
    end
  endtask

  initial begin
    logic [3:0] ah, al, bh, bl;
    r0 = '0; r1 = '0; r2 = '0; r3 = '0;
    check16('1, '1);
    check16(32'h8000_0000, 32'h8000_0000);
    check16(32'h0000_FFFF, 32'hFFFF_FFFF);
    for (int i = 0; i < 5000; i++) check16($urandom, $urandom);
    for (int i = 0; i < 65536; i++) begin
      {ah, al, bh, bl} = 16'(i);
      r0 = 8'(al) * 8'(bl);
      r1 = 8'(ah) * 8'(bl);
      r2 = 8'(al) * 8'(bh);
      r3 = 8'(ah) * 8'(bh);
      #1;
      checks++;
      if (p8 != 16'({ah, al}) * 16'({bh, bl})) begin
        failures++;
        if (failures < 10) $display("FAIL H=4 %h * %h -> %h", {ah, al}, {bh, bl}, p8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// modified_vedic_tb: end-to-end self-checking test of the 32x32 modified
// Vedic multiplier at its only (full) size.
//
// Applied operands: the four nonzero operand pairs of the reference
// simulation (1235*4556, 9087484*75672, 783506*913268, 76907*458989), zero,
// one, all-ones and single-high-bit corners, and 50000 random pairs, some
// with sparse or dense bit patterns. Every product is compared with a
// 64-bit integer multiplication done by the testbench.
//
// It also counts how often the internal mechanisms of the tree are used,
// and counts a failure for any that never happened:
//   - the top carry-save adder spilling into the half-width final adder
//     (its two overflow bits nonzero), and its own carry out being 1;
//   - in one 4x4 leaf, each of the two ripple-adder carries that meet in
//     the OR gate (c1 and c2).
// The operands are held 1 time unit each; a watchdog ends a hung run with a
// failure.
module modified_vedic_tb;
  logic [31:0] a, b;
  logic [63:0] z;
  int checks = 0, failures = 0;
  int n_spill = 0, n_csa_cout = 0, n_or_c1 = 0, n_or_c2 = 0;

  localparam logic [31:0] CORNER [7] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                                         32'h0000_FFFF, 32'hFFFF_0000, 32'h5555_5555};

  modified_vedic dut (.a(a), .b(b), .z(z));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] want;
    a = x; b = y;
    #1;
    want = 64'(x) * 64'(y);
    checks++;
    if (z != want) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d -> %0d, want %0d", x, y, z, want);
    end
    if (dut.u_merge.t[33:32] != 2'b00) n_spill++;
    if (dut.u_merge.t[33])             n_csa_cout++;
    if (dut.u_m3.u_m3.u_m3.c1)         n_or_c1++;
    if (dut.u_m3.u_m3.u_m3.c2)         n_or_c2++;
  endtask

  task automatic mechanism(input string name, input int count);
    $display("mechanism %-28s happened %0d times", name, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end
  endtask

  initial begin
    // Operand pairs of the reference simulation.
    check(32'd1235, 32'd4556);
    check(32'd9087484, 32'd75672);
    check(32'd783506, 32'd913268);
    check(32'd76907, 32'd458989);
    if (64'd1235 * 64'd4556 != 64'd5626660) failures++;
    foreach (CORNER[i]) foreach (CORNER[j]) check(CORNER[i], CORNER[j]);
    for (int i = 0; i < 50000; i++) begin
      case (i % 4)
        0: check($urandom, $urandom);
        1: check($urandom | $urandom, $urandom | $urandom);   // dense bits
        2: check($urandom & $urandom, $urandom & $urandom);   // sparse bits
        default: check($urandom, 32'($urandom_range(0, 65535)));
      endcase
    end
    mechanism("CSA spill into top adder", n_spill);
    mechanism("CSA carry out", n_csa_cout);
    mechanism("4x4 OR gate, carry c1", n_or_c1);
    mechanism("4x4 OR gate, carry c2", n_or_c2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

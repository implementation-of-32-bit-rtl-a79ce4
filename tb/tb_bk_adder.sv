// tb_bk_adder: end-to-end test of the 32-bit Brent-Kung CPL adder at its
// default width.
//
// The expected result is {cout, sum} = a + b + cin computed with the
// simulator's own arithmetic. Both output rails are checked (sum_n = ~sum,
// cout_n = ~cout). Stimulus, in order:
//   - the seven reference additions used to validate the adder, including
//     two results stated with the vectors (FFFFFFFE + EA800029 = 1_EA800027,
//     AAAAAAAA + 55555555 = 0_FFFFFFFF), checked as literals too;
//   - the critical-path vector FFFFFFFF + 00000001, whose carry travels from
//     bit 1 through G1:0, G3:0, G7:0, G15:0, G31:0 to sum bit 32;
//   - a carry-in rippling through every bit (all-propagate operands);
//   - random operands with random carry-in.
// The behaviours the adder must show are counted and each must occur at
// least once: carry-in taken, carry-out produced, a carry propagated through
// all 32 bits, a result with no carry out.
module tb_bk_adder;
  localparam int W = 32;
  localparam int NRAND = 20000;

  logic [W-1:0] a, b, sum, sum_n;
  logic         cin, cout, cout_n;
  int checks = 0, failures = 0;
  int n_cin = 0, n_cout = 0, n_full_prop = 0, n_no_cout = 0;

  bk_adder dut (
    .a(a), .b(b), .cin(cin),
    .sum(sum), .sum_n(sum_n), .cout(cout), .cout_n(cout_n)
  );

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add(logic [W-1:0] x, logic [W-1:0] y, logic c);
    logic [W:0] exp;
    a = x;
    b = y;
    cin = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, c};
    checks++;
    if ({cout, sum} !== exp || sum_n !== ~sum || cout_n !== ~cout) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %0d_%h (rails %0d_%h), exp %0d_%h",
               x, y, c, cout, sum, cout_n, sum_n, exp[W], exp[W-1:0]);
    end
    if (c) n_cin++;
    if (exp[W]) n_cout++; else n_no_cout++;
    if (c && ((x ^ y) == '1)) n_full_prop++;
  endtask

  task automatic expect_lit(logic [W:0] exp, string what);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL %s: got %0d_%h exp %0d_%h", what, cout, sum, exp[W], exp[W-1:0]);
    end
  endtask

  task automatic expect_count(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL never exercised: %s", what);
    end
  endtask

  initial begin
    // Reference additions.
    add(32'hFFFF_FFFE, 32'hEA80_0029, 1'b0);
    expect_lit({1'b1, 32'hEA80_0027}, "reference vector 1");
    add(32'hAAAA_AAAA, 32'h5555_5555, 1'b0);
    expect_lit({1'b0, 32'hFFFF_FFFF}, "reference vector 2");
    add(32'hF9FF_FFE9, 32'h1B4B_D455, 1'b0);
    expect_lit({1'b1, 32'h154B_D43E}, "reference vector 3");
    add(32'h0E00_0916, 32'h0364_ABBA, 1'b0);
    add(32'hFFFF_FFFF, 32'hFFFF_FFFD, 1'b1);
    add(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b0);
    add(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    // Critical path: carry generated at bit 1 reaches sum bit 32.
    add(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    expect_lit({1'b1, 32'h0000_0000}, "critical-path vector");
    // Carry-in through every bit.
    add(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    add(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    add(32'h0000_0000, 32'h0000_0000, 1'b0);
    // Random operands.
    for (int r = 0; r < NRAND; r++) add($urandom(), $urandom(), 1'($urandom()));

    $display("carry-in used %0d, carry-out %0d, no carry-out %0d, full-width propagate %0d",
             n_cin, n_cout, n_no_cout, n_full_prop);
    expect_count(n_cin, "carry-in");
    expect_count(n_cout, "carry-out");
    expect_count(n_no_cout, "no carry-out");
    expect_count(n_full_prop, "carry propagated through all bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

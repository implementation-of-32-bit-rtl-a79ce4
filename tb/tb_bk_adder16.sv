// tb_bk_adder16: the adder built at 16 bits, the smaller Brent-Kung adder
// (7 prefix stages) the 32-bit design is an extension of. Checks
// {cout, sum} = a + b + cin on both rails for every carry-in with directed
// corner operands and random operands.
module tb_bk_adder16;
  localparam int W = 16;
  localparam int NRAND = 20000;

  logic [W-1:0] a, b, sum, sum_n;
  logic         cin, cout, cout_n;
  int checks = 0, failures = 0;

  bk_adder #(.WIDTH(W)) dut (
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
      $display("FAIL %h + %h + %0d: got %0d_%h exp %0d_%h", x, y, c, cout, sum, exp[W], exp[W-1:0]);
    end
  endtask

  initial begin
    for (int c = 0; c < 2; c++) begin
      add(16'hFFFF, 16'h0001, 1'(c));
      add(16'hFFFF, 16'h0000, 1'(c));
      add(16'hFFFF, 16'hFFFF, 1'(c));
      add(16'hAAAA, 16'h5555, 1'(c));
      add(16'h0000, 16'h0000, 1'(c));
      for (int k = 0; k < W; k++) add(16'h1 << k, 16'hFFFF, 1'(c));
    end
    for (int r = 0; r < NRAND; r++) add(16'($urandom()), 16'($urandom()), 1'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

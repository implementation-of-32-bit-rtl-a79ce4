// tb_bk_prefix_tree: checks the Brent-Kung carry network at 32 columns and at
// 16 columns against a serial carry recurrence G_i:0 = G_i + P_i * G_i-1:0.
// Stimulus: directed patterns (carry-in rippling through every column, kill
// at each column, all generate) and random G/P with P = 0 in column 0. It also
// checks the stage and cell counts of the placement (2*log2(N)-1 stages,
// 2N-2-log2(N) cells) and the cells the 32-column tree must hold: the gray
// cell for G31:0 in stage 5 and the one for G23:0 in stage 6.
module tb_bk_prefix_tree;
  import cpl_pkg::*;

  localparam int N32 = 32;
  localparam int N16 = 16;
  localparam int NRAND = 2000;

  logic  [N32-1:0] g32, p32;
  pg_t   [N32-1:0] in32;
  rail_t [N32-1:0] out32;
  logic  [N16-1:0] g16, p16;
  pg_t   [N16-1:0] in16;
  rail_t [N16-1:0] out16;
  int checks = 0, failures = 0;

  always_comb for (int i = 0; i < N32; i++) in32[i] = '{g: to_rail(g32[i]), p: to_rail(p32[i])};
  always_comb for (int i = 0; i < N16; i++) in16[i] = '{g: to_rail(g16[i]), p: to_rail(p16[i])};

  bk_prefix_tree dut32 (.pg_in(in32), .g_out(out32));
  bk_prefix_tree #(.N(N16)) dut16 (.pg_in(in16), .g_out(out16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N32-1:0] ref_prefix(logic [N32-1:0] g, logic [N32-1:0] p, int n);
    logic [N32-1:0] c;
    logic run;
    c = '0;
    run = 1'b0;
    for (int i = 0; i < n; i++) begin
      run = g[i] | (p[i] & run);
      c[i] = run;
    end
    return c;
  endfunction

  task automatic apply(logic [N32-1:0] g, logic [N32-1:0] p);
    logic [N32-1:0] e32, e16;
    g32 = g;
    p32 = p;
    p32[0] = 1'b0;
    g16 = g[N16-1:0];
    p16 = p32[N16-1:0];
    #1;
    e32 = ref_prefix(g32, p32, N32);
    e16 = ref_prefix({16'b0, g16}, {16'b0, p16}, N16);
    for (int i = 0; i < N32; i++) begin
      checks++;
      if (out32[i] !== to_rail(e32[i])) begin
        failures++;
        $display("FAIL N=32 col %0d g=%h p=%h got %b exp %b", i, g32, p32, out32[i], e32[i]);
      end
    end
    for (int i = 0; i < N16; i++) begin
      checks++;
      if (out16[i] !== to_rail(e16[i])) begin
        failures++;
        $display("FAIL N=16 col %0d g=%h p=%h got %b exp %b", i, g16, p16, out16[i], e16[i]);
      end
    end
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int cells;
    // Structure of the placement.
    check(bk_stages(N32) == 9, "32-column tree must have 9 stages");
    check(bk_stages(N16) == 7, "16-column tree must have 7 stages");
    check(bk_has_cell(N32, 5, 31) && bk_is_gray(N32, 5, 31) && bk_offset(N32, 5) == 16,
          "G31:0 = G31:16 o G15:0 must be a gray cell in stage 5");
    check(bk_has_cell(N32, 6, 23) && bk_is_gray(N32, 6, 23) && bk_offset(N32, 6) == 8,
          "G23:0 = G23:16 o G15:0 must be a gray cell in stage 6");
    check(bk_has_cell(N32, 4, 31) && !bk_is_gray(N32, 4, 31),
          "G31:16 must be a black cell in stage 4");
    cells = 0;
    for (int s = 1; s <= bk_stages(N32); s++)
      for (int i = 0; i < N32; i++) cells += int'(bk_has_cell(N32, s, i));
    check(cells == 2 * N32 - 2 - 5, "32-column tree must hold 57 cells");

    // Directed patterns.
    apply('0, '0);
    apply(32'h1, '1);                       // carry-in ripples through all columns
    apply(32'h1, 32'hFFFF_FFFE);
    apply('1, '0);
    for (int k = 1; k < N32; k++) apply(32'h1, ~(32'h1 << k));  // kill at column k
    for (int k = 0; k < N32; k++) apply(32'h1 << k, '1);        // generate at column k
    // Random patterns (g and p not both 1 in a column, as from real operands).
    for (int r = 0; r < NRAND; r++) begin
      logic [N32-1:0] g, p;
      g = $urandom();
      p = $urandom() & ~g;
      apply(g, p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

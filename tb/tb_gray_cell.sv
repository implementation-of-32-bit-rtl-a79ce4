// tb_gray_cell: exhaustive test of the gray cell,
// G = G_hi + P_hi * G_lo, on both rails for all eight input combinations.
module tb_gray_cell;
  import cpl_pkg::*;
  pg_t   hi;
  rail_t g_lo, g;
  int checks = 0, failures = 0;

  gray_cell dut (.hi(hi), .g_lo(g_lo), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 8; v++) begin
      hi   = '{g: to_rail(v[2]), p: to_rail(v[1])};
      g_lo = to_rail(v[0]);
      exp  = v[2] | (v[1] & v[0]);
      #1;
      checks++;
      if (g !== to_rail(exp)) begin
        failures++;
        $display("FAIL g_hi=%0d p_hi=%0d g_lo=%0d g=%b", v[2], v[1], v[0], g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_black_cell: exhaustive test of the black cell,
// G = G_hi + P_hi * G_lo and P = P_hi * P_lo, on both rails for all sixteen
// input combinations.
module tb_black_cell;
  import cpl_pkg::*;
  pg_t hi, lo, pg;
  int checks = 0, failures = 0;

  black_cell dut (.hi(hi), .lo(lo), .pg(pg));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg, ep;
    for (int v = 0; v < 16; v++) begin
      hi = '{g: to_rail(v[3]), p: to_rail(v[2])};
      lo = '{g: to_rail(v[1]), p: to_rail(v[0])};
      eg = v[3] | (v[2] & v[1]);
      ep = v[2] & v[0];
      #1;
      checks++;
      if (pg.g !== to_rail(eg) || pg.p !== to_rail(ep)) begin
        failures++;
        $display("FAIL hi=%b lo=%b pg=%b", v[3:2], v[1:0], pg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pg_cell: exhaustive test of the bitwise generate/propagate cell:
// G = A*B and P = A xor B on both rails for all four operand pairs.
module tb_pg_cell;
  import cpl_pkg::*;
  rail_t a, b;
  pg_t   pg;
  int checks = 0, failures = 0;

  pg_cell dut (.a(a), .b(b), .pg(pg));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg, ep;
    for (int v = 0; v < 4; v++) begin
      a  = to_rail(v[1]);
      b  = to_rail(v[0]);
      eg = v[1] & v[0];
      ep = v[1] ^ v[0];
      #1;
      checks++;
      if (pg.g !== to_rail(eg) || pg.p !== to_rail(ep)) begin
        failures++;
        $display("FAIL a=%0d b=%0d pg=%b", v[1], v[0], pg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

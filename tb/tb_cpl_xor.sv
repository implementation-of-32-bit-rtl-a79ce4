// tb_cpl_xor: exhaustive truth-table test of the dual-rail CPL exclusive OR gate:
// both output rails are checked for all four input combinations.
module tb_cpl_xor;
  import cpl_pkg::*;
  rail_t a, b, y;
  int checks = 0, failures = 0;

  cpl_xor dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 4; v++) begin
      a = to_rail(v[1]);
      b = to_rail(v[0]);
      exp = v[1] ^ v[0];
      #1;
      checks++;
      if (y.t !== exp || y.f !== !exp) begin
        failures++;
        $display("FAIL a=%0d b=%0d y=%b", v[1], v[0], y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

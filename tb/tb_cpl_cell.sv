// tb_cpl_cell: exhaustive test of the generic CPL gate. For every value of
// the select and the two pass inputs (rails kept complementary) the true
// rail must be the selected input and the complement rail its inverse.
module tb_cpl_cell;
  import cpl_pkg::*;
  rail_t s, d1, d0, y;
  int checks = 0, failures = 0;

  cpl_cell dut (.s(s), .d1(d1), .d0(d0), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 8; v++) begin
      s  = to_rail(v[2]);
      d1 = to_rail(v[1]);
      d0 = to_rail(v[0]);
      exp = v[2] ? v[1] : v[0];
      #1;
      checks++;
      if (y.t !== exp || y.f !== !exp) begin
        failures++;
        $display("FAIL s=%0d d1=%0d d0=%0d y=%b", v[2], v[1], v[0], y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cpl_not: exhaustive test of the inverter: y must be the complement of a
// for both input values.
module tb_cpl_not;
  logic a, y;
  int checks = 0, failures = 0;

  cpl_not dut (.a(a), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      a = v[0];
      #1;
      checks++;
      if (y !== !v[0]) begin
        failures++;
        $display("FAIL a=%0d y=%0d", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

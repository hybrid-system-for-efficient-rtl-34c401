// tb_tia_model: TIA output for currents across and beyond its range
// (0.4 V + 10 kOhm * i, limited to 0 .. 1.2 V).
module tb_tia_model;
  int checks = 0, failures = 0;
  real i, v;

  tia_model u_dut (.i_draw_a(i), .v_out(v));

  task automatic check(input real iin, input real vexp);
    i = iin; #1;
    checks++;
    if (v > vexp + 1e-9 || v < vexp - 1e-9) begin
      failures++; $display("FAIL i=%g: v=%g expected %g", iin, v, vexp);
    end
  endtask

  initial begin
    check(0.0, 0.4);
    check(10e-6, 0.5);
    check(-10e-6, 0.3);
    check(73e-6, 1.13);
    check(100e-6, 1.2);
    check(-50e-6, 0.0);
    for (int n = 0; n < 50; n++) begin
      real x;
      x = (real'($urandom_range(0, 80000)) - 40000.0) * 1e-9;
      check(x, 0.4 + 1e4 * x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

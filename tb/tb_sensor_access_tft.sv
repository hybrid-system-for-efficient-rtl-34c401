// tb_sensor_access_tft: sensor current with the access TFT on (0.4 V / (R + 1.5 kOhm))
// and off (practically zero), over the 15 kOhm .. 100 kOhm range of the force sensors.
module tb_sensor_access_tft;
  int checks = 0, failures = 0;
  logic gate;
  logic [31:0] r;
  real i;

  sensor_access_tft u_dut (.acc_gate(gate), .r_sns_ohm(r), .i_draw_a(i));

  initial begin
    for (int n = 0; n < 100; n++) begin
      real e;
      r = 32'($urandom_range(15000, 100000));
      gate = 1; #1;
      e = 0.4 / (real'(r) + 1500.0);
      checks++;
      if (i > e * 1.000001 || i < e * 0.999999) begin failures++; $display("FAIL on R=%0d i=%g", r, i); end
      gate = 0; #1;
      checks++;
      if (i > 1e-9 || i < 0.0) begin failures++; $display("FAIL off R=%0d i=%g", r, i); end
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

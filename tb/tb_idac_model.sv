// tb_idac_model: every one of the 128 I-DAC codes against the expected current
// (bank bit 6: 1 draws, 0 pushes; bits 5:0 count 0.5 uA units).
module tb_idac_model;
  int checks = 0, failures = 0;
  logic [6:0] code;
  real i;

  idac_model u_dut (.code, .i_draw_a(i));

  initial begin
    real e;
    for (int c = 0; c < 128; c++) begin
      code = 7'(c); #1;
      e = real'(c % 64) * 0.5e-6;
      if (c < 64) e = -e;
      checks++;
      if (i > e + 1e-12 || i < e - 1e-12) begin
        failures++; $display("FAIL code %0d: %g A, expected %g A", c, i, e);
      end
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

// tb_sar_cdac_comparator: the input is held from the end of the sample cycle, and comp
// answers held input >= code * 1.2 V / 1024 while the live input moves.
module tb_sar_cdac_comparator;
  int checks = 0, failures = 0;
  logic clk = 0, sample = 0;
  real vin;
  logic [9:0] dac;
  logic comp;

  sar_cdac_comparator u_dut (.clk, .sample, .vin, .dac_code(dac), .comp);

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 100; n++) begin
      real vs;
      int k;
      vs = real'($urandom_range(0, 1200000)) * 1e-6;
      vin = vs;
      @(negedge clk); sample = 1;
      @(negedge clk); sample = 0;
      vin = 1.2 - vs;                 // the live input moves after the hold
      k = int'($floor(vs * 1024.0 / 1.2));
      for (int d = k - 2; d <= k + 2; d++) begin
        if (d < 0 || d > 1023) continue;
        dac = 10'(d); #1;
        checks++;
        if (comp !== (d <= k)) begin
          failures++; $display("FAIL v=%g code %0d comp=%0b", vs, d, comp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

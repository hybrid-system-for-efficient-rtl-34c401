// tb_sar_adc: converts random and edge-case voltages and checks the code against
// floor(v * 1024 / 1.2) (clamped), the 12-cycle conversion time (100 kS/s at 1.2 MHz)
// and that the input may change once sampling is over.
module tb_sar_adc;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  real vin;
  logic busy, done;
  logic [9:0] result;

  sar_adc u_dut (.clk, .rst_n, .start, .vin, .busy, .done, .result);

  always #5 clk = ~clk;

  task automatic convert(input real v);
    int cyc, e;
    vin = v;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    @(negedge clk); vin = 0.0;          // sampled during the previous cycle
    cyc = 2;
    while (!done && cyc < 40) begin @(negedge clk); cyc++; end
    e = ref_code((v - 0.4) / 1e4);
    checks++;
    if (int'(result) != e) begin failures++; $display("FAIL v=%g code %0d expected %0d", v, result, e); end
    checks++;
    if (cyc != 12) begin failures++; $display("FAIL conversion took %0d cycles", cyc); end
  endtask

  initial begin
    vin = 0.0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    convert(0.0); convert(0.4); convert(1.2); convert(0.6001); convert(1.19);
    for (int n = 0; n < 200; n++) convert(real'($urandom_range(0, 1200000)) * 1e-6 + 0.3e-6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

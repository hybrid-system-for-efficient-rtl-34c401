// tb_sar_logic: drives the SAR register with an ideal comparator for a hidden input
// code x (comp = x >= dac_code) and checks that every conversion returns x, that done
// comes 12 cycles after start and that sample is high for exactly one cycle.
module tb_sar_logic;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic comp, sample, busy, done;
  logic [9:0] dac_code, result;
  int x;

  sar_logic u_dut (.clk, .rst_n, .start, .comp, .sample, .dac_code, .busy, .done, .result);

  assign comp = (x >= int'(dac_code));
  always #5 clk = ~clk;

  task automatic convert(input int xin);
    int cyc, nsample;
    x = xin;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1; nsample = 0;
    while (!done && cyc < 40) begin
      if (sample) nsample++;
      @(negedge clk); cyc++;
    end
    checks++;
    if (result !== 10'(xin)) begin failures++; $display("FAIL x=%0d result=%0d", xin, result); end
    checks++;
    if (cyc != 12) begin failures++; $display("FAIL latency %0d cycles for x=%0d", cyc, xin); end
    checks++;
    if (nsample != 1) begin failures++; $display("FAIL sample cycles %0d", nsample); end
  endtask

  initial begin
    x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    convert(0); convert(1023); convert(512); convert(511); convert(341);
    for (int n = 0; n < 200; n++) convert($urandom_range(0, 1023));
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

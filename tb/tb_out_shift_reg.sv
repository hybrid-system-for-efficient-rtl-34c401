// tb_out_shift_reg: three shift registers chained as in the IC; after a parallel load
// the 30 serial bits must be word 0, word 1, word 2, each MSB first.
module tb_out_shift_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [9:0] pd [3];
  logic [3:0] ch;

  assign ch[3] = 1'b0;
  for (genvar k = 0; k < 3; k++) begin : g
    out_shift_reg u_dut (.clk, .rst_n, .load, .pdata(pd[k]), .shift, .sin(ch[k+1]), .sout(ch[k]));
  end

  always #5 clk = ~clk;

  initial begin
    logic [29:0] exp_stream, got;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      for (int k = 0; k < 3; k++) pd[k] = 10'($urandom_range(0, 1023));
      exp_stream = {pd[0], pd[1], pd[2]};
      @(negedge clk); load = 1;
      @(negedge clk); load = 0; shift = 1;
      for (int b = 29; b >= 0; b--) begin
        got[b] = ch[0];
        @(negedge clk);
      end
      shift = 0;
      checks++;
      if (got !== exp_stream) begin failures++; $display("FAIL stream %h vs %h", got, exp_stream); end
      // Everything has been shifted out: zeros follow.
      checks++;
      if (ch[0] !== 1'b0) begin failures++; $display("FAIL chain not empty"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

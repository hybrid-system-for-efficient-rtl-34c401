// tb_offset_regfile: random writes and reads of the 32 x 7 register file against a
// reference array, plus the reset value and write-to-read timing.
module tb_offset_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [6:0] wdata = '0, rdata;
  logic [6:0] ref_mem [32];

  offset_regfile u_dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      ref_mem[i] = '0;
      raddr = 5'(i); #1;
      checks++; if (rdata !== 7'd0) begin failures++; $display("FAIL reset word %0d", i); end
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) == 1);
      waddr = 5'($urandom_range(0, 31));
      wdata = 7'($urandom_range(0, 127));
      raddr = 5'($urandom_range(0, 31));
      #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++; $display("FAIL read %0d: %0h vs %0h", raddr, rdata, ref_mem[raddr]);
      end
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 32; i++) begin
      raddr = 5'(i); #1;
      checks++; if (rdata !== ref_mem[i]) begin failures++; $display("FAIL final word %0d", i); end
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

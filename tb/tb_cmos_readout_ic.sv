// tb_cmos_readout_ic: the eight-channel IC with shortened rows (300 cycles). Every
// channel sees its own per-row baseline during calibration and baseline plus a force
// current afterwards. One frame is read from the serial output (80 bits per row,
// channel 1 first, MSB first) and each code is compared with the reference chain;
// the frame must take exactly 32 rows of ROW_CYCLES.
module tb_cmos_readout_ic;
  import cs_pkg::*;
  import tb_ref_pkg::*;
  localparam int RC = 300, SC = 30;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cal_req = 0, run_en = 0;
  row_code_t r, rb;
  logic sdo, sdo_valid, frame_start, cal_done, busy;
  real iin [8];
  adc_code_t adc_code [8];
  idac_code_t idac_code [8];
  real base [8][32], force_i [8][32];
  logic force_on = 0;

  cmos_readout_ic #(.ROW_CYCLES(RC), .SETTLE_CYCLES(SC)) u_dut (
    .clk, .rst_n, .cal_req, .run_en, .i_in_a(iin), .r_code(r), .rb_code(rb),
    .sdo, .sdo_valid, .frame_start, .cal_done, .busy, .adc_code, .idac_code);

  always_comb
    for (int k = 0; k < 8; k++) iin[k] = base[k][r] + (force_on ? force_i[k][r] : 0.0);

  always #5 clk = ~clk;

  initial begin
    int o [8][32];
    int nbits, row, exp, got, frame_cycles, nframes;
    logic [79:0] word;
    for (int k = 0; k < 8; k++)
      for (int m = 0; m < 32; m++) begin
        base[k][m]    = (real'($urandom_range(0, 40000)) - 10000.0) * 1e-9;
        force_i[k][m] = real'($urandom_range(0, 70000)) * 1e-9;
        o[k][m] = ref_cal(base[k][m], 341);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cal_req = 1;
    @(negedge clk); cal_req = 0;
    wait (cal_done);
    @(negedge clk); force_on = 1; run_en = 1;
    @(posedge clk); #1;
    while (!frame_start) begin @(posedge clk); #1; end
    frame_cycles = 0; nframes = 0; nbits = 0; row = 0;
    while (nframes == 0) begin
      if (sdo_valid) begin
        word = {word[78:0], sdo};
        nbits++;
        if (nbits == 80) begin
          for (int k = 0; k < 8; k++) begin
            got = int'(word[79 - 10*k -: 10]);
            exp = ref_code(base[k][row] + force_i[k][row] + ref_idac(o[k][row]));
            checks++;
            if (got < exp - 1 || got > exp + 1) begin
              failures++; $display("FAIL ch%0d row %0d code %0d expected %0d", k + 1, row, got, exp);
            end
          end
          nbits = 0; row++;
        end
      end
      @(posedge clk); #1;
      frame_cycles++;
      if (frame_start) nframes++;
    end
    checks++;
    if (frame_cycles != 32 * RC) begin failures++; $display("FAIL frame took %0d cycles", frame_cycles); end
    checks++;
    if (row != 32) begin failures++; $display("FAIL %0d rows read", row); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_readout_channel: one channel under a shortened digital_ctrl (200-cycle rows).
// Each row gets its own baseline current (-10 .. +30 uA, so both I-DAC banks are
// needed). After calibration the stored I-DAC word of every row must equal the
// reference search result; then a force current is added per row and the ADC code and
// its serial copy must match the reference chain TIA + I-DAC + ADC (within 1 LSB for
// rounding at code boundaries).
module tb_readout_channel;
  import cs_pkg::*;
  import tb_ref_pkg::*;
  localparam int RC = 200, SC = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cal_req = 0, run_en = 0;
  row_code_t r, rb;
  logic cal_active, cal_set, cal_decide, cal_write, cal_done, adc_start, sr_load, sr_shift, frame_start, busy;
  logic [6:0] cal_bit;
  logic sout, adc_done;
  adc_code_t adc_code;
  idac_code_t idac_code;
  real i_in;
  real base [32], force_i [32];
  logic force_on = 0;
  int n_push = 0, n_draw = 0;

  digital_ctrl #(.ROW_CYCLES(RC), .SETTLE_CYCLES(SC), .N_CHANNELS(1)) u_ctrl (
    .clk, .rst_n, .cal_req, .run_en, .adc_done, .r_code(r), .rb_code(rb),
    .cal_active, .cal_set, .cal_bit, .cal_decide, .cal_write, .cal_done,
    .adc_start, .sr_load, .sr_shift, .frame_start, .busy);

  readout_channel u_dut (
    .clk, .rst_n, .i_in_a(i_in), .r_code(r), .cal_active, .cal_set, .cal_bit, .cal_decide,
    .cal_write, .adc_start, .sr_load, .sr_shift, .sin(1'b0), .sout, .adc_done, .adc_code, .idac_code);

  always_comb i_in = base[r] + (force_on ? force_i[r] : 0.0);

  always #5 clk = ~clk;

  initial begin
    int o [32];
    int got, exp, nrow;
    logic [9:0] ser;
    for (int k = 0; k < 32; k++) begin
      base[k]    = (real'($urandom_range(0, 40000)) - 10000.0) * 1e-9;
      force_i[k] = real'($urandom_range(0, 60000)) * 1e-9;
      o[k] = ref_cal(base[k], 341);
      if (o[k] >= 64) n_draw++; else n_push++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cal_req = 1;
    @(negedge clk); cal_req = 0;
    wait (cal_done);
    @(negedge clk); force_on = 1; run_en = 1;
    nrow = 0;
    while (nrow < 32) begin
      @(posedge clk); #1;
      if (sr_load) begin
        // idac word in use for this row
        checks++;
        if (int'(idac_code) != ref_word(o[r])) begin
          failures++; $display("FAIL row %0d idac word %0h expected %0h", r, idac_code, ref_word(o[r]));
        end
        exp = ref_code(base[r] + force_i[r] + ref_idac(o[r]));
        got = int'(adc_code);
        checks++;
        if (got < exp - 1 || got > exp + 1) begin
          failures++; $display("FAIL row %0d code %0d expected %0d", r, got, exp);
        end
        @(posedge clk); #1;            // shifting starts
        for (int b = 9; b >= 0; b--) begin
          ser[b] = sout;
          @(posedge clk); #1;
        end
        checks++;
        if (ser != 10'(got)) begin failures++; $display("FAIL row serial %0h vs %0h", ser, got); end
        nrow++;
      end
    end
    checks++;
    if (n_push == 0 || n_draw == 0) begin failures++; $display("FAIL one I-DAC bank never used"); end
    $display("I-DAC rows: %0d push, %0d draw", n_push, n_draw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

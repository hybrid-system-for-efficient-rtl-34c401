// tb_digital_ctrl: runs the sequencer with a shortened row (200 cycles, 50 settle
// cycles) against a stand-in ADC that answers 12 cycles after each start.
// Calibration: 7 trials per row with one-hot bits 6..0, one write per row in row order,
// cal_done at the end. Acquisition over two frames: every row lasts exactly ROW_CYCLES,
// codes count 0..31 with Rb = ~R, the ADC starts SETTLE_CYCLES into the row, and 80 shift
// cycles follow each load; frame_start marks row 0.
module tb_digital_ctrl;
  import cs_pkg::*;
  localparam int RC = 200, SC = 50;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cal_req = 0, run_en = 0, adc_done = 0;
  row_code_t r, rb;
  logic cal_active, cal_set, cal_decide, cal_write, cal_done, adc_start, sr_load, sr_shift, frame_start, busy;
  logic [6:0] cal_bit;

  digital_ctrl #(.ROW_CYCLES(RC), .SETTLE_CYCLES(SC), .N_CHANNELS(8)) u_dut (
    .clk, .rst_n, .cal_req, .run_en, .adc_done, .r_code(r), .rb_code(rb),
    .cal_active, .cal_set, .cal_bit, .cal_decide, .cal_write, .cal_done,
    .adc_start, .sr_load, .sr_shift, .frame_start, .busy);

  always #5 clk = ~clk;

  // Stand-in ADC: done 12 cycles after start.
  int adc_cnt = -1;
  always @(posedge clk) begin
    adc_done <= 1'b0;
    if (adc_start) adc_cnt <= 11;
    else if (adc_cnt > 0) adc_cnt <= adc_cnt - 1;
    else if (adc_cnt == 0) begin adc_done <= 1'b1; adc_cnt <= -1; end
  end

  task automatic expect_int(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int nset, nwrite, bitexp, rowexp, nstart;
    int row_start, last_row, nrows, nshift, nload, nframe, shift_in_row, start_off;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---------------- calibration ----------------
    @(negedge clk); cal_req = 1;
    @(posedge clk); #1; cal_req = 0;
    nset = 0; nwrite = 0; bitexp = 6; rowexp = 0; nstart = 0;
    while (!cal_done) begin
      if (cal_set) begin
        checks++;
        if (cal_bit != 7'(1 << bitexp) || int'(r) != rowexp || !cal_active) begin
          failures++; $display("FAIL cal_set bit %b row %0d", cal_bit, r);
        end
        nset++;
        bitexp = (bitexp == 0) ? 6 : bitexp - 1;
      end
      if (adc_start) nstart++;
      if (cal_write) begin
        expect_int("cal_write row", int'(r), rowexp);
        rowexp++; nwrite++;
      end
      @(posedge clk); #1;
    end
    expect_int("cal trials", nset, 7 * 32);
    expect_int("cal conversions", nstart, 7 * 32);
    expect_int("cal writes", nwrite, 32);
    // ---------------- acquisition ----------------
    @(negedge clk); run_en = 1;
    @(posedge clk); #1;
    // wait for frame start
    while (!frame_start) begin @(posedge clk); #1; end
    row_start = 0; last_row = int'(r); nrows = 0; nshift = 0; nload = 0; nframe = 1; start_off = -1;
    expect_int("first row", int'(r), 0);
    for (int cyc = 1; cyc <= 2 * 32 * RC; cyc++) begin
      if (cyc == 2 * 32 * RC - 10) run_en = 0;
      @(posedge clk); #1;
      if (int'(r) != last_row) begin
        expect_int("row length", cyc - row_start, RC);
        expect_int("row order", int'(r), (last_row + 1) % 32);
        expect_int("shift cycles per row", nshift, 80);
        expect_int("loads per row", nload, 1);
        expect_int("adc start offset", start_off, SC);
        row_start = cyc; last_row = int'(r); nrows++; nshift = 0; nload = 0; start_off = -1;
      end
      checks++;
      if (rb !== ~r) begin failures++; $display("FAIL Rb not complement"); end
      if (sr_shift) nshift++;
      if (sr_load) nload++;
      if (adc_start) start_off = cyc - row_start;
      if (frame_start) begin
        nframe++;
        expect_int("frame_start row", int'(r), 0);
      end
    end
    expect_int("rows seen", nrows, 64);   // 63 in two frames + the return to row 0
    expect_int("frames", nframe, 2);
    repeat (5) @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("FAIL still busy after run_en dropped"); end
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
